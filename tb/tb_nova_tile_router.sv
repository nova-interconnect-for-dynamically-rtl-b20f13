// tb_nova_tile_router: self-checking test of one tile router.
//
// The router under test is tile 6 of cluster 2. Around the clockwise ring
// 0, 3, 5, 6, 7, 4, 2, 1 its neighbours are 7 (CW) and 5 (CCW), its two-hop
// neighbours 4 (CW) and 3 (CCW); tiles 0, 1, 2 are reached through the switch.
// The expected output for every input and destination is written out below
// by hand from that ring, independently of the router's own arithmetic.
//
// Checks: every input/destination pair leaves on the expected output one
// clock after it is accepted; a packet for a ring neighbour is sent to the
// switch (and the fallback pulse is seen) when that ring link refused the
// clock before; under random traffic and back-pressure every packet leaves
// exactly once, on its expected output or, for a ring route, on the switch.
// A stream of packets to the CW neighbour must pass at one packet per clock.
module tb_nova_tile_router;
  import nova_pkg::*;

  localparam logic [2:0] MY_CL = 3'd2;
  localparam logic [2:0] MY_T  = 3'd6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic      in_valid [4], in_ready [4], out_valid [4], out_ready [4];
  nova_pkt_t in_pkt [4], out_pkt [4];
  logic      fallback;
  int checks = 0, failures = 0, fallbacks = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && fallback) fallbacks++;

  nova_tile_router dut (
    .clk, .rst_n, .cluster_id(MY_CL), .tile_id(MY_T),
    .in_valid, .in_ready, .in_pkt, .out_valid, .out_ready, .out_pkt, .fallback);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  // Expected output for a packet that entered on input `from`.
  // 0 local, 1 CW, 2 CCW, 3 switch.
  function automatic int expect_out(input int from, input logic [2:0] cl, input logic [2:0] t);
    if (cl != MY_CL) return 3;
    case (t)
      3'd6: return 0;
      3'd7: return 1;
      3'd5: return 2;
      3'd4: return (from == 0) ? 1 : 3;
      3'd3: return (from == 0) ? 2 : 3;
      default: return 3;
    endcase
  endfunction

  // Scoreboard keyed by a 16-bit id in the payload.
  int     exp_port [int];
  longint acc_cyc  [int];
  int     last_port, last_lat, delivered = 0, accepted = 0;
  int     next_id = 0;

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 4; i++) if (in_valid[i] && in_ready[i]) begin
      int id;
      id = int'(in_pkt[i].payload[15:0]);
      exp_port[id] = expect_out(i, in_pkt[i].hdr.cluster, in_pkt[i].hdr.tile);
      acc_cyc[id]  = cyc;
      accepted++;
    end
    for (int o = 0; o < 4; o++) if (out_valid[o] && out_ready[o]) begin
      int id;
      id = int'(out_pkt[o].payload[15:0]);
      check(exp_port.exists(id), $sformatf("unknown or repeated packet %0d on output %0d", id, o));
      if (exp_port.exists(id)) begin
        check(o == exp_port[id] || (o == 3 && (exp_port[id] == 1 || exp_port[id] == 2)),
              $sformatf("packet %0d on output %0d, expected %0d", id, o, exp_port[id]));
        last_port = o;
        last_lat  = int'(cyc - acc_cyc[id]);
        exp_port.delete(id);
      end
      delivered++;
    end
  end

  function automatic nova_pkt_t mk(input logic [2:0] cl, input logic [2:0] t);
    nova_pkt_t p;
    p.hdr.cluster = cl;
    p.hdr.tile    = t;
    p.hdr.aux     = 2'($urandom);
    p.payload     = {8'($urandom), 16'(next_id)};
    next_id++;
    return p;
  endfunction

  initial begin
    for (int i = 0; i < 4; i++) begin
      in_valid[i] = 1'b0; in_pkt[i] = '0; out_ready[i] = 1'b1;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // every input, every destination tile, this and another cluster
    for (int i = 0; i < 4; i++)
      for (int c = 0; c < 2; c++)
        for (int t = 0; t < 8; t++) begin
          logic [2:0] cl;
          int d0;
          cl = (c == 0) ? MY_CL : 3'd5;
          d0 = delivered;
          @(negedge clk) begin in_pkt[i] = mk(cl, 3'(t)); in_valid[i] = 1'b1; end
          @(negedge clk) in_valid[i] = 1'b0;
          repeat (2) @(negedge clk);
          check(delivered == d0 + 1, $sformatf("input %0d dest %0d.%0d delivered", i, cl, t));
          check(last_port == expect_out(i, cl, 3'(t)),
                $sformatf("input %0d dest %0d.%0d on port %0d", i, cl, t, last_port));
          check(last_lat == 1, $sformatf("latency %0d, want 1", last_lat));
        end

    // CW link refuses: the next packet for tile 7 is diverted to the switch
    begin
      int f0;
      f0 = fallbacks;
      @(negedge clk) out_ready[1] = 1'b0;
      @(negedge clk) begin in_pkt[0] = mk(MY_CL, 3'd7); in_valid[0] = 1'b1; end
      @(negedge clk) in_valid[0] = 1'b0;
      repeat (2) @(negedge clk);
      check(last_port == 3, "packet for the busy CW neighbour went to the switch");
      check(fallbacks == f0 + 1, "fallback pulse seen");
      @(negedge clk) out_ready[1] = 1'b1;
      @(negedge clk) begin in_pkt[0] = mk(MY_CL, 3'd7); in_valid[0] = 1'b1; end
      @(negedge clk) in_valid[0] = 1'b0;
      repeat (2) @(negedge clk);
      check(last_port == 1, "CW link used again once free");
    end

    // a ring link moves one packet per clock: stream 100 packets to tile 7
    begin
      int a0;
      a0 = accepted;
      for (int n = 0; n < 100; n++) begin
        @(negedge clk) begin in_pkt[0] = mk(MY_CL, 3'd7); in_valid[0] = 1'b1; end
      end
      @(negedge clk) in_valid[0] = 1'b0;
      check(accepted - a0 == 100, $sformatf("stream: %0d of 100 accepted in 100 clocks", accepted - a0));
      repeat (3) @(negedge clk);
      check(exp_port.size() == 0, "stream fully delivered on the CW link");
    end

    // random traffic, random back-pressure
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 4; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          in_valid[i] = ($urandom % 2) != 0;
          in_pkt[i]   = mk(($urandom % 4 == 0) ? 3'd1 : MY_CL, 3'($urandom));
        end
        out_ready[i] = ($urandom % 3) != 0;
      end
    end
    @(negedge clk) for (int i = 0; i < 4; i++) begin in_valid[i] = 1'b0; out_ready[i] = 1'b1; end
    repeat (20) @(posedge clk);
    check(accepted == delivered, $sformatf("accepted %0d delivered %0d", accepted, delivered));
    check(exp_port.size() == 0, "no packet left behind");
    check(fallbacks > 1, "fallback happened under random traffic");
    $display("accepted=%0d fallbacks=%0d", accepted, fallbacks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
