// tb_nova_tile_switch: self-checking test of the tile switch of cluster 3.
//
// Reference rule: a packet from a tile addressed to cluster 3 leaves on the
// tile port named by its tile field, three clocks after it was accepted; a
// packet for any other cluster leaves on the uplink; a packet arriving on the
// uplink leaves on the tile port its tile field names. Checks every tile to
// every tile and to the uplink in isolation, then random traffic from all
// eight tiles and the uplink at once with random back-pressure (no loss, no
// duplicate, right port), and that the uplink arbiter and the egress merge
// both saw contention.
module tb_nova_tile_switch;
  import nova_pkg::*;
  localparam int unsigned NT = 8;
  localparam logic [2:0] MY_CL = 3'd3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic      tile_in_valid [NT], tile_in_ready [NT], tile_out_valid [NT], tile_out_ready [NT];
  nova_pkt_t tile_in_pkt [NT], tile_out_pkt [NT];
  logic      up_out_valid, up_out_ready, up_in_valid, up_in_ready;
  nova_pkt_t up_out_pkt, up_in_pkt;
  int checks = 0, failures = 0;
  int up_contention = 0, merge_contention = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  nova_tile_switch dut (.clk, .rst_n, .cluster_id(MY_CL), .*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  // expected exit: 0..7 tile port, 8 uplink
  int     exp_port [int];
  longint acc_cyc  [int];
  int     accepted = 0, delivered = 0, last_port, last_lat, next_id = 0;

  function automatic int expect_port(input nova_pkt_t p);
    return (p.hdr.cluster == MY_CL) ? int'(p.hdr.tile) : 8;
  endfunction

  task automatic note_out(input int port, input nova_pkt_t p);
    int id;
    id = int'(p.payload[15:0]);
    check(exp_port.exists(id), $sformatf("unknown or repeated packet %0d on port %0d", id, port));
    if (exp_port.exists(id)) begin
      check(exp_port[id] == port, $sformatf("packet %0d on port %0d, expected %0d", id, port, exp_port[id]));
      last_lat = int'(cyc - acc_cyc[id]);
      exp_port.delete(id);
    end
    last_port = port;
    delivered++;
  endtask

  always @(posedge clk) if (rst_n) begin
    int nup;
    nup = 0;
    for (int t = 0; t < NT; t++) if (tile_in_valid[t] && tile_in_ready[t]) begin
      exp_port[int'(tile_in_pkt[t].payload[15:0])] = expect_port(tile_in_pkt[t]);
      acc_cyc[int'(tile_in_pkt[t].payload[15:0])]  = cyc;
      accepted++;
    end
    if (up_in_valid && up_in_ready) begin
      exp_port[int'(up_in_pkt.payload[15:0])] = int'(up_in_pkt.hdr.tile);
      acc_cyc[int'(up_in_pkt.payload[15:0])]  = cyc;
      accepted++;
    end
    for (int t = 0; t < NT; t++) if (tile_out_valid[t] && tile_out_ready[t]) note_out(t, tile_out_pkt[t]);
    if (up_out_valid && up_out_ready) note_out(8, up_out_pkt);
    for (int t = 0; t < NT; t++) if (tile_in_valid[t] && tile_in_pkt[t].hdr.cluster != MY_CL) nup++;
    if (nup > 1) up_contention++;
    for (int t = 0; t < NT; t++)
      if (dut.b_out_valid[t] && up_in_valid && up_in_pkt.hdr.tile == 3'(t)) merge_contention++;
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
    for (int t = 0; t < NT; t++) begin
      tile_in_valid[t] = 1'b0; tile_in_pkt[t] = '0; tile_out_ready[t] = 1'b1;
    end
    up_in_valid = 1'b0; up_in_pkt = '0; up_out_ready = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // isolated packets: each tile to each tile of this cluster and to cluster 6
    for (int s = 0; s < NT; s++)
      for (int d = 0; d <= NT; d++) begin
        int d0;
        d0 = delivered;
        @(negedge clk) begin
          tile_in_pkt[s]   = (d < NT) ? mk(MY_CL, 3'(d)) : mk(3'd6, 3'(s));
          tile_in_valid[s] = 1'b1;
        end
        @(negedge clk) tile_in_valid[s] = 1'b0;
        repeat (4) @(negedge clk);
        check(delivered == d0 + 1, $sformatf("tile %0d to %0d delivered", s, d));
        check(last_port == d, $sformatf("tile %0d to %0d left on %0d", s, d, last_port));
        if (d < NT) check(last_lat == 3, $sformatf("tile to tile latency %0d, want 3", last_lat));
      end

    // isolated packets from the uplink to each tile
    for (int d = 0; d < NT; d++) begin
      @(negedge clk) begin up_in_pkt = mk(MY_CL, 3'(d)); up_in_valid = 1'b1; end
      @(posedge clk);
      check(up_in_ready && tile_out_valid[d], $sformatf("uplink to tile %0d passes in the same clock", d));
      @(negedge clk) up_in_valid = 1'b0;
      check(last_port == d, $sformatf("uplink packet left on %0d, want %0d", last_port, d));
    end

    // random traffic everywhere
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int t = 0; t < NT; t++) begin
        if (!tile_in_valid[t] || tile_in_ready[t]) begin
          tile_in_valid[t] = ($urandom % 2) != 0;
          tile_in_pkt[t]   = mk(($urandom % 3 == 0) ? 3'($urandom) : MY_CL, 3'($urandom));
        end
        tile_out_ready[t] = ($urandom % 4) != 0;
      end
      if (!up_in_valid || up_in_ready) begin
        up_in_valid = ($urandom % 2) != 0;
        up_in_pkt   = mk(MY_CL, 3'($urandom));
      end
      up_out_ready = ($urandom % 3) != 0;
    end
    @(negedge clk) begin
      for (int t = 0; t < NT; t++) begin tile_in_valid[t] = 1'b0; tile_out_ready[t] = 1'b1; end
      up_in_valid = 1'b0; up_out_ready = 1'b1;
    end
    repeat (40) @(posedge clk);
    check(accepted == delivered, $sformatf("accepted %0d delivered %0d", accepted, delivered));
    check(exp_port.size() == 0, "no packet left behind");
    check(up_contention > 0, "several tiles competed for the uplink");
    check(merge_contention > 0, "uplink and Banyan competed for a tile port");
    $display("accepted=%0d up_contention=%0d merge_contention=%0d", accepted, up_contention, merge_contention);
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
