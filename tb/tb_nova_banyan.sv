// tb_nova_banyan: self-checking test of the 8x8 Banyan switch.
//
// Checks, against a reference model of the routing rule (output port =
// destination number in packet bits [ROUTE_LSB +: 3]):
//  * an isolated packet from every input to every output arrives at the right
//    output, three clocks after the input accepted it;
//  * with input i sending to the bit-reversal of i, a pattern that never
//    makes two packets meet at an element output, all eight ports move one
//    packet per clock;
//  * under random traffic and random back-pressure no packet is lost or
//    misdelivered and packets between one input/output pair keep their order.
module tb_nova_banyan;
  import nova_pkg::*;
  localparam int unsigned STAGES = 3;
  localparam int unsigned N = 2**STAGES;
  localparam int unsigned RL = 29;

  logic clk = 1'b0, rst_n = 1'b0;
  logic             in_valid [N], in_ready [N], out_valid [N], out_ready [N];
  logic [PKT_W-1:0] in_data [N], out_data [N];
  int checks = 0, failures = 0;
  int sent = 0, rcvd = 0, blocked = 0;
  int next_seq [N][N];
  int seq_gen  [N][N];
  longint cyc = 0;
  longint acc_time [N][N];   // clock of acceptance of the last packet per pair

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  nova_banyan dut (.*);   // defaults: 8 ports, cluster field at bit 29

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  function automatic logic [PKT_W-1:0] mk(input int src, input int dst, input int seq);
    logic [PKT_W-1:0] p;
    p = $urandom;
    p[RL +: STAGES] = STAGES'(dst);
    p[23:16] = 8'(src);
    p[15:0]  = 16'(seq);
    return p;
  endfunction

  int last_latency;

  function automatic int bitrev(input int v);
    int r;
    r = 0;
    for (int b = 0; b < int'(STAGES); b++) if (v[b]) r |= 1 << (STAGES - 1 - b);
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < N; i++) if (in_valid[i] && in_ready[i]) begin
      acc_time[i][int'(in_data[i][RL +: STAGES])] = cyc;
      seq_gen[i][int'(in_data[i][RL +: STAGES])]++;
      sent++;
    end
    for (int o = 0; o < N; o++) if (out_valid[o] && out_ready[o]) begin
      int src, seq;
      src = int'(out_data[o][23:16]);
      seq = int'(out_data[o][15:0]);
      check(int'(out_data[o][RL +: STAGES]) == o, $sformatf("packet for %0d left on %0d", out_data[o][RL +: STAGES], o));
      check(src < N && seq == next_seq[src][o], $sformatf("order src %0d out %0d seq %0d", src, o, seq));
      if (src < N) begin
        next_seq[src][o] = seq + 1;
        last_latency = int'(cyc - acc_time[src][o]);
      end
      rcvd++;
    end
    for (int i = 0; i < N; i++) if (in_valid[i] && !in_ready[i]) blocked++;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      in_valid[i] = 1'b0; in_data[i] = '0; out_ready[i] = 1'b1;
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // isolated packets: every input to every output
    for (int s = 0; s < N; s++) for (int d = 0; d < N; d++) begin
      int r0;
      @(negedge clk) begin in_data[s] = mk(s, d, seq_gen[s][d]); in_valid[s] = 1'b1; end
      @(negedge clk) in_valid[s] = 1'b0;
      r0 = rcvd;
      repeat (STAGES + 1) @(negedge clk);
      check(rcvd == r0 + 1, $sformatf("isolated packet %0d->%0d delivered", s, d));
      check(last_latency == int'(STAGES), $sformatf("latency %0d->%0d = %0d, want %0d", s, d, last_latency, STAGES));
    end

    // full rate, conflict-free pattern: input i to output bitrev(i)
    begin
      int s0, r0;
      s0 = sent;
      for (int n = 0; n < 100; n++) begin
        @(negedge clk);
        for (int i = 0; i < N; i++) begin
          in_data[i] = mk(i, bitrev(i), seq_gen[i][bitrev(i)]);
          in_valid[i] = 1'b1;
        end
      end
      @(negedge clk) for (int i = 0; i < N; i++) in_valid[i] = 1'b0;
      check(sent - s0 == 100 * N, $sformatf("full rate: %0d accepted in 100 clocks, want %0d", sent - s0, 100 * N));
      r0 = rcvd;
      repeat (10) @(posedge clk);
    end

    // random traffic, random back-pressure
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          // in_ready was sampled at the last edge; a held offer stays unchanged
          in_valid[i] = ($urandom % 3) != 0;
          in_data[i]  = mk(i, int'($urandom % N), 0);
          in_data[i][15:0] = 16'(seq_gen[i][int'(in_data[i][RL +: STAGES])]);
        end
        out_ready[i] = ($urandom % 4) != 0;
      end
    end
    @(negedge clk) for (int i = 0; i < N; i++) begin in_valid[i] = 1'b0; out_ready[i] = 1'b1; end
    repeat (40) @(posedge clk);
    check(sent == rcvd, $sformatf("sent %0d received %0d", sent, rcvd));
    check(blocked > 0, "back-pressure reached the inputs");
    $display("sent=%0d blocked=%0d", sent, blocked);
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
