// tb_nova_sw2x2: self-checking test of one 2x2 switching element.
//
// Packets carry their input number and a sequence number in the payload;
// route bit 0 picks the output. Checks: each packet leaves on the output its
// route bit names, packets from one input to one output keep their order,
// nothing is lost, two heads for different outputs pass in the same clock,
// two heads for the same output are served one after the other, and an
// isolated packet crosses in one clock.
module tb_nova_sw2x2;
  import nova_pkg::*;
  localparam int unsigned RB = 26;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] in_valid = '0, in_ready, out_valid, out_ready = '0;
  logic [PKT_W-1:0] in_data [2], out_data [2];
  int checks = 0, failures = 0;
  int sent = 0, rcvd = 0, both_pass = 0, contended = 0;
  int next_seq [2][2];   // [input][output] expected sequence number

  always #5 clk = ~clk;

  nova_sw2x2 #(.DEPTH(4), .ROUTE_BIT(RB)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  function automatic logic [PKT_W-1:0] mk(input int src, input int dst, input int seq);
    logic [PKT_W-1:0] p;
    p = '0;
    p[RB] = 1'(dst);
    p[23:16] = 8'(src);
    p[15:0]  = 16'(seq);
    return p;
  endfunction

  int seq_gen [2][2];

  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < 2; o++) if (out_valid[o] && out_ready[o]) begin
      int src, seq;
      src = int'(out_data[o][23:16]);
      seq = int'(out_data[o][15:0]);
      check(out_data[o][RB] == 1'(o), "packet on the output its route bit names");
      check(src < 2 && seq == next_seq[src][o], $sformatf("order src %0d out %0d seq %0d", src, o, seq));
      if (src < 2) next_seq[src][o] = seq + 1;
      rcvd++;
    end
    if (out_valid == 2'b11 && out_ready == 2'b11) both_pass++;
    if (dut.req[0] == 2'b11 || dut.req[1] == 2'b11) contended++;
    for (int i = 0; i < 2; i++) if (in_valid[i] && in_ready[i]) sent++;
  end

  task automatic offer(input int i, input int dst);
    in_data[i]  = mk(i, dst, seq_gen[i][dst]);
    in_valid[i] = 1'b1;
  endtask

  initial begin
    in_data[0] = '0; in_data[1] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    out_ready = 2'b11;

    // isolated packet: accepted at an edge, offered right after it
    @(negedge clk) offer(0, 1);
    @(posedge clk) if (in_ready[0]) seq_gen[0][1]++;
    @(negedge clk) in_valid = '0;
    check(out_valid == 2'b10 && out_data[1][RB] == 1'b1, "one clock through the element");

    // random traffic with random back-pressure
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        if (!in_valid[i] || in_ready[i]) begin
          if ($urandom % 4 != 0) offer(i, int'($urandom % 2));
          else in_valid[i] = 1'b0;
        end
      end
      out_ready = 2'($urandom);
      @(posedge clk);
      for (int i = 0; i < 2; i++)
        if (in_valid[i] && in_ready[i]) seq_gen[i][int'(in_data[i][RB])]++;
    end
    @(negedge clk) begin in_valid = '0; out_ready = 2'b11; end
    repeat (20) @(posedge clk);
    check(sent == rcvd, $sformatf("sent %0d received %0d", sent, rcvd));
    check(both_pass > 0, "two packets passed in one clock");
    check(contended > 0, "contention for one output happened");
    $display("sent=%0d both_pass=%0d contended=%0d", sent, both_pass, contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
