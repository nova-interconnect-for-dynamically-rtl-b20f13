// tb_nova_fifo: self-checking test of the packet FIFO.
//
// Fills the FIFO with the reader stalled and checks that exactly DEPTH words
// are accepted, that in_ready then stays low, and that the words come out in
// order. Then runs random valid/ready traffic against a queue model, and
// checks that a word written into an empty FIFO is visible one clock later.
module tb_nova_fifo;
  localparam int unsigned W = 32;
  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0;
  logic [W-1:0] in_data = '0, out_data;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];

  always #5 clk = ~clk;

  nova_fifo dut (.*);   // defaults: 32 bits, 4 entries

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", msg, $time);
    end
  endtask

  // Scoreboard: every transfer on the output must match the model's head.
  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) model.push_back(in_data);
    if (out_valid && out_ready) begin
      check(model.size() > 0, "pop from empty model");
      if (model.size() > 0) check(out_data == model.pop_front(), "data order");
    end
  end

  initial begin
    int accepted;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // fill with the reader stalled
    accepted = 0;
    for (int i = 0; i < DEPTH + 3; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = 32'hA000_0000 + i;
      @(posedge clk);
      if (in_ready) accepted++;
    end
    @(negedge clk) in_valid = 1'b0;
    check(accepted == DEPTH, $sformatf("accepted %0d words when full, want %0d", accepted, DEPTH));
    check(!in_ready, "in_ready low when full");
    check(out_valid && out_data == 32'hA000_0000, "head is the first word");

    // drain
    out_ready = 1'b1;
    repeat (DEPTH + 2) @(posedge clk);
    @(negedge clk);
    check(!out_valid, "empty after drain");
    out_ready = 1'b0;

    // one-clock latency: write at an edge, visible after it
    @(negedge clk) begin in_valid = 1'b1; in_data = 32'h1234_5678; end
    @(negedge clk) in_valid = 1'b0;
    check(out_valid && out_data == 32'h1234_5678, "visible one clock after write");
    @(negedge clk) out_ready = 1'b1;
    @(negedge clk) out_ready = 1'b0;

    // random traffic
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      in_data   = $urandom;
      out_ready = ($urandom % 2) != 0;
    end
    @(negedge clk) begin in_valid = 1'b0; out_ready = 1'b1; end
    repeat (DEPTH + 2) @(posedge clk);
    check(model.size() == 0, "all words delivered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
