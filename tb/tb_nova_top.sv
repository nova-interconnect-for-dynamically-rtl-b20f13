// tb_nova_top: end-to-end test of the NOVA network at its default size,
// eight clusters of eight tiles (64 tiles), driven by nova_tb_env: latency of
// every path kind from every tile, then random traffic with 10 %, 50 % and
// 90 % of packets crossing clusters, with a full scoreboard and a check that
// every mechanism of the network occurred.
module tb_nova_top;
  import nova_pkg::*;
  localparam int unsigned NT = 64;

  logic          clk, rst_n, done;
  logic          inj_valid [NT], inj_ready [NT], ej_valid [NT], ej_ready [NT];
  nova_pkt_t     inj_pkt [NT], ej_pkt [NT];
  logic [NT-1:0] fallback;
  int            checks, failures;
  int            cycles = 0;

  nova_top dut (.*);

  nova_tb_env #(.NUM_CLUSTERS(8), .PKTS(100)) env (.*, .start(1'b1));

  bind nova_cluster nova_tb_cluster_probe u_probe (
    .clk, .rst_n, .r_out_valid, .r_out_ready, .r_out_pkt, .s_in_valid, .s_in_pkt, .cluster_id);
  bind nova_top nova_tb_top_probe u_probe (.clk, .rst_n, .cs_in_valid, .cs_in_ready);

  always @(posedge clk) cycles++;

  initial begin
    @(posedge clk);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 400000);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
