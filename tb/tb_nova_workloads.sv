// tb_nova_workloads: the NOVA network in its smaller evaluated sizes, one
// cluster (8 tiles, no cluster switch) and four clusters (32 tiles), each
// driven in turn by nova_tb_env: path latencies, an intra-cluster burst, and
// random traffic with 10 %, 50 % and 90 % of packets crossing clusters. The
// average end-to-end delay of each phase is printed; the 64-tile network is
// covered by tb_nova_top.
module tb_nova_workloads;
  import nova_pkg::*;

  logic      clk8, rst8, done8;
  logic      inj_valid8 [8], inj_ready8 [8], ej_valid8 [8], ej_ready8 [8];
  nova_pkt_t inj_pkt8 [8], ej_pkt8 [8];
  logic [7:0] fb8;
  int        checks8, failures8;

  logic      clk32, rst32, done32;
  logic      inj_valid32 [32], inj_ready32 [32], ej_valid32 [32], ej_ready32 [32];
  nova_pkt_t inj_pkt32 [32], ej_pkt32 [32];
  logic [31:0] fb32;
  int        checks32, failures32;

  int cycles = 0;

  nova_top #(.NUM_CLUSTERS(1)) dut8 (
    .clk(clk8), .rst_n(rst8), .inj_valid(inj_valid8), .inj_ready(inj_ready8), .inj_pkt(inj_pkt8),
    .ej_valid(ej_valid8), .ej_ready(ej_ready8), .ej_pkt(ej_pkt8), .fallback(fb8));
  nova_tb_env #(.NUM_CLUSTERS(1), .PKTS(200)) env8 (
    .clk(clk8), .rst_n(rst8), .inj_valid(inj_valid8), .inj_ready(inj_ready8), .inj_pkt(inj_pkt8),
    .ej_valid(ej_valid8), .ej_ready(ej_ready8), .ej_pkt(ej_pkt8), .fallback(fb8),
    .start(1'b1), .done(done8), .checks(checks8), .failures(failures8));

  nova_top #(.NUM_CLUSTERS(4)) dut32 (
    .clk(clk32), .rst_n(rst32), .inj_valid(inj_valid32), .inj_ready(inj_ready32), .inj_pkt(inj_pkt32),
    .ej_valid(ej_valid32), .ej_ready(ej_ready32), .ej_pkt(ej_pkt32), .fallback(fb32));
  nova_tb_env #(.NUM_CLUSTERS(4), .PKTS(150)) env32 (
    .clk(clk32), .rst_n(rst32), .inj_valid(inj_valid32), .inj_ready(inj_ready32), .inj_pkt(inj_pkt32),
    .ej_valid(ej_valid32), .ej_ready(ej_ready32), .ej_pkt(ej_pkt32), .fallback(fb32),
    .start(done8), .done(done32), .checks(checks32), .failures(failures32));

  bind nova_cluster nova_tb_cluster_probe u_probe (
    .clk, .rst_n, .r_out_valid, .r_out_ready, .r_out_pkt, .s_in_valid, .s_in_pkt, .cluster_id);
  bind nova_top nova_tb_top_probe u_probe (.clk, .rst_n, .cs_in_valid, .cs_in_ready);

  always @(posedge clk8) cycles++;

  initial begin
    @(posedge clk8);
    wait (done8 && done32);
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks32, failures8 + failures32);
    $finish;
  end

  initial begin
    wait (cycles == 600000);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks8 + checks32, failures8 + failures32 + 1);
    $finish;
  end
endmodule
