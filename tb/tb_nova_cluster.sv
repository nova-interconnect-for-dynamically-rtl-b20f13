// tb_nova_cluster: self-checking test of one cluster (eight tile routers on
// the ring plus the tile switch), driven by nova_tb_env configured for a
// single cluster: latency of every intra-cluster path kind from every tile
// (1 clock to itself, 2 to a ring neighbour, 3 to a two-hop neighbour, 5
// through the tile switch), an intra-cluster burst that forces diversions
// from full ring links, and random traffic, all against a scoreboard. The
// uplink is left unconnected and must never be offered a packet, since all
// traffic stays in the cluster.
module tb_nova_cluster;
  import nova_pkg::*;
  localparam int unsigned NT = 8;

  logic          clk, rst_n, done;
  logic          inj_valid [NT], inj_ready [NT], ej_valid [NT], ej_ready [NT];
  nova_pkt_t     inj_pkt [NT], ej_pkt [NT];
  logic [NT-1:0] fallback;
  logic          up_out_valid, up_in_ready;
  nova_pkt_t     up_out_pkt;
  int            checks, failures, leaks = 0;
  int            cycles = 0;

  nova_cluster dut (
    .clk, .rst_n, .cluster_id(3'd0),
    .inj_valid, .inj_ready, .inj_pkt, .ej_valid, .ej_ready, .ej_pkt, .fallback,
    .up_out_valid, .up_out_ready(1'b1), .up_out_pkt,
    .up_in_valid(1'b0), .up_in_ready, .up_in_pkt('0));

  nova_tb_env #(.NUM_CLUSTERS(1), .PKTS(200)) env (.*, .start(1'b1));

  bind nova_cluster nova_tb_cluster_probe u_probe (
    .clk, .rst_n, .r_out_valid, .r_out_ready, .r_out_pkt, .s_in_valid, .s_in_pkt, .cluster_id);

  always @(posedge clk) begin
    cycles++;
    if (rst_n && up_out_valid) leaks++;
  end

  initial begin
    @(posedge clk);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + ((leaks != 0) ? 1 : 0));
    $finish;
  end

  initial begin
    wait (cycles == 200000);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
