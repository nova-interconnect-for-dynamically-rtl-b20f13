// nova_tb_cluster_probe: bound into each nova_cluster by the end-to-end
// testbench. Counts ring transfers whose packet is not for the receiving tile
// (the first leg of a two-hop route) and clocks in which several tiles of the
// cluster send to other clusters at once (uplink contention).
module nova_tb_cluster_probe
  import nova_pkg::*;
(
  input logic            clk,
  input logic            rst_n,
  input logic            r_out_valid [8][4],
  input logic            r_out_ready [8][4],
  input nova_pkt_t       r_out_pkt   [8][4],
  input logic            s_in_valid  [8],
  input nova_pkt_t       s_in_pkt    [8],
  input logic [2:0]      cluster_id
);
  localparam int RING [8] = '{0, 3, 5, 6, 7, 4, 2, 1};

  function automatic int idx(input int t);
    for (int p = 0; p < 8; p++) if (RING[p] == t) return p;
    return 0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int nup;
    nup = 0;
    for (int t = 0; t < 8; t++) begin
      if (r_out_valid[t][1] && r_out_ready[t][1] &&
          int'(r_out_pkt[t][1].hdr.tile) != RING[(idx(t) + 1) % 8]) nova_tb_pkg::ring_fwd++;
      if (r_out_valid[t][2] && r_out_ready[t][2] &&
          int'(r_out_pkt[t][2].hdr.tile) != RING[(idx(t) + 7) % 8]) nova_tb_pkg::ring_fwd++;
      if (s_in_valid[t] && s_in_pkt[t].hdr.cluster != cluster_id) nup++;
    end
    if (nup > 1) nova_tb_pkg::up_conflict++;
  end
endmodule
