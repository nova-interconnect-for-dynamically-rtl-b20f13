// nova_tb_top_probe: bound into nova_top by the end-to-end testbench. Counts
// clocks in which a cluster switch input refuses an offered packet.
module nova_tb_top_probe
  import nova_pkg::*;
(
  input logic clk,
  input logic rst_n,
  input logic cs_in_valid [8],
  input logic cs_in_ready [8]
);
  always @(posedge clk) if (rst_n)
    for (int c = 0; c < 8; c++)
      if (cs_in_valid[c] && !cs_in_ready[c]) nova_tb_pkg::cs_block++;
endmodule
