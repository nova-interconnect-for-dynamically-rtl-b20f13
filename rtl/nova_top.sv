// nova_top: the NOVA network, NUM_CLUSTERS clusters joined by a cluster switch.
//
// Each cluster (nova_cluster) holds eight tiles on a ring around a tile
// switch. Cluster c's tile switch uplink connects to port c of the cluster
// switch, an 8x8 Banyan identical to the one inside each tile switch but
// steering on the destination cluster number. Traffic between clusters always
// goes tile -> tile switch -> cluster switch -> tile switch -> tile; there are
// no direct links between clusters. With NUM_CLUSTERS = 1 there is no cluster
// switch: the network is the single eight-tile cluster.
//
// Ports: every tile's local inject and eject port, indexed by global tile
// number 8*cluster + tile, with valid/ready. A packet's header names the
// destination cluster and tile (nova_pkg). Cluster switch ports without a
// cluster (c >= NUM_CLUSTERS) are left idle, and packets addressed to a
// missing cluster are consumed there and lost. fallback[g] pulses when tile
// g's router sends a packet to the switch because the ring link it wanted
// was full. The tile functions, reconfigurable logic regions that attach to
// these ports, and the two processors that manage and use the network are not
// part of this RTL.
//
// Latency without contention, from the clock edge that accepts a packet at
// an inject port to the edge that takes it at the eject port: one clock to
// the tile itself, two to a ring neighbour, three to a two-hop neighbour,
// and five through a switch, within the cluster (inject queue, three Banyan
// columns, switch-port queue) or to another cluster (inject queue, three
// cluster switch columns, switch-port queue; the uplink split and merge in
// the tile switches add no clock).
//
// The hierarchy of eight clusters of eight tiles around a central cluster
// switch, and switch-only traffic between clusters, follow the NOVA network;
// the queue depth is this design's choice.
module nova_top
  import nova_pkg::*;
#(
  parameter int unsigned NUM_CLUSTERS = 8,
  parameter int unsigned FIFO_DEPTH   = 4,
  localparam int unsigned NUM_TILES   = NUM_CLUSTERS * TILES_PER_CLUSTER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 inj_valid [NUM_TILES],
  output logic                 inj_ready [NUM_TILES],
  input  nova_pkt_t            inj_pkt   [NUM_TILES],
  output logic                 ej_valid  [NUM_TILES],
  input  logic                 ej_ready  [NUM_TILES],
  output nova_pkt_t            ej_pkt    [NUM_TILES],
  output logic [NUM_TILES-1:0] fallback
);

  localparam int unsigned NT = TILES_PER_CLUSTER;
  localparam int unsigned NP = 2**CLUSTER_W;   // cluster switch ports

  // cluster switch port signals
  logic             cs_in_valid  [NP];
  logic             cs_in_ready  [NP];
  logic [PKT_W-1:0] cs_in_data   [NP];
  logic             cs_out_valid [NP];
  logic             cs_out_ready [NP];
  logic [PKT_W-1:0] cs_out_data  [NP];

  for (genvar c = 0; c < NP; c++) begin : g_cl
    if (c < NUM_CLUSTERS) begin : g_on
      logic      c_inj_valid [NT];
      logic      c_inj_ready [NT];
      nova_pkt_t c_inj_pkt   [NT];
      logic      c_ej_valid  [NT];
      logic      c_ej_ready  [NT];
      nova_pkt_t c_ej_pkt    [NT];
      nova_pkt_t c_up_out_pkt;

      for (genvar t = 0; t < NT; t++) begin : g_t
        assign c_inj_valid[t]      = inj_valid[c*NT+t];
        assign c_inj_pkt[t]        = inj_pkt[c*NT+t];
        assign inj_ready[c*NT+t]   = c_inj_ready[t];
        assign ej_valid[c*NT+t]    = c_ej_valid[t];
        assign ej_pkt[c*NT+t]      = c_ej_pkt[t];
        assign c_ej_ready[t]       = ej_ready[c*NT+t];
      end

      nova_cluster #(.FIFO_DEPTH(FIFO_DEPTH)) u_cluster (
        .clk, .rst_n,
        .cluster_id  (CLUSTER_W'(c)),
        .inj_valid   (c_inj_valid),
        .inj_ready   (c_inj_ready),
        .inj_pkt     (c_inj_pkt),
        .ej_valid    (c_ej_valid),
        .ej_ready    (c_ej_ready),
        .ej_pkt      (c_ej_pkt),
        .fallback    (fallback[c*NT +: NT]),
        .up_out_valid(cs_in_valid[c]),
        .up_out_ready(cs_in_ready[c]),
        .up_out_pkt  (c_up_out_pkt),
        .up_in_valid (cs_out_valid[c]),
        .up_in_ready (cs_out_ready[c]),
        .up_in_pkt   (nova_pkt_t'(cs_out_data[c]))
      );
      assign cs_in_data[c] = c_up_out_pkt;
    end else begin : g_off
      assign cs_in_valid[c]  = 1'b0;
      assign cs_in_data[c]   = '0;
      assign cs_out_ready[c] = 1'b1;
    end
  end

  if (NUM_CLUSTERS > 1) begin : g_cs
    nova_banyan #(
      .STAGES    (CLUSTER_W),
      .ROUTE_LSB (PAYLOAD_W + AUX_W + TILE_W),
      .FIFO_DEPTH(FIFO_DEPTH)
    ) u_cluster_switch (
      .clk, .rst_n,
      .in_valid (cs_in_valid),
      .in_ready (cs_in_ready),
      .in_data  (cs_in_data),
      .out_valid(cs_out_valid),
      .out_ready(cs_out_ready),
      .out_data (cs_out_data)
    );
  end else begin : g_no_cs
    // A single cluster has no cluster switch: its uplink is never offered
    // anything, and whatever it sends is consumed.
    for (genvar c = 0; c < NP; c++) begin : g_tie
      assign cs_in_ready[c]  = 1'b1;
      assign cs_out_valid[c] = 1'b0;
      assign cs_out_data[c]  = '0;
    end
  end

endmodule
