// nova_cluster: one NOVA cluster of eight tiles around a tile switch.
//
// The eight tile routers sit on a ring (tile order 0, 3, 5, 6, 7, 4, 2, 1
// clockwise, see nova_pkg). Each router's CW output feeds the CCW input of
// its clockwise neighbour and its CCW output feeds the CW input of its
// counter-clockwise neighbour, so every pair of adjacent tiles has one link
// in each direction. Every router's switch port connects to its own port of
// the tile switch, whose uplink is brought out to the cluster switch.
//
// The tiles' functions are outside the cluster: each tile's local inject
// and eject ports (inj_*, ej_*, indexed by tile number) are brought out.
// fallback[t] pulses when router t diverts a packet from a busy ring link to
// the switch.
//
// Interface: valid/ready on every port. A packet to a ring neighbour is
// ejected two clocks after it is injected (one queue per router it enters);
// through the tile switch it takes the two router queues plus the three
// Banyan columns, five clocks, when nothing blocks it.
//
// The arrangement of tiles, the ring of neighbour links and the central tile
// switch follow the NOVA cluster; the direction naming is this design's.
module nova_cluster
  import nova_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CLUSTER_W-1:0] cluster_id,
  // tile functions, indexed by tile number
  input  logic                 inj_valid [TILES_PER_CLUSTER],
  output logic                 inj_ready [TILES_PER_CLUSTER],
  input  nova_pkt_t            inj_pkt   [TILES_PER_CLUSTER],
  output logic                 ej_valid  [TILES_PER_CLUSTER],
  input  logic                 ej_ready  [TILES_PER_CLUSTER],
  output nova_pkt_t            ej_pkt    [TILES_PER_CLUSTER],
  output logic [TILES_PER_CLUSTER-1:0] fallback,
  // uplink to and from the cluster switch
  output logic                 up_out_valid,
  input  logic                 up_out_ready,
  output nova_pkt_t            up_out_pkt,
  input  logic                 up_in_valid,
  output logic                 up_in_ready,
  input  nova_pkt_t            up_in_pkt
);

  localparam int unsigned NT = TILES_PER_CLUSTER;

  // Router port signals, [tile][port].
  logic      r_in_valid  [NT][4];
  logic      r_in_ready  [NT][4];
  nova_pkt_t r_in_pkt    [NT][4];
  logic      r_out_valid [NT][4];
  logic      r_out_ready [NT][4];
  nova_pkt_t r_out_pkt   [NT][4];

  // Tile switch port signals.
  logic      s_in_valid  [NT];
  logic      s_in_ready  [NT];
  nova_pkt_t s_in_pkt    [NT];
  logic      s_out_valid [NT];
  logic      s_out_ready [NT];
  nova_pkt_t s_out_pkt   [NT];

  for (genvar t = 0; t < NT; t++) begin : g_tile
    localparam logic [TILE_W-1:0] CW_T  = ring_tile(ring_pos(TILE_W'(t)) + 3'd1);
    localparam logic [TILE_W-1:0] CCW_T = ring_tile(ring_pos(TILE_W'(t)) - 3'd1);

    nova_tile_router #(.FIFO_DEPTH(FIFO_DEPTH)) u_router (
      .clk, .rst_n,
      .cluster_id,
      .tile_id  (TILE_W'(t)),
      .in_valid (r_in_valid[t]),
      .in_ready (r_in_ready[t]),
      .in_pkt   (r_in_pkt[t]),
      .out_valid(r_out_valid[t]),
      .out_ready(r_out_ready[t]),
      .out_pkt  (r_out_pkt[t]),
      .fallback (fallback[t])
    );

    // local port
    assign r_in_valid[t][PORT_LOCAL]  = inj_valid[t];
    assign r_in_pkt[t][PORT_LOCAL]    = inj_pkt[t];
    assign inj_ready[t]               = r_in_ready[t][PORT_LOCAL];
    assign ej_valid[t]                = r_out_valid[t][PORT_LOCAL];
    assign ej_pkt[t]                  = r_out_pkt[t][PORT_LOCAL];
    assign r_out_ready[t][PORT_LOCAL] = ej_ready[t];

    // ring: my CW output enters my CW neighbour from its CCW side, and the
    // other way round
    assign r_in_valid[CW_T][PORT_CCW]  = r_out_valid[t][PORT_CW];
    assign r_in_pkt[CW_T][PORT_CCW]    = r_out_pkt[t][PORT_CW];
    assign r_out_ready[t][PORT_CW]     = r_in_ready[CW_T][PORT_CCW];
    assign r_in_valid[CCW_T][PORT_CW]  = r_out_valid[t][PORT_CCW];
    assign r_in_pkt[CCW_T][PORT_CW]    = r_out_pkt[t][PORT_CCW];
    assign r_out_ready[t][PORT_CCW]    = r_in_ready[CCW_T][PORT_CW];

    // switch port
    assign s_in_valid[t]               = r_out_valid[t][PORT_SWITCH];
    assign s_in_pkt[t]                 = r_out_pkt[t][PORT_SWITCH];
    assign r_out_ready[t][PORT_SWITCH] = s_in_ready[t];
    assign r_in_valid[t][PORT_SWITCH]  = s_out_valid[t];
    assign r_in_pkt[t][PORT_SWITCH]    = s_out_pkt[t];
    assign s_out_ready[t]              = r_in_ready[t][PORT_SWITCH];
  end

  nova_tile_switch #(.FIFO_DEPTH(FIFO_DEPTH)) u_switch (
    .clk, .rst_n,
    .cluster_id,
    .tile_in_valid (s_in_valid),
    .tile_in_ready (s_in_ready),
    .tile_in_pkt   (s_in_pkt),
    .tile_out_valid(s_out_valid),
    .tile_out_ready(s_out_ready),
    .tile_out_pkt  (s_out_pkt),
    .up_out_valid,
    .up_out_ready,
    .up_out_pkt,
    .up_in_valid,
    .up_in_ready,
    .up_in_pkt
  );

endmodule
