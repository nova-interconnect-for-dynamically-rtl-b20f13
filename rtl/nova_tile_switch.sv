// nova_tile_switch: the switch at the centre of a NOVA cluster.
//
// The core is the same 8x8 Banyan switch that serves as the cluster switch
// (nova_banyan), here steering on the destination tile number. Port t on each
// side belongs to tile t. Around it sit the cluster's uplink paths:
//
//  * Ingress split: a packet from tile t whose destination cluster is this
//    cluster enters Banyan input t. A packet for another cluster goes to the
//    uplink instead; the eight tiles compete for the uplink through a
//    round-robin arbiter, and the winner is offered to the cluster switch.
//  * Egress merge: a packet arriving from the cluster switch is addressed to
//    one tile of this cluster. It shares that tile's port with Banyan output
//    t through a two-way round-robin arbiter.
//
// Interface: valid/ready everywhere. The uplink output (up_out_*) goes to one
// input of the cluster switch, the uplink input (up_in_*) comes from the
// matching cluster switch output. Latency through the Banyan is three clocks;
// the uplink split and merge add no clock.
//
// Using the Banyan of the central switch for the tile switch follows the
// NOVA description (both switches are the same). How the cluster's ninth
// connection, the uplink, joins the eight tile ports is not given; the split
// and merge above are this design's choice.
module nova_tile_switch
  import nova_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CLUSTER_W-1:0] cluster_id,
  // from the tiles
  input  logic                 tile_in_valid [TILES_PER_CLUSTER],
  output logic                 tile_in_ready [TILES_PER_CLUSTER],
  input  nova_pkt_t            tile_in_pkt   [TILES_PER_CLUSTER],
  // to the tiles
  output logic                 tile_out_valid [TILES_PER_CLUSTER],
  input  logic                 tile_out_ready [TILES_PER_CLUSTER],
  output nova_pkt_t            tile_out_pkt   [TILES_PER_CLUSTER],
  // to the cluster switch
  output logic                 up_out_valid,
  input  logic                 up_out_ready,
  output nova_pkt_t            up_out_pkt,
  // from the cluster switch
  input  logic                 up_in_valid,
  output logic                 up_in_ready,
  input  nova_pkt_t            up_in_pkt
);

  localparam int unsigned NT = TILES_PER_CLUSTER;

  logic             b_in_valid  [NT];
  logic             b_in_ready  [NT];
  logic [PKT_W-1:0] b_in_data   [NT];
  logic             b_out_valid [NT];
  logic             b_out_ready [NT];
  logic [PKT_W-1:0] b_out_data  [NT];

  logic [NT-1:0] is_local, up_req, up_grant;

  // Ingress split.
  for (genvar t = 0; t < NT; t++) begin : g_in
    assign is_local[t]   = (tile_in_pkt[t].hdr.cluster == cluster_id);
    assign b_in_valid[t] = tile_in_valid[t] && is_local[t];
    assign b_in_data[t]  = tile_in_pkt[t];
    assign up_req[t]     = tile_in_valid[t] && !is_local[t];
    assign tile_in_ready[t] = is_local[t] ? b_in_ready[t] : (up_grant[t] && up_out_ready);
  end

  nova_rr_arb #(.N(NT)) u_up_arb (
    .clk, .rst_n,
    .req    (up_req),
    .advance(up_out_ready),
    .grant  (up_grant)
  );

  assign up_out_valid = |up_req;
  always_comb begin
    up_out_pkt = tile_in_pkt[0];
    for (int t = 1; t < NT; t++)
      if (up_grant[t]) up_out_pkt = tile_in_pkt[t];
  end

  nova_banyan #(
    .STAGES    (TILE_W),
    .ROUTE_LSB (PAYLOAD_W + AUX_W),
    .FIFO_DEPTH(FIFO_DEPTH)
  ) u_banyan (
    .clk, .rst_n,
    .in_valid (b_in_valid),
    .in_ready (b_in_ready),
    .in_data  (b_in_data),
    .out_valid(b_out_valid),
    .out_ready(b_out_ready),
    .out_data (b_out_data)
  );

  // Egress merge.
  logic [NT-1:0] up_hit, up_win;
  for (genvar t = 0; t < NT; t++) begin : g_out
    logic [1:0] m_req, m_grant;   // bit 0: Banyan output, bit 1: uplink
    assign up_hit[t] = up_in_valid && (up_in_pkt.hdr.tile == TILE_W'(t));
    assign m_req     = {up_hit[t], b_out_valid[t]};

    nova_rr_arb #(.N(2)) u_merge (
      .clk, .rst_n,
      .req    (m_req),
      .advance(tile_out_ready[t]),
      .grant  (m_grant)
    );

    assign tile_out_valid[t] = |m_req;
    assign tile_out_pkt[t]   = m_grant[1] ? up_in_pkt : nova_pkt_t'(b_out_data[t]);
    assign b_out_ready[t]    = m_grant[0] && tile_out_ready[t];
    assign up_win[t]         = m_grant[1] && tile_out_ready[t];
  end

  // The uplink packet is taken when the tile it is addressed to takes it.
  assign up_in_ready = |up_win;

endmodule
