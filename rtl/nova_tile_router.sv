// nova_tile_router: the communication side of one NOVA tile.
//
// A tile has three fixed link ports: one to each of its two ring neighbours
// (clockwise, CW, and counter-clockwise, CCW) and one to the cluster's tile
// switch, plus the local port through which the tile's own function injects
// and receives packets. Every input, the local inject included, ends in a
// FIFO. The router knows its own cluster and tile number and, through the ring
// order fixed in nova_pkg, its one-hop and two-hop neighbours. For the packet
// at the head of each input queue it picks one output:
//
//   destination is this tile                     -> local (eject)
//   destination is in another cluster            -> switch
//   destination is the CW (CCW) one-hop neighbour -> CW (CCW) link
//   destination is the CW (CCW) two-hop neighbour,
//     and the packet was injected here           -> CW (CCW) link; that
//                                                   neighbour forwards it
//   any other tile of this cluster               -> switch
//
// A packet that would take a neighbour link while that link is busy goes to
// the switch instead. A link counts as busy in a clock when it refused a
// transfer (the neighbour's input queue was full) in the clock before. This
// spreads traffic over both paths and gives every packet a way out of the
// ring, so the ring links cannot deadlock: the switch path ends at the
// destination's eject port and never feeds a ring link.
//
// Each output has a round-robin arbiter over the inputs that want it; a
// head leaves its queue in the clock its output is granted and ready. Outputs
// are combinational from the queue heads (valid/ready). An output's valid may
// drop without a transfer when the packet is diverted to the switch; all
// receivers are FIFOs, which accept or refuse per clock.
//
// Routing by destination with one- and two-hop neighbour knowledge and the
// FIFO links follow the NOVA tile description; the exact rule above, the
// fallback to the switch, the queues on every input and the round-robin
// arbitration are this design's choices. The busy flag is registered so that
// the route of a head never depends combinationally on a ready signal.
module nova_tile_router
  import nova_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CLUSTER_W-1:0] cluster_id,
  input  logic [TILE_W-1:0]    tile_id,
  // inputs, indexed by nova_port_e (local inject, CW, CCW, switch)
  input  logic                 in_valid [4],
  output logic                 in_ready [4],
  input  nova_pkt_t            in_pkt   [4],
  // outputs, indexed by nova_port_e (local eject, CW, CCW, switch)
  output logic                 out_valid [4],
  input  logic                 out_ready [4],
  output nova_pkt_t            out_pkt   [4],
  // one-clock pulse when a packet is diverted from a busy ring link to the switch
  output logic                 fallback
);

  logic      q_valid [4];
  logic      q_pop   [4];
  nova_pkt_t q_pkt   [4];
  logic [PKT_W-1:0] q_word [4];

  for (genvar i = 0; i < 4; i++) begin : g_q
    nova_fifo #(.WIDTH(PKT_W), .DEPTH(FIFO_DEPTH)) u_q (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_data  (in_pkt[i]),
      .out_valid(q_valid[i]),
      .out_ready(q_pop[i]),
      .out_data (q_word[i])
    );
    assign q_pkt[i] = nova_pkt_t'(q_word[i]);
  end

  // Congestion flags: a ring link that refused to accept in the last clock
  // (its receiving queue was full) counts as busy in this clock.
  logic cw_busy, ccw_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cw_busy  <= 1'b0;
      ccw_busy <= 1'b0;
    end else begin
      cw_busy  <= !out_ready[PORT_CW];
      ccw_busy <= !out_ready[PORT_CCW];
    end
  end

  // Route of each head.
  nova_port_e route [4];
  logic [3:0] diverted;

  always_comb begin
    logic [TILE_W-1:0] delta;
    for (int i = 0; i < 4; i++) begin
      delta       = ring_pos(q_pkt[i].hdr.tile) - ring_pos(tile_id);
      diverted[i] = 1'b0;
      if (q_pkt[i].hdr.cluster != cluster_id) begin
        route[i] = PORT_SWITCH;
      end else if (delta == 3'd0) begin
        route[i] = PORT_LOCAL;
      end else if (delta == 3'd1 || (delta == 3'd2 && i == int'(PORT_LOCAL))) begin
        route[i]    = cw_busy ? PORT_SWITCH : PORT_CW;
        diverted[i] = cw_busy;
      end else if (delta == 3'd7 || (delta == 3'd6 && i == int'(PORT_LOCAL))) begin
        route[i]    = ccw_busy ? PORT_SWITCH : PORT_CCW;
        diverted[i] = ccw_busy;
      end else begin
        route[i] = PORT_SWITCH;
      end
    end
  end

  // Per-output arbitration.
  logic [3:0] req   [4];   // req[o][i]
  logic [3:0] grant [4];   // grant[o][i]

  for (genvar o = 0; o < 4; o++) begin : g_out
    for (genvar i = 0; i < 4; i++) begin : g_req
      assign req[o][i] = q_valid[i] && (route[i] == nova_port_e'(o));
    end

    nova_rr_arb #(.N(4)) u_arb (
      .clk, .rst_n,
      .req    (req[o]),
      .advance(out_ready[o]),
      .grant  (grant[o])
    );

    assign out_valid[o] = |req[o];

    always_comb begin
      out_pkt[o] = q_pkt[0];
      for (int i = 1; i < 4; i++)
        if (grant[o][i]) out_pkt[o] = q_pkt[i];
    end
  end

  always_comb begin
    fallback = 1'b0;
    for (int i = 0; i < 4; i++) begin
      q_pop[i] = 1'b0;
      for (int o = 0; o < 4; o++)
        if (grant[o][i] && out_ready[o]) q_pop[i] = 1'b1;
      if (q_pop[i] && diverted[i]) fallback = 1'b1;
    end
  end

  // A packet is only ejected at the tile it is addressed to.
  a_eject_dest: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid[PORT_LOCAL] |-> (out_pkt[PORT_LOCAL].hdr.cluster == cluster_id &&
                               out_pkt[PORT_LOCAL].hdr.tile == tile_id));

endmodule
