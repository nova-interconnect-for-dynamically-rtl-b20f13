// nova_banyan: self-routing Banyan switch with 2**STAGES ports (8 by default).
//
// The switch is STAGES columns of 2x2 queued elements (nova_sw2x2), 2**(STAGES-1)
// elements per column. Element k of a column owns wires 2k and 2k+1 on both
// sides. Between column s and column s+1 the wire number is rotated right by one
// bit over its lowest STAGES-s bits: for the 8-port switch, wire b2b1b0 out of
// the first column enters the second column on wire b0b2b1, and wire b2b1b0
// out of the second column enters the third on wire b2b0b1. With this wiring
// column s steers on destination bit STAGES-1-s (most significant bit first)
// and a packet leaves on the output port equal to its destination number,
// with no lookup table or control state machine.
//
// The destination number is packet bits [ROUTE_LSB +: STAGES]. The same
// switch serves as the cluster switch (routing on the cluster field) and,
// inside each tile switch, among the eight tiles (routing on the tile field).
//
// Interface: one valid/ready port per input and per output; in_ready is the
// registered "not full" of a first-column queue. Latency is one clock per
// column: a packet accepted at an input is offered at its output STAGES clocks
// later when nothing blocks it, and each port can move one packet per clock.
// Packets from one input to one output stay in order. When two packets need
// the same element output, one waits in its queue (internal blocking).
//
// The three columns of four elements and their wiring follow the central
// switch structure; queue depth and arbitration are this design's choices.
module nova_banyan
  import nova_pkg::*;
#(
  parameter int unsigned STAGES     = 3,
  parameter int unsigned ROUTE_LSB  = 29,
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid  [2**STAGES],
  output logic             in_ready  [2**STAGES],
  input  logic [PKT_W-1:0] in_data   [2**STAGES],
  output logic             out_valid [2**STAGES],
  input  logic             out_ready [2**STAGES],
  output logic [PKT_W-1:0] out_data  [2**STAGES]
);

  localparam int unsigned N = 2**STAGES;

  // Wire number on the input side of column s+1 for wire w leaving column s:
  // rotate the low (STAGES-s) bits of w right by one.
  function automatic int unsigned next_wire(input int unsigned s, input int unsigned w);
    int unsigned nb, low, high;
    nb   = STAGES - s;
    low  = w % (2**nb);
    high = w - low;
    return high + ((low >> 1) | ((low & 1) << (nb - 1)));
  endfunction

  // Signals on the input side (si_*) and output side (so_*) of each column.
  logic             si_valid [STAGES][N];
  logic             si_ready [STAGES][N];
  logic [PKT_W-1:0] si_data  [STAGES][N];
  logic             so_valid [STAGES][N];
  logic             so_ready [STAGES][N];
  logic [PKT_W-1:0] so_data  [STAGES][N];

  for (genvar s = 0; s < STAGES; s++) begin : g_col
    for (genvar k = 0; k < N/2; k++) begin : g_el
      logic [1:0]       e_in_valid, e_in_ready, e_out_valid, e_out_ready;
      logic [PKT_W-1:0] e_in_data  [2];
      logic [PKT_W-1:0] e_out_data [2];

      for (genvar p = 0; p < 2; p++) begin : g_p
        assign e_in_valid[p]       = si_valid[s][2*k+p];
        assign e_in_data[p]        = si_data[s][2*k+p];
        assign si_ready[s][2*k+p]  = e_in_ready[p];
        assign so_valid[s][2*k+p]  = e_out_valid[p];
        assign so_data[s][2*k+p]   = e_out_data[p];
        assign e_out_ready[p]      = so_ready[s][2*k+p];
      end

      nova_sw2x2 #(.DEPTH(FIFO_DEPTH), .ROUTE_BIT(ROUTE_LSB + STAGES - 1 - s)) u_sw (
        .clk, .rst_n,
        .in_valid (e_in_valid),
        .in_ready (e_in_ready),
        .in_data  (e_in_data),
        .out_valid(e_out_valid),
        .out_ready(e_out_ready),
        .out_data (e_out_data)
      );
    end

    // Inter-column wiring.
    if (s < STAGES - 1) begin : g_link
      for (genvar w = 0; w < N; w++) begin : g_w
        localparam int unsigned NW = next_wire(s, w);
        assign si_valid[s+1][NW] = so_valid[s][w];
        assign si_data[s+1][NW]  = so_data[s][w];
        assign so_ready[s][w]    = si_ready[s+1][NW];
      end
    end
  end

  for (genvar w = 0; w < N; w++) begin : g_io
    assign si_valid[0][w]        = in_valid[w];
    assign si_data[0][w]         = in_data[w];
    assign in_ready[w]           = si_ready[0][w];
    assign out_valid[w]          = so_valid[STAGES-1][w];
    assign out_data[w]           = so_data[STAGES-1][w];
    assign so_ready[STAGES-1][w] = out_ready[w];
  end

endmodule
