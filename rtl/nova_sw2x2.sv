// nova_sw2x2: one 2x2 switching element of the Banyan switch.
//
// Each of the two inputs ends in its own packet queue. The packet at the head
// of a queue is steered by a single bit of its destination address, packet
// bit ROUTE_BIT: 0 sends it to output 0 (the upper output), 1 to output 1.
// No table or controller is involved; the address bit alone decides. When
// both heads want the same output, a round-robin arbiter for that output
// picks one and the other waits in its queue; two heads that want different
// outputs both pass in the same clock.
//
// Interface: valid/ready on every input and output. in_ready is "queue not
// full" (registered). out_valid and out_data come combinationally from the
// queue heads, and a head leaves its queue on the edge where its output's
// out_ready is high. A packet accepted at an input is offered at the output
// one clock later when there is no contention.
//
// The two input queues and the crossing paths are those of the switch
// structure; the queue depth and the round-robin rule are this design's
// choices.
module nova_sw2x2
  import nova_pkg::*;
#(
  parameter int unsigned DEPTH     = 4,
  parameter int unsigned ROUTE_BIT = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [1:0]       in_valid,
  output logic [1:0]       in_ready,
  input  logic [PKT_W-1:0] in_data  [2],
  output logic [1:0]       out_valid,
  input  logic [1:0]       out_ready,
  output logic [PKT_W-1:0] out_data [2]
);

  logic [1:0]       q_valid, q_pop;
  logic [PKT_W-1:0] q_data [2];
  logic [1:0]       req   [2];   // req[o][i]: head of queue i wants output o
  logic [1:0]       grant [2];   // grant[o][i]

  for (genvar i = 0; i < 2; i++) begin : g_q
    nova_fifo #(.WIDTH(PKT_W), .DEPTH(DEPTH)) u_q (
      .clk, .rst_n,
      .in_valid (in_valid[i]),
      .in_ready (in_ready[i]),
      .in_data  (in_data[i]),
      .out_valid(q_valid[i]),
      .out_ready(q_pop[i]),
      .out_data (q_data[i])
    );
  end

  for (genvar o = 0; o < 2; o++) begin : g_out
    for (genvar i = 0; i < 2; i++) begin : g_req
      assign req[o][i] = q_valid[i] && (q_data[i][ROUTE_BIT] == 1'(o));
    end

    nova_rr_arb #(.N(2)) u_arb (
      .clk, .rst_n,
      .req    (req[o]),
      .advance(out_ready[o]),
      .grant  (grant[o])
    );

    assign out_valid[o] = |req[o];
    assign out_data[o]  = grant[o][1] ? q_data[1] : q_data[0];
  end

  // A head is removed when the output it asked for accepts it.
  for (genvar i = 0; i < 2; i++) begin : g_pop
    assign q_pop[i] = (grant[0][i] && out_ready[0]) || (grant[1][i] && out_ready[1]);
  end

  // Each packet leaves on the output that its address bit names.
  for (genvar o = 0; o < 2; o++) begin : g_chk
    a_route: assert property (@(posedge clk) disable iff (!rst_n)
      out_valid[o] |-> out_data[o][ROUTE_BIT] == 1'(o));
  end

endmodule
