// nova_rr_arb: round-robin arbiter for N requesters.
//
// grant is one-hot (or zero when nothing requests) and is a combinational
// function of req and the stored pointer. The search for a winner starts at the
// requester just after the one that last completed a transfer, so every
// requester that keeps asking is served within N transfers. The pointer moves
// only on a clock edge where `advance` is high, i.e. when the granted request
// was actually accepted downstream; a grant that stalls keeps its priority.
// Reset gives requester 0 the first turn. Arbitration is not specified by the
// NOVA description; round-robin is this design's choice throughout.
module nova_rr_arb #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last;   // index granted in the last accepted transfer
  logic [IW-1:0] win;
  logic          any;

  always_comb begin
    win = last;
    any = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last) + k) % N);
      if (!any && req[idx]) begin
        any = 1'b1;
        win = IW'(idx);
      end
    end
    grant = '0;
    if (any) grant[win] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             last <= IW'(N - 1);
    else if (advance && any) last <= win;
  end

endmodule
