// nova_fifo: packet queue with valid/ready on both sides.
//
// Every link in the network ends in a queue: the inputs of each 2x2 Banyan
// element and the link inputs of each tile. This is a plain synchronous FIFO
// of DEPTH entries held in registers. A word offered with in_valid is written
// on the clock edge where in_ready is high; in_ready is simply "not full", a
// registered signal, so the ready path never loops back through logic. The
// head entry is shown combinationally on out_data with out_valid = "not
// empty" and leaves on the edge where out_ready is high. A word written into
// an empty FIFO is therefore visible at the output one clock later. Push and
// pop may happen in the same clock, except that a full FIFO refuses a write
// even while it is being read; that keeps in_ready independent of out_ready.
//
// The queue itself is drawn in the switch structure; its depth is not given
// and defaults to four entries. Reset empties the queue.
module nova_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             push, pop;

  assign in_ready  = (count != (AW+1)'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      unique case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // The FIFO never holds more than DEPTH entries.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= (AW+1)'(DEPTH));

endmodule
