// Data buffer: a first-in first-out store of DEPTH 32-bit words (one 4x4
// block of four rows or four columns by default). After a filter unit has
// filtered one edge of a block, the block goes into this buffer and comes
// back out, in the same order, as the p side of the next edge, so it need
// not be written to and re-read from the SRAM. A word may be pushed and
// another popped in the same clock, which lets one block stream out while the
// next streams in. The 4 x 32-bit size follows the design description; the
// push/pop handshake is this design's choice.
//
// Interface: head shows the oldest word (valid while !empty); pop removes it,
// push appends din. Pushing into a full buffer or popping an empty one is an
// error (checked by assertions).
// Timing: head is available combinationally; push and pop take effect on the
// rising edge. Synchronous active-high reset empties the buffer.
module data_fifo
  import dbf_pkg::*;
#(
  parameter int unsigned DEPTH = 4
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  push,
  input  word_t din,
  input  logic  pop,
  output word_t head,
  output logic  empty,
  output logic  full
);

  localparam int unsigned PW = $clog2(DEPTH);

  word_t mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [PW:0]   count;

  assign head  = mem[rd_ptr];
  assign empty = (count == 0);
  assign full  = (count == (PW+1)'(DEPTH));

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= inc(wr_ptr);
      end
      if (pop) rd_ptr <= inc(rd_ptr);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(pop && empty)) else $error("data_fifo: pop while empty");
      assert (!(push && full && !pop)) else $error("data_fifo: push while full");
    end
  end

endmodule
