// Internal pixel SRAM: DEPTH words of 32 bits (four pixels) with one read
// port and one write port, so one word can be read and another written in
// the same clock. The filter holds its working set of 4x4 blocks in two of
// these, interleaved in a checkerboard over the blocks of a macro-block, so
// that the two filter units can each fetch a block in the same clock without
// conflict. The 48-word depth and the one-read-one-write organisation follow
// the design description; the rest is this design's choice.
//
// Interface: rd_en/rd_addr present an address; rd_data holds the word one
// clock later (synchronous read, as in an SRAM macro) and keeps it until the
// next read. wr_en/wr_addr/wr_data write on the rising edge. A read of the
// address being written in the same clock returns the old word.
// Timing: read latency 1 clock, write latency 1 clock. No reset (memory);
// every word is written before it is read.
module dbf_sram
  import dbf_pkg::*;
#(
  parameter int unsigned DEPTH = 48,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output word_t         rd_data,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  word_t         wr_data
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) assert (rd_addr < AW'(DEPTH)) else $error("dbf_sram: read address out of range");
    if (wr_en) assert (wr_addr < AW'(DEPTH)) else $error("dbf_sram: write address out of range");
  end

endmodule
