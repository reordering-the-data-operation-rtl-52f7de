// Transpose array: a 4x4 array of 8-bit pixel registers that can be written
// and read a row at a time or a column at a time over a 32-bit bus. Writing a
// block by rows and reading it by columns transposes it (the form the filter
// units need for vertical filtering across horizontal edges), writing by
// columns and reading by rows transposes it back, and writing and reading in
// the same direction simply holds it. Four of these make up the transpose
// buffer of the filter. The array of pixel registers and the 32-bit row/column
// access follow the design description; the row/column select signals are
// this design's choice.
//
// Interface: rd_idx/rd_col select the row (rd_col = 0) or column (rd_col = 1)
// presented on rd_data, pixel 0 being the leftmost (topmost). wr_en writes
// wr_data into row or column wr_idx, chosen by wr_col.
// Timing: combinational read, write on the rising edge; reading and writing
// the same line in one clock returns the old contents. Synchronous reset
// clears the array.
module transpose_array
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       wr_en,
  input  logic       wr_col,
  input  logic [1:0] wr_idx,
  input  word_t      wr_data,
  input  logic       rd_col,
  input  logic [1:0] rd_idx,
  output word_t      rd_data
);

  pix_t px [4][4];   // px[row][column]

  always_comb begin
    for (int k = 0; k < 4; k++)
      rd_data[8*k +: 8] = rd_col ? px[k][rd_idx] : px[rd_idx][k];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < 4; r++)
        for (int c = 0; c < 4; c++) px[r][c] <= '0;
    end else if (wr_en) begin
      for (int k = 0; k < 4; k++) begin
        if (wr_col) px[k][wr_idx] <= wr_data[8*k +: 8];
        else        px[wr_idx][k] <= wr_data[8*k +: 8];
      end
    end
  end

endmodule
