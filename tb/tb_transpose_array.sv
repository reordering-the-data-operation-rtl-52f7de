// Self-checking test of the 4x4 transpose array.
//
// Writes random rows and columns and reads random rows and columns, checked
// against a 4x4 model kept here. Besides random traffic it writes whole
// blocks by rows and reads them by columns (and the reverse) and checks that
// the result is the transposed block. Counts row-write/column-read and
// column-write/row-read transposes and fails if either never happened.
//
// Row/column access is the architecture's; the port names and the combinational
// read are this design's own.
module tb_transpose_array;
  import dbf_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, wr_en, wr_col, rd_col;
  logic [1:0] wr_idx, rd_idx;
  word_t      wr_data, rd_data;

  transpose_array dut (.*);

  int model [4][4];   // [row][column]
  int checks = 0, failures = 0;
  int n_r2c = 0, n_c2r = 0;

  function automatic word_t model_read(bit col, int idx);
    word_t w;
    for (int k = 0; k < 4; k++) w[8*k +: 8] = 8'(col ? model[k][idx] : model[idx][k]);
    return w;
  endfunction

  task automatic check_read(bit col, int idx);
    rd_col = col; rd_idx = 2'(idx);
    #1;
    checks++;
    if (rd_data != model_read(col, idx)) begin
      failures++;
      if (failures < 10) $display("read %s %0d: got %h expected %h", col ? "col" : "row", idx,
                                  rd_data, model_read(col, idx));
    end
  endtask

  task automatic write(bit col, int idx, word_t d);
    @(negedge clk);
    wr_en = 1; wr_col = col; wr_idx = 2'(idx); wr_data = d;
    for (int k = 0; k < 4; k++)
      if (col) model[k][idx] = int'(d[8*k +: 8]); else model[idx][k] = int'(d[8*k +: 8]);
    @(posedge clk); #1;
    wr_en = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; wr_en = 0; wr_col = 0; wr_idx = 0; wr_data = '0; rd_col = 0; rd_idx = 0;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) model[r][c] = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int blk = 0; blk < 200; blk++) begin
      bit wcol;
      wcol = blk[0];
      for (int i = 0; i < 4; i++) write(wcol, i, $urandom);
      for (int i = 0; i < 4; i++) check_read(!wcol, i);
      for (int i = 0; i < 4; i++) check_read(wcol, i);
      if (wcol) n_c2r++; else n_r2c++;
    end
    for (int it = 0; it < 5000; it++) begin
      write($urandom_range(0, 1) != 0, int'($urandom_range(0, 3)), $urandom);
      check_read($urandom_range(0, 1) != 0, int'($urandom_range(0, 3)));
    end
    $display("row-in/column-out %0d, column-in/row-out %0d", n_r2c, n_c2r);
    checks++;
    if (n_r2c == 0 || n_c2r == 0) begin
      failures++;
      $display("a transpose direction was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
