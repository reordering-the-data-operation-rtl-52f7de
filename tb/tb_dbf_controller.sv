// Self-checking test of the control unit on its own (no datapath).
//
// Starts several macro-blocks with random side information and watches the
// controller's outputs:
//   - done must come 397 clocks after start, busy must be high in between;
//   - every row of all 40 blocks must be requested from external memory
//     exactly once per MB, and every row of all 40 blocks written back exactly
//     once;
//   - the filter units must be enabled on exactly 192 lines per MB (8 luma
//     edges x 16 lines + 2 x 4 chroma edges x 8 lines);
//   - the boundary strengths they receive must add up, per MB, to the sum the
//     side information gives for those 192 lines (each luma Bs covers 4 lines,
//     each chroma line uses the Bs of the luma line pair it lies on);
//   - phase/step outputs must visit the three phases in order;
//   - ready must stay high, since MBs are started one at a time here (queued
//     starts are exercised by the end-to-end test).
// It counts MBs, two-unit clocks and data-buffer pops, and fails if one never
// happened.
//
// The figures checked (397 clocks, 160 words each way) follow from this
// design's schedule, not from the original architecture's 400-cycle budget.
module tb_dbf_controller;
  import dbf_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst, start, busy, ready, done, ext_rd_req;
  mb_info_t   mb;
  blk_t       ext_rd_blk;
  logic [1:0] ext_rd_row;
  logic [1:0] sram_rd_en;
  logic [1:0][5:0] sram_rd_addr;
  dp_ctrl_t   dp;
  logic [1:0] phase, step;
  logic [3:0] bcyc;

  dbf_controller dut (.*);

  localparam int NUM_MB = 8;
  localparam int MB_CYCLES = 397;

  int checks = 0, failures = 0;
  int n_mb = 0, n_two = 0, n_pop = 0;
  int rd_cnt [40][4], wr_cnt [40][4];
  int lines, bs_sum, cyc, max_phase;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int expected_bs_sum(mb_info_t m);
    int s = 0;
    for (int e = 0; e < 4; e++)
      for (int k = 0; k < 4; k++) s += 4 * (int'(m.bs_ve[e][k]) + int'(m.bs_he[e][k]));
    // chroma: edges 0 and 1 use luma edges 0 and 2; chroma line y uses luma
    // block 2k + (y%4)/2 of its block row k, i.e. each luma Bs covers 2 lines
    for (int e = 0; e < 2; e++)
      for (int k = 0; k < 4; k++) s += 2 * 2 * (int'(m.bs_ve[2*e][k]) + int'(m.bs_he[2*e][k]));
    return s;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst) begin
      if (ext_rd_req) rd_cnt[int'(ext_rd_blk)][int'(ext_rd_row)]++;
      if (dp.ext_wr)  wr_cnt[int'(dp.ext_wr_blk)][int'(dp.ext_wr_row)]++;
      for (int n = 0; n < 2; n++)
        if (dp.par[n].en) begin lines++; bs_sum += int'(dp.par[n].bs); end
      if (dp.par[0].en && dp.par[1].en) n_two++;
      if (dp.fifo_pop != 0) n_pop++;
      if (busy && int'(phase) > max_phase) max_phase = int'(phase);
      if (busy) check(int'(phase) >= max_phase, "phase went backwards");
    end
  end

  initial begin
    repeat (NUM_MB * (MB_CYCLES + 20) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; start = 0; mb = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int m = 0; m < NUM_MB; m++) begin
      mb_info_t info;
      for (int e = 0; e < 4; e++)
        for (int k = 0; k < 4; k++) begin
          info.bs_ve[e][k] = 3'($urandom_range(0, 4));
          info.bs_he[e][k] = 3'($urandom_range(0, 4));
        end
      for (int i = 0; i < 3; i++) begin
        info.qp_y[i] = 6'($urandom_range(0, 51));
        info.qp_cb[i] = 6'($urandom_range(0, 51));
        info.qp_cr[i] = 6'($urandom_range(0, 51));
      end
      info.offset_a = 5'($urandom_range(0, 24) - 12);
      info.offset_b = 5'($urandom_range(0, 24) - 12);
      for (int b = 0; b < 40; b++) for (int r = 0; r < 4; r++) begin rd_cnt[b][r] = 0; wr_cnt[b][r] = 0; end
      lines = 0; bs_sum = 0; max_phase = 0;
      @(negedge clk);
      check(!busy, "busy before start");
      start = 1; mb = info;
      @(negedge clk);
      start = 0; mb = '0;   // the controller must have latched the side information
      cyc = 1;
      while (!done && cyc < 2 * MB_CYCLES) begin
        check(busy, "busy dropped before done");
        check(ready, "ready low with no MB queued");
        @(negedge clk);
        cyc++;
      end
      check(cyc == MB_CYCLES, $sformatf("MB took %0d clocks, expected %0d", cyc, MB_CYCLES));
      @(negedge clk);   // let the last store of the execute stage be counted
      for (int b = 0; b < 40; b++)
        for (int r = 0; r < 4; r++) begin
          check(rd_cnt[b][r] == 1, $sformatf("block %0d row %0d read %0d times", b, r, rd_cnt[b][r]));
          check(wr_cnt[b][r] == 1, $sformatf("block %0d row %0d written %0d times", b, r, wr_cnt[b][r]));
        end
      check(lines == 192, $sformatf("%0d lines filtered, expected 192", lines));
      check(bs_sum == expected_bs_sum(info),
            $sformatf("Bs sum %0d, expected %0d", bs_sum, expected_bs_sum(info)));
      check(max_phase == 2, "chroma phase never reached");
      n_mb++;
    end
    $display("MBs %0d, clocks with both units filtering %0d, buffer pops %0d", n_mb, n_two, n_pop);
    check(n_mb == NUM_MB && n_two > 0 && n_pop > 0, "a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
