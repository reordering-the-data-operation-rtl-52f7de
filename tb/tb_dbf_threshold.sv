// Self-checking test of the threshold derivation.
//
// Applies random quantisation parameters, filter offsets (including ones that
// push the index below 0 and above 51) and boundary strengths, and compares
// alpha, beta and tC0 with the standard's tables held here as a separate copy
// and indexed with qPav = (qPp + qPq + 1) >> 1 and Clip3(0, 51, qPav + offset).
// Also walks every index 0..51 once with zero offsets and equal QPs. It
// counts clipped-low, clipped-high and in-range indices and fails if one of
// them never happened. The unit is combinational; the clock only paces it.
//
// The tables and index rule are the standard's; the sweep is this
// testbench's own.
module tb_dbf_threshold;
  import dbf_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  qp_t     qp_p, qp_q;
  offset_t offset_a, offset_b;
  bs_t     bs;
  pix_t    alpha, beta;
  logic [4:0] tc0;

  dbf_threshold dut (.*);

  int ALPHA [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,
                     32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  int BETA  [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,
                     9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  int TC0 [3][52] = '{
    '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13},
    '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17},
    '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25}};

  int checks = 0, failures = 0;
  int n_low = 0, n_high = 0, n_mid = 0;

  function automatic int clip_idx(int v);
    if (v < 0) begin n_low++; return 0; end
    if (v > 51) begin n_high++; return 51; end
    n_mid++;
    return v;
  endfunction

  task automatic apply(int qp, int qq, int oa, int ob, int b);
    int qpav, ia, ib, et;
    qp_p = 6'(qp); qp_q = 6'(qq); offset_a = 5'(oa); offset_b = 5'(ob); bs = 3'(b);
    qpav = (qp + qq + 1) >> 1;
    ia = clip_idx(qpav + oa);
    ib = clip_idx(qpav + ob);
    et = (b >= 1 && b <= 3) ? TC0[b-1][ia] : 0;
    @(posedge clk);
    checks++;
    if (int'(alpha) != ALPHA[ia] || int'(beta) != BETA[ib] || int'(tc0) != et) begin
      failures++;
      if (failures < 10)
        $display("mismatch qp %0d/%0d off %0d/%0d bs %0d: a %0d/%0d b %0d/%0d tc0 %0d/%0d",
                 qp, qq, oa, ob, b, alpha, ALPHA[ia], beta, BETA[ib], tc0, et);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 52; i++)
      for (int b = 0; b <= 4; b++) apply(i, i, 0, 0, b);
    for (int it = 0; it < 20000; it++)
      apply(int'($urandom_range(0, 51)), int'($urandom_range(0, 51)),
            int'($urandom_range(0, 24)) - 12, int'($urandom_range(0, 24)) - 12,
            int'($urandom_range(0, 4)));
    // extremes of the index range
    apply(0, 0, -12, -12, 1);
    apply(51, 51, 12, 12, 3);
    apply(51, 50, 12, -12, 2);
    $display("index below 0 %0d, above 51 %0d, in range %0d", n_low, n_high, n_mid);
    checks++;
    if (n_low == 0 || n_high == 0 || n_mid == 0) begin
      failures++;
      $display("an index range was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
