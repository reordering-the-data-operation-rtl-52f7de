// Self-checking test of the edge filter unit.
//
// Drives random lines of eight samples across an edge, with random boundary
// strength, thresholds and luma/chroma mode, and compares both output words
// with a reference written here from the standard's filter equations (integer
// arithmetic, independent of the unit's fixed-width datapath). Sample values
// are drawn as "blocky" lines (a flat level per side plus small noise) so
// that the alpha/beta gates open often enough to exercise every mode.
// It counts how often each mode was met (strong luma long taps, strong short
// taps, normal luma with p1/q1 update, normal chroma, gate closed, Bs = 0,
// pass-through) and fails if one never happened. The unit is combinational;
// a clock is generated only to pace the stimulus and for the watchdog.
//
// The filter equations checked here are those of the standard; the stimulus
// mix and the coverage goals are this testbench's own.
module tb_edge_filter;
  import dbf_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  word_t     p_in, q_in, p_out, q_out;
  filt_par_t par;
  logic      filtered;

  edge_filter dut (.*);

  int checks = 0, failures = 0;
  int n_strong_long = 0, n_strong_short = 0, n_normal_luma = 0, n_p1 = 0,
      n_chroma = 0, n_gate = 0, n_bs0 = 0, n_pass = 0;

  function automatic int clip3(int lo, int hi, int v);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction
  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // reference: p[i] = p_i, q[i] = q_i; returns whether the line is filtered
  function automatic bit ref_line(input int p[4], input int q[4], input filt_par_t pr,
                                  output int np[4], output int nq[4]);
    int a, b, tc0, tc, d;
    bit ap, aq, st;
    np = p; nq = q;
    a = int'(pr.alpha); b = int'(pr.beta); tc0 = int'(pr.tc0);
    if (!pr.en) begin n_pass++; return 0; end
    if (pr.bs == 0) begin n_bs0++; return 0; end
    if (!(iabs(p[0]-q[0]) < a && iabs(p[1]-p[0]) < b && iabs(q[1]-q[0]) < b)) begin
      n_gate++; return 0;
    end
    ap = iabs(p[2]-p[0]) < b;
    aq = iabs(q[2]-q[0]) < b;
    if (pr.bs < 4) begin
      tc = pr.chroma ? tc0 + 1 : tc0 + int'(ap) + int'(aq);
      d  = clip3(-tc, tc, (4*(q[0]-p[0]) + (p[1]-q[1]) + 4) >>> 3);
      np[0] = clip3(0, 255, p[0] + d);
      nq[0] = clip3(0, 255, q[0] - d);
      if (!pr.chroma) begin
        n_normal_luma++;
        if (ap) begin np[1] = p[1] + clip3(-tc0, tc0, (p[2] + ((p[0]+q[0]+1) >> 1) - 2*p[1]) >>> 1); n_p1++; end
        if (aq) nq[1] = q[1] + clip3(-tc0, tc0, (q[2] + ((p[0]+q[0]+1) >> 1) - 2*q[1]) >>> 1);
      end else n_chroma++;
    end else begin
      st = iabs(p[0]-q[0]) < ((a >> 2) + 2);
      if (!pr.chroma && ap && st) begin
        np[0] = (p[2] + 2*p[1] + 2*p[0] + 2*q[0] + q[1] + 4) >> 3;
        np[1] = (p[2] + p[1] + p[0] + q[0] + 2) >> 2;
        np[2] = (2*p[3] + 3*p[2] + p[1] + p[0] + q[0] + 4) >> 3;
        n_strong_long++;
      end else begin
        np[0] = (2*p[1] + p[0] + q[1] + 2) >> 2;
        n_strong_short++;
      end
      if (!pr.chroma && aq && st) begin
        nq[0] = (p[1] + 2*p[0] + 2*q[0] + 2*q[1] + q[2] + 4) >> 3;
        nq[1] = (p[0] + q[0] + q[1] + q[2] + 2) >> 2;
        nq[2] = (2*q[3] + 3*q[2] + q[1] + q[0] + p[0] + 4) >> 3;
      end else nq[0] = (2*q[1] + q[0] + p[1] + 2) >> 2;
    end
    return 1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p[4], q[4], np[4], nq[4];
    int lp, lq, noise;
    bit exp_f;
    word_t ep, eq;
    for (int it = 0; it < 20000; it++) begin
      lp = int'($urandom_range(0, 255));
      lq = clip3(0, 255, lp + int'($urandom_range(0, 40)) - 20);
      noise = int'($urandom_range(1, 8));
      for (int i = 0; i < 4; i++) begin
        p[i] = clip3(0, 255, lp + int'($urandom_range(0, noise)) - noise/2);
        q[i] = clip3(0, 255, lq + int'($urandom_range(0, noise)) - noise/2);
      end
      if (it % 50 == 0)   // occasional fully random line (extremes, clipping)
        for (int i = 0; i < 4; i++) begin p[i] = int'($urandom_range(0, 255)); q[i] = int'($urandom_range(0, 255)); end
      par.en     = ($urandom_range(0, 19) != 0);
      par.chroma = $urandom_range(0, 2) == 0;
      par.bs     = 3'($urandom_range(0, 4));
      par.alpha  = 8'($urandom_range(0, 255));
      par.beta   = 8'($urandom_range(0, 18));
      par.tc0    = 5'($urandom_range(0, 25));
      for (int i = 0; i < 4; i++) begin
        p_in[8*(3-i) +: 8] = 8'(p[i]);
        q_in[8*i +: 8]     = 8'(q[i]);
      end
      exp_f = ref_line(p, q, par, np, nq);
      for (int i = 0; i < 4; i++) begin
        ep[8*(3-i) +: 8] = 8'(np[i]);
        eq[8*i +: 8]     = 8'(nq[i]);
      end
      @(posedge clk);
      checks++;
      if (p_out != ep || q_out != eq || filtered != exp_f) begin
        failures++;
        if (failures < 10)
          $display("mismatch: p %h q %h bs %0d ch %0d a %0d b %0d tc0 %0d -> p %h/%h q %h/%h f %0d/%0d",
                   p_in, q_in, par.bs, par.chroma, par.alpha, par.beta, par.tc0,
                   p_out, ep, q_out, eq, filtered, exp_f);
      end
    end
    $display("strong long taps   %0d", n_strong_long);
    $display("strong short taps  %0d", n_strong_short);
    $display("normal luma        %0d (p1 updated %0d)", n_normal_luma, n_p1);
    $display("normal chroma      %0d", n_chroma);
    $display("gate closed        %0d", n_gate);
    $display("Bs = 0             %0d", n_bs0);
    $display("pass-through       %0d", n_pass);
    checks++;
    if (n_strong_long == 0 || n_strong_short == 0 || n_normal_luma == 0 || n_p1 == 0 ||
        n_chroma == 0 || n_gate == 0 || n_bs0 == 0 || n_pass == 0) begin
      failures++;
      $display("a filter mode was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
