// End-to-end test of the de-blocking filter at its default size.
//
// A behavioural external memory holds one macro-block and its left and top
// neighbour blocks (luma and both chroma planes) filled with blocky random
// pixels. For each of NUM_MB random macro-blocks (random Bs per edge, QPs and
// filter offsets) the test runs the filter and, independently, a reference
// model of the standard's de-blocking process written as plain loops over
// the pixels in the standard order (all vertical edges left to right, then all
// horizontal edges top to bottom). Every one of the 40 returned blocks is
// compared with the model. Most MBs are queued while the previous one is
// still running, so that their first load overlaps its final store (done to
// done must then be 336 clocks); every fifth MB is started from idle (start
// to done must be 397 clocks). Two buffers in the memory model keep the MB
// being loaded apart from the MB being stored. The test also counts how often
// each mechanism occurs (strong and normal luma filtering, chroma filtering,
// lines left alone by the alpha/beta test, Bs = 0 edges, data-buffer reuse,
// transposed array reads, both filter units working at once, stores of one
// phase overlapping the loads of the next, the next MB loading beside the
// final store) and fails if one never did.
//
// The reference follows the standard's filtering order, which the reordered
// schedule must reproduce exactly; the external memory model with a one-clock
// read latency is this design's own interface choice.
module tb_deblock_top;
  import dbf_pkg::*;

  localparam int NUM_MB     = 40;
  localparam int MB_CYCLES  = 397;   // start to done of an MB started while idle
  localparam int MB_PERIOD  = 336;   // done to done when the next MB is queued early

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic       start;
  mb_info_t   mb;
  logic       busy, ready, done;
  logic       ext_rd_req;
  blk_t       ext_rd_blk;
  logic [1:0] ext_rd_row;
  word_t      ext_rd_data;
  logic       ext_wr_en;
  blk_t       ext_wr_blk;
  logic [1:0] ext_wr_row;
  word_t      ext_wr_data;
  logic [1:0] filt_active, filt_en;

  deblock_top dut (.*);

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ pixel planes
  // Plane 0 luma (20x20, index = coordinate + 4), planes 1/2 Cb/Cr (12x12).
  // mem_in/ref_px are the working copies used while preparing one MB; two
  // buffers per kind let one MB be loaded while the previous one is stored.
  int mem_in  [3][20][20];
  int ref_px  [3][20][20];
  int buf_in  [2][3][20][20];
  int buf_out [2][3][20][20];
  int buf_ref [2][3][20][20];
  int rd_words = 0, wr_words = 0;   // 160 of each per MB, in MB order

  // Location of row r of block b: plane, y, x of its first pixel (coordinates
  // relative to the MB's top-left sample).
  function automatic void blk_loc(input int b, input int r, output int pl, output int y, output int x);
    if (b < 16) begin pl = 0; y = 4*(b/4) + r; x = 4*(b%4); end
    else if (b < 24) begin pl = 1 + (b-16)/4; y = 4*(((b-16)%4)/2) + r; x = 4*((b-16)%2); end
    else if (b < 28) begin pl = 0; y = 4*(b-24) + r; x = -4; end
    else if (b < 32) begin pl = 1 + (b-28)/2; y = 4*((b-28)%2) + r; x = -4; end
    else if (b < 36) begin pl = 0; y = -4 + r; x = 4*(b-32); end
    else begin pl = 1 + (b-36)/2; y = -4 + r; x = 4*((b-36)%2); end
  endfunction

  // external memory: read latency one clock
  always_ff @(posedge clk) begin
    if (ext_rd_req) begin
      int pl, y, x;
      blk_loc(int'(ext_rd_blk), int'(ext_rd_row), pl, y, x);
      for (int k = 0; k < 4; k++) ext_rd_data[8*k +: 8] <= 8'(buf_in[(rd_words/160)%2][pl][y+4][x+4+k]);
      rd_words++;
    end
    if (ext_wr_en) begin
      int pl, y, x;
      blk_loc(int'(ext_wr_blk), int'(ext_wr_row), pl, y, x);
      for (int k = 0; k < 4; k++) buf_out[(wr_words/160)%2][pl][y+4][x+4+k] = int'(ext_wr_data[8*k +: 8]);
      wr_words++;
    end
  end

  // ---------------------------------------------------------- reference model
  int ALPHA [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,4,4,5,6,7,8,9,10,12,13,15,17,20,22,25,28,
                     32,36,40,45,50,56,63,71,80,90,101,113,127,144,162,182,203,226,255,255};
  int BETA  [52] = '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,2,2,2,3,3,3,3,4,4,4,6,6,7,7,8,8,
                     9,9,10,10,11,11,12,12,13,13,14,14,15,15,16,16,17,17,18,18};
  int TC0 [3][52] = '{
    '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13},
    '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,5,5,6,7,8,8,10,11,12,13,15,17},
    '{0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,0,1,1,1,1,1,1,1,1,1,1,2,2,2,2,3,3,3,4,4,4,5,6,6,7,8,9,10,11,13,14,16,18,20,23,25}};

  int n_strong_luma = 0, n_normal_luma = 0, n_p1_mod = 0, n_chroma_strong = 0,
      n_chroma_normal = 0, n_gate_off = 0, n_bs0 = 0;

  function automatic int clip3(int lo, int hi, int v);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction
  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // Filter one line; p[i] = p_i, q[i] = q_i.
  function automatic void ref_line(inout int p[4], inout int q[4], input int bs,
                                   input bit chroma, input int qpp, input int qpq,
                                   input int offa, input int offb);
    int qpav, ia, ib, a, bt, tc0, tc, d;
    bit ap, aq;
    int np[4], nq[4];
    if (bs == 0) begin n_bs0++; return; end
    qpav = (qpp + qpq + 1) >> 1;
    ia = clip3(0, 51, qpav + offa);
    ib = clip3(0, 51, qpav + offb);
    a = ALPHA[ia]; bt = BETA[ib];
    if (!(iabs(p[0]-q[0]) < a && iabs(p[1]-p[0]) < bt && iabs(q[1]-q[0]) < bt)) begin
      n_gate_off++; return;
    end
    np = p; nq = q;
    ap = iabs(p[2]-p[0]) < bt;
    aq = iabs(q[2]-q[0]) < bt;
    if (bs < 4) begin
      tc0 = TC0[bs-1][ia];
      tc  = chroma ? tc0 + 1 : tc0 + int'(ap) + int'(aq);
      d   = clip3(-tc, tc, (((q[0]-p[0])*4) + (p[1]-q[1]) + 4) >>> 3);
      np[0] = clip3(0, 255, p[0] + d);
      nq[0] = clip3(0, 255, q[0] - d);
      if (!chroma) begin
        if (ap) begin np[1] = p[1] + clip3(-tc0, tc0, (p[2] + ((p[0]+q[0]+1) >> 1) - 2*p[1]) >>> 1); n_p1_mod++; end
        if (aq) nq[1] = q[1] + clip3(-tc0, tc0, (q[2] + ((p[0]+q[0]+1) >> 1) - 2*q[1]) >>> 1);
        n_normal_luma++;
      end else n_chroma_normal++;
    end else begin
      if (!chroma && ap && iabs(p[0]-q[0]) < ((a >> 2) + 2)) begin
        np[0] = (p[2] + 2*p[1] + 2*p[0] + 2*q[0] + q[1] + 4) >> 3;
        np[1] = (p[2] + p[1] + p[0] + q[0] + 2) >> 2;
        np[2] = (2*p[3] + 3*p[2] + p[1] + p[0] + q[0] + 4) >> 3;
        n_strong_luma++;
      end else np[0] = (2*p[1] + p[0] + q[1] + 2) >> 2;
      if (!chroma && aq && iabs(p[0]-q[0]) < ((a >> 2) + 2)) begin
        nq[0] = (p[1] + 2*p[0] + 2*q[0] + 2*q[1] + q[2] + 4) >> 3;
        nq[1] = (p[0] + q[0] + q[1] + q[2] + 2) >> 2;
        nq[2] = (2*q[3] + 3*q[2] + q[1] + q[0] + p[0] + 4) >> 3;
      end else nq[0] = (2*q[1] + q[0] + p[1] + 2) >> 2;
      if (chroma) n_chroma_strong++;
    end
    p = np; q = nq;
  endfunction

  task automatic ref_mb(input mb_info_t m);
    int p[4], q[4];
    int sz, qpp, qpc;
    ref_px = mem_in;
    for (int pl = 0; pl < 3; pl++) begin
      bit ch;
      qp_t [2:0] qps;
      ch  = (pl != 0);
      sz  = ch ? 8 : 16;
      qps = (pl == 0) ? m.qp_y : ((pl == 1) ? m.qp_cb : m.qp_cr);
      // vertical edges, left to right
      for (int e = 0; e < sz/4; e++)
        for (int y = 0; y < sz; y++) begin
          int x, bs;
          x  = 4*e;
          bs = ch ? int'(m.bs_ve[2*e][y/2]) : int'(m.bs_ve[e][y/4]);
          for (int i = 0; i < 4; i++) begin p[i] = ref_px[pl][y+4][x+4-1-i]; q[i] = ref_px[pl][y+4][x+4+i]; end
          qpp = (e == 0) ? int'(qps[1]) : int'(qps[0]);
          ref_line(p, q, bs, ch, qpp, int'(qps[0]), int'(m.offset_a), int'(m.offset_b));
          for (int i = 0; i < 4; i++) begin ref_px[pl][y+4][x+4-1-i] = p[i]; ref_px[pl][y+4][x+4+i] = q[i]; end
        end
      // horizontal edges, top to bottom
      for (int e = 0; e < sz/4; e++)
        for (int x = 0; x < sz; x++) begin
          int y, bs;
          y  = 4*e;
          bs = ch ? int'(m.bs_he[2*e][x/2]) : int'(m.bs_he[e][x/4]);
          for (int i = 0; i < 4; i++) begin p[i] = ref_px[pl][y+4-1-i][x+4]; q[i] = ref_px[pl][y+4+i][x+4]; end
          qpc = (e == 0) ? int'(qps[2]) : int'(qps[0]);
          ref_line(p, q, bs, ch, qpc, int'(qps[0]), int'(m.offset_a), int'(m.offset_b));
          for (int i = 0; i < 4; i++) begin ref_px[pl][y+4-1-i][x+4] = p[i]; ref_px[pl][y+4+i][x+4] = q[i]; end
        end
    end
  endtask

  // ---------------------------------------------------------------- stimulus
  task automatic fill_planes();
    for (int pl = 0; pl < 3; pl++)
      for (int by = 0; by < 5; by++)
        for (int bx = 0; bx < 5; bx++) begin
          int base;
          base = 60 + int'($urandom_range(0, 120));
          for (int y = 0; y < 4; y++)
            for (int x = 0; x < 4; x++) begin
              int v;
              v = base + int'($urandom_range(0, 6)) + (($urandom_range(0, 15) == 0) ? 30 : 0);
              mem_in[pl][4*by+y][4*bx+x] = (v > 255) ? 255 : v;
            end
        end
    // occasionally an extreme block, to reach the clipping limits
    if ($urandom_range(0, 3) == 0)
      for (int y = 4; y < 8; y++) for (int x = 4; x < 8; x++) mem_in[0][y][x] = 250;
  endtask

  function automatic mb_info_t rand_mb();
    mb_info_t m;
    m = '0;
    for (int e = 0; e < 4; e++)
      for (int k = 0; k < 4; k++) begin
        m.bs_ve[e][k] = (e == 0) ? bs_t'($urandom_range(0, 4)) : bs_t'($urandom_range(0, 3));
        m.bs_he[e][k] = (e == 0) ? bs_t'($urandom_range(0, 4)) : bs_t'($urandom_range(0, 3));
      end
    for (int i = 0; i < 3; i++) begin
      m.qp_y[i]  = qp_t'($urandom_range(24, 51));
      m.qp_cb[i] = qp_t'($urandom_range(24, 51));
      m.qp_cr[i] = qp_t'($urandom_range(24, 51));
    end
    m.offset_a = offset_t'($signed(5'($urandom_range(0, 12)) - 5'd6));
    m.offset_b = offset_t'($signed(5'($urandom_range(0, 12)) - 5'd6));
    return m;
  endfunction

  // -------------------------------------------------- mechanism observation
  int n_both_units = 0, n_fifo_reuse = 0, n_col_reads = 0, n_dut_filtered = 0, n_overlap = 0,
      n_mb_overlap = 0;
  always_ff @(posedge clk) begin
    if (filt_en == 2'b11) n_both_units <= n_both_units + 1;
    if (filt_active != 2'b00) n_dut_filtered <= n_dut_filtered + 1;
    if (dut.dp.fifo_pop != 2'b00 && dut.dp.par[0].en) n_fifo_reuse <= n_fifo_reuse + 1;
    if (dut.dp.arr_rd_col != 4'b0000) n_col_reads <= n_col_reads + 1;
    if (ext_rd_req && ext_wr_en) n_overlap <= n_overlap + 1;   // store beside load
    if (ext_rd_req && ext_wr_en && ext_rd_blk < 16 && ext_wr_blk >= 16 && ext_wr_blk < 24)
      n_mb_overlap <= n_mb_overlap + 1;                          // next MB beside chroma store
  end

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (NUM_MB * (MB_CYCLES + 20) + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Prepare MB n: fresh planes, reference result, into buffer n % 2.
  task automatic prepare(input int n, output mb_info_t m);
    m = rand_mb();
    fill_planes();
    ref_mb(m);
    buf_in[n%2]  = mem_in;
    buf_ref[n%2] = ref_px;
    for (int pl = 0; pl < 3; pl++)
      for (int y = 0; y < 20; y++)
        for (int x = 0; x < 20; x++) buf_out[n%2][pl][y][x] = -1;
  endtask

  // start is driven between clock edges; the edge that takes it is logged below
  task automatic pulse_start(input mb_info_t m);
    @(negedge clk);
    while (!ready) @(negedge clk);
    mb    = m;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  int cycle = 0, n_started = 0, n_done = 0;
  int t_start [NUM_MB], t_done [NUM_MB];
  always @(posedge clk) begin
    cycle++;
    if (!rst && start && ready) begin t_start[n_started] = cycle; n_started++; end
    if (done) begin t_done[n_done] = cycle; n_done++; end
  end

  // Compare every pixel of MB n that belongs to one of its 40 blocks.
  task automatic compare(input int n);
    int bad;
    bad = 0;
    for (int pl = 0; pl < 3; pl++) begin
      int sz;
      sz = (pl == 0) ? 20 : 12;
      for (int y = 0; y < sz; y++)
        for (int x = 0; x < sz; x++) begin
          if (y < 4 && x < 4) continue;          // corner block is not used
          checks++;
          if (buf_out[n%2][pl][y][x] != buf_ref[n%2][pl][y][x]) begin
            failures++;
            if (bad < 5)
              $display("MB %0d plane %0d y=%0d x=%0d: got %0d expected %0d (input %0d)",
                       n, pl, y-4, x-4, buf_out[n%2][pl][y][x], buf_ref[n%2][pl][y][x],
                       buf_in[n%2][pl][y][x]);
            bad++;
          end
        end
    end
  endtask

  // Most MBs are queued while the previous one is still running (so that its
  // upper half is loaded beside the previous MB's final store); every fifth
  // one is started only after the previous has finished.
  initial begin
    int cyc, expect_cyc;
    bit queued [NUM_MB];
    mb_info_t m;
    start = 1'b0;
    mb    = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    prepare(0, m);
    queued[0] = 1'b0;
    pulse_start(m);
    for (int n = 0; n < NUM_MB; n++) begin
      // queue the next MB now unless it is one of the sequential ones
      if (n + 1 < NUM_MB && (n + 1) % 5 != 0) begin
        prepare(n + 1, m);
        queued[n+1] = 1'b1;
        pulse_start(m);
      end
      while (n_done <= n) @(posedge clk);
      cyc = queued[n] ? t_done[n] - t_done[n-1] : t_done[n] - t_start[n];
      expect_cyc = queued[n] ? MB_PERIOD : MB_CYCLES;
      checks++;
      if (cyc != expect_cyc) begin
        failures++;
        $display("MB %0d: %0d clocks, expected %0d (%s)", n, cyc, expect_cyc,
                 queued[n] ? "done to done" : "start to done");
      end
      @(posedge clk);
      compare(n);
      if (n + 1 < NUM_MB && (n + 1) % 5 == 0) begin
        prepare(n + 1, m);
        queued[n+1] = 1'b0;
        pulse_start(m);
      end
    end
    // every mechanism must have been exercised
    begin
      int cnt [13];
      string nm [13];
      cnt = '{n_strong_luma, n_normal_luma, n_p1_mod, n_chroma_strong, n_chroma_normal,
              n_gate_off, n_bs0, n_both_units, n_fifo_reuse, n_col_reads, n_dut_filtered,
              n_overlap, n_mb_overlap};
      nm  = '{"luma strong (Bs=4)", "luma normal", "luma p1 update", "chroma Bs=4",
              "chroma normal", "alpha/beta gate off", "Bs=0 edge", "two filter units at once",
              "data-buffer reuse", "transposed array read", "lines filtered by the design",
              "store overlapped with load", "next MB beside final store"};
      for (int i = 0; i < 13; i++) begin
        checks++;
        $display("%-28s %0d", nm[i], cnt[i]);
        if (cnt[i] == 0) begin failures++; $display("mechanism never exercised: %s", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
