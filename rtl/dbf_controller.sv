// Control unit of the de-blocking filter.
//
// What it does: for one macro-block (MB) it sequences the external loads, the
// filtering order and the external stores, and drives every multiplexer,
// write enable and threshold of the datapath clock by clock.
//
// How it works. The MB is processed in three phases: the upper half of the
// luma block (block rows 0-1 with left neighbours L1, L2 and top neighbours
// T1..T4), the lower half (block rows 2-3 with L3, L4, using the already
// filtered row 1, B4..B7, as its top neighbours) and the two chroma blocks.
// Each phase is LOAD (fetch its blocks from external memory into the two
// SRAMs), FILTER (13 block cycles of 4 clocks) and STORE (write the finished
// blocks back). The STORE of a phase runs in the same clocks as the LOAD of
// the next one, so only the first phase has a LOAD of its own. B4..B7 stay in
// the SRAMs from the upper to the lower phase.
//
// Within a luma phase the two filter units work on the two block rows side by
// side, in the order of the proposed filtering order:
//   block cycle  1      load L1/L2 into the data buffers
//                2-4    H1..H3: vertical edges 0..2 of both rows
//                5      write back B2/B6, load T1/T2 into the data buffers
//                6-7    V4, V5: horizontal edges 0 and 1 of columns 0-1
//                8      write back B4/B5, reload B2/B6 into the data buffers
//                9      H6: vertical edge 3 of both rows
//                10     load T3/T4 into the data buffers
//                11-12  V7, V8: horizontal edges 0 and 1 of columns 2-3
//                13     write back B6/B7
// (the lower half is the same with rows 2-3). A block that has just been
// filtered on one edge is kept in the unit's data buffer (FIFO) and re-enters
// as the p side of the next edge; blocks that must next be filtered vertically
// are written by rows into a transpose array and read back by columns. In
// chroma each filter unit takes one block row of a component: Cb in block
// cycles 1-7 and Cr in 7-13, overlapping by one cycle.
//
// Every block lives in the SRAM chosen by a checkerboard over its position
// (see dbf_pkg::blk_sram), so the two units never read (or write) the same
// SRAM in the same clock. Blocks that are used as top neighbours (T1..T8) are
// transposed on their way in, and all blocks that end in column form are
// transposed back on their way out, so the external memory always sees rows.
// Loads pass through transpose arrays 0/1 and stores through arrays 2/3, each
// pair used as a ping-pong buffer (one block fills while the other empties).
// Overlapping a store with the next load is safe because the load order of
// the next phase visits the SRAM slots in the same order as the store order
// of the current one: each slot is read out four clocks before it is
// overwritten.
//
// Interface: start (one clock, while ready) latches mb. While idle it begins
// the MB at once; while busy it queues it (one deep, ready drops until the
// queued MB begins). A queued MB whose start arrives before the current MB's
// chroma filtering ends has its upper half loaded beside the current MB's
// final STORE, whose block order is chosen for that. done pulses for one clock
// at the end of each MB. ext_rd_* request one 32-bit row of one
// block of the MB being loaded from external memory; the row must be given on
// the datapath's external input in the next clock. sram_rd_* drive the SRAM
// read ports directly; dp is the registered control word of the datapath's
// execute stage (one clock after the matching SRAM or external read).
//
// Timing: a transfer of N blocks takes 4*N+4 clocks, a FILTER phase
// 13*4 = 52 clocks. Per MB: LOAD of 14 blocks (60), FILTER (52), STORE 10
// beside LOAD 10 (44), FILTER (52), STORE 14 beside LOAD 16 (68), FILTER (52),
// STORE 16 (68) = 396 clocks; done rises 397 clocks after the clock that
// samples start. With the next MB queued in time its first LOAD disappears
// into the final STORE, and done pulses every 52+44+52+68+52+68 = 336 clocks.
//
// The phase split, the exact block-cycle table, the use of SRAM write-back
// between edges and the external interface are this design's choices; the
// two filter units, data buffers, four transpose arrays, two interleaved
// SRAMs and the edge order follow the design description.
module dbf_controller
  import dbf_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  mb_info_t   mb,
  output logic       busy,
  output logic       ready,   // a start pulse would be accepted now
  output logic       done,
  // external memory read request (data expected one clock later)
  output logic       ext_rd_req,
  output blk_t       ext_rd_blk,
  output logic [1:0] ext_rd_row,
  // SRAM read ports
  output logic [1:0]       sram_rd_en,
  output logic [1:0][5:0]  sram_rd_addr,
  // datapath control (execute stage)
  output dp_ctrl_t   dp,
  // observation: current phase and block cycle
  output logic [1:0] phase,
  output logic [1:0] step,
  output logic [3:0] bcyc
);

  localparam int unsigned FILT_BC = 13;

  typedef enum logic [1:0] {ST_IDLE, ST_LOAD, ST_FILT, ST_STORE} state_e;
  typedef enum logic [1:0] {K_NONE, K_FIFO, K_SRAM, K_ARR} kind_e;
  typedef enum logic [1:0] {OP_MOVE, OP_H, OP_V} op_e;

  // One filter unit's work for one block cycle.
  typedef struct packed {
    kind_e      p_src;  logic [1:0] p_arr;  blk_t p_blk;
    kind_e      q_src;  logic [1:0] q_arr;  blk_t q_blk;
    op_e        op;
    logic       chroma;
    logic       plane;  // 0 Cb, 1 Cr
    logic [1:0] edge_n;
    logic [1:0] seg;
    kind_e      p_dst;  logic [1:0] p_darr; blk_t p_dblk;
    kind_e      q_dst;  logic [1:0] q_darr; blk_t q_dblk;
  } lane_op_t;

  state_e   state;
  logic [1:0] ph;            // 0 upper luma, 1 lower luma, 2 chroma
  logic [7:0] t;             // clock within the current state
  mb_info_t mb_q;
  mb_info_t mb_nxt;          // side information of the queued next MB
  logic     pend;            // a next MB is queued
  logic     ovl;             // this final STORE also loads the queued MB

  assign phase = ph;
  assign step  = state;
  assign busy  = (state != ST_IDLE);
  assign ready = !pend;

  // ---------------------------------------------------------------- lists
  function automatic int n_load(input logic [1:0] p);
    case (p) 0: return 14; 1: return 10; default: return 16; endcase
  endfunction
  function automatic int n_store(input logic [1:0] p);
    case (p) 0: return 10; 1: return 14; default: return 16; endcase
  endfunction

  // j-th block fetched in phase p
  function automatic blk_t load_blk(input logic [1:0] p, input int j);
    case (p)
      0: if (j < 2) return blk_t'(24 + j);          // L1, L2
         else if (j < 6) return blk_t'(32 + j - 2);  // T1..T4
         else return blk_t'(j - 6);                  // B0..B7
      1: if (j < 2) return blk_t'(26 + j);          // L3, L4
         else if (j < 6) return blk_t'(12 + j - 2);  // B12..B15
         else return blk_t'(8 + j - 6);              // B8..B11
      default:
         if (j < 4) return blk_t'(28 + j);          // L5..L8
         else if (j < 8) return blk_t'(36 + j - 4);  // T5..T8
         else return blk_t'(16 + j - 8);             // B16..B23
    endcase
  endfunction

  // j-th block written back in phase p
  function automatic blk_t store_blk(input logic [1:0] p, input int j);
    case (p)
      0: if (j < 2) return blk_t'(24 + j);          // L1, L2
         else if (j < 6) return blk_t'(32 + j - 2);  // T1..T4
         else return blk_t'(j - 6);                  // B0..B3
      1: case (j)
           0: return blk_t'(26);  1: return blk_t'(27);   // L3, L4
           2: return blk_t'(12);  3: return blk_t'(13);
           4: return blk_t'(14);  5: return blk_t'(15);
           6: return blk_t'(5);   7: return blk_t'(4);
           8: return blk_t'(6);   9: return blk_t'(7);
           10: return blk_t'(8);  11: return blk_t'(9);
           12: return blk_t'(11); default: return blk_t'(10);
         endcase
      default: case (j)   // same slot order as the next MB's upper-half load
           0: return blk_t'(28);  1: return blk_t'(29);   // L5, L6
           2: return blk_t'(36);  3: return blk_t'(37);   // T5..T8
           4: return blk_t'(38);  5: return blk_t'(39);
           6: return blk_t'(20);  7: return blk_t'(21);   // Cr, Cb
           8: return blk_t'(23);  9: return blk_t'(22);
           10: return blk_t'(17); 11: return blk_t'(16);
           12: return blk_t'(18); 13: return blk_t'(19);
           14: return blk_t'(30); default: return blk_t'(31);   // L7, L8
         endcase
    endcase
  endfunction

  // Top neighbours are kept transposed (column form) in the SRAMs.
  function automatic logic is_top(input blk_t b);
    return b >= 32;
  endfunction
  // Left neighbours end in row form, every other block in column form.
  function automatic logic ends_col(input blk_t b);
    return !(b >= 24 && b < 32);
  endfunction

  // ------------------------------------------------------------- schedule
  function automatic lane_op_t nop();
    lane_op_t o;
    o = '0;
    o.p_src = K_NONE; o.q_src = K_NONE; o.p_dst = K_NONE; o.q_dst = K_NONE;
    o.op = OP_MOVE;
    return o;
  endfunction

  // Luma half h (0 upper, 1 lower), block cycle bc, filter unit ln.
  function automatic lane_op_t luma_op(input logic h, input int bc, input logic ln);
    lane_op_t o;
    int ra, rb, r;
    blk_t lblk;
    o  = nop();
    ra = h ? 2 : 0;
    rb = ra + 1;
    r  = ln ? rb : ra;                       // this unit's block row in H phases
    lblk = blk_t'(24 + r);
    o.chroma = 1'b0;
    case (bc)
      0: begin o.q_src = K_SRAM; o.q_blk = lblk; o.q_dst = K_FIFO; end
      1, 2, 3, 8: begin
        o.op = OP_H; o.seg = 2'(r);
        o.p_src = K_FIFO;
        o.q_src = K_SRAM;
        case (bc)
          1: begin
            o.edge_n = 2'd0; o.q_blk = blk_t'(4*r + 0);
            o.p_dst = K_SRAM; o.p_dblk = lblk; o.q_dst = K_FIFO;
          end
          2: begin
            o.edge_n = 2'd1; o.q_blk = blk_t'(4*r + 1);
            o.p_dst = K_ARR; o.p_darr = ln ? 2'd2 : 2'd0; o.q_dst = K_FIFO;
          end
          3: begin
            o.edge_n = 2'd2; o.q_blk = blk_t'(4*r + 2);
            o.p_dst = K_ARR; o.p_darr = ln ? 2'd3 : 2'd1; o.q_dst = K_FIFO;
          end
          default: begin
            o.edge_n = 2'd3; o.q_blk = blk_t'(4*r + 3);
            o.p_dst = K_ARR; o.p_darr = ln ? 2'd2 : 2'd0;
            o.q_dst = K_ARR; o.q_darr = ln ? 2'd3 : 2'd1;
          end
        endcase
      end
      4, 9: begin
        // column ln (bc 4) or 2+ln (bc 9) top neighbour into the data buffer
        if (bc == 4) begin
          o.p_src = K_FIFO; o.p_dst = K_SRAM; o.p_dblk = blk_t'(4*r + 2);
        end
        o.q_src = K_SRAM;
        o.q_blk = h ? blk_t'(4 + (bc == 4 ? 0 : 2) + int'(ln))
                    : blk_t'(32 + (bc == 4 ? 0 : 2) + int'(ln));
        o.q_dst = K_FIFO;
      end
      5, 10: begin
        // top edge of block row ra, columns ln / 2+ln
        o.op = OP_V; o.edge_n = 2'(ra);
        o.seg = 2'((bc == 5 ? 0 : 2) + int'(ln));
        o.p_src = K_FIFO;
        o.q_src = K_ARR; o.q_arr = ln ? 2'd1 : 2'd0;
        o.p_dst = K_SRAM;
        o.p_dblk = h ? blk_t'(4 + int'(o.seg)) : blk_t'(32 + int'(o.seg));
        o.q_dst = K_FIFO;
      end
      6, 11: begin
        // edge between block rows ra and rb
        o.op = OP_V; o.edge_n = 2'(rb);
        o.seg = 2'((bc == 6 ? 0 : 2) + int'(ln));
        o.p_src = K_FIFO;
        o.q_src = K_ARR; o.q_arr = ln ? 2'd3 : 2'd2;
        o.p_dst = K_SRAM; o.p_dblk = blk_t'(4*ra + int'(o.seg));
        o.q_dst = K_ARR; o.q_darr = ln ? 2'd3 : 2'd2;
      end
      7: begin
        o.p_src = K_ARR; o.p_arr = ln ? 2'd3 : 2'd2;
        o.p_dst = K_SRAM; o.p_dblk = blk_t'(4*rb + int'(ln));
        o.q_src = K_SRAM; o.q_blk = blk_t'(4*r + 2); o.q_dst = K_FIFO;
      end
      12: begin
        o.p_src = K_ARR; o.p_arr = ln ? 2'd3 : 2'd2;
        o.p_dst = K_SRAM; o.p_dblk = blk_t'(4*rb + 2 + int'(ln));
      end
      default: ;
    endcase
    return o;
  endfunction

  // One chroma component (plane pl), component step s (0..6), unit ln.
  function automatic lane_op_t chroma_step(input logic pl, input int s, input logic ln);
    lane_op_t o;
    int base;
    o = nop();
    base = 16 + 4*int'(pl);
    o.chroma = 1'b1; o.plane = pl;
    case (s)
      0: begin o.q_src = K_SRAM; o.q_blk = blk_t'(28 + 2*int'(pl) + int'(ln)); o.q_dst = K_FIFO; end
      1: begin
        o.op = OP_H; o.edge_n = 2'd0; o.seg = 2'(ln);
        o.p_src = K_FIFO; o.q_src = K_SRAM; o.q_blk = blk_t'(base + 2*int'(ln));
        o.p_dst = K_SRAM; o.p_dblk = blk_t'(28 + 2*int'(pl) + int'(ln)); o.q_dst = K_FIFO;
      end
      2: begin
        o.op = OP_H; o.edge_n = 2'd1; o.seg = 2'(ln);
        o.p_src = K_FIFO; o.q_src = K_SRAM; o.q_blk = blk_t'(base + 2*int'(ln) + 1);
        o.p_dst = K_ARR; o.p_darr = ln ? 2'd2 : 2'd0;
        o.q_dst = K_ARR; o.q_darr = ln ? 2'd3 : 2'd1;
      end
      3: begin o.q_src = K_SRAM; o.q_blk = blk_t'(36 + 2*int'(pl) + int'(ln)); o.q_dst = K_FIFO; end
      4: begin
        o.op = OP_V; o.edge_n = 2'd0; o.seg = 2'(ln);
        o.p_src = K_FIFO; o.q_src = K_ARR; o.q_arr = ln ? 2'd1 : 2'd0;
        o.p_dst = K_SRAM; o.p_dblk = blk_t'(36 + 2*int'(pl) + int'(ln)); o.q_dst = K_FIFO;
      end
      5: begin
        o.op = OP_V; o.edge_n = 2'd1; o.seg = 2'(ln);
        o.p_src = K_FIFO; o.q_src = K_ARR; o.q_arr = ln ? 2'd3 : 2'd2;
        o.p_dst = K_SRAM; o.p_dblk = blk_t'(base + int'(ln));
        o.q_dst = K_ARR; o.q_darr = ln ? 2'd3 : 2'd2;
      end
      6: begin
        o.p_src = K_ARR; o.p_arr = ln ? 2'd3 : 2'd2;
        o.p_dst = K_SRAM; o.p_dblk = blk_t'(base + 2 + int'(ln));
      end
      default: ;
    endcase
    return o;
  endfunction

  function automatic lane_op_t chroma_op(input int bc, input logic ln);
    lane_op_t a, b;
    if (bc < 6) return chroma_step(1'b0, bc, ln);
    if (bc > 6) return chroma_step(1'b1, bc - 6, ln);
    // block cycle 7: Cb write-back (p path) overlaps the Cr buffer load (q path)
    a = chroma_step(1'b0, 6, ln);
    b = chroma_step(1'b1, 0, ln);
    a.q_src = b.q_src; a.q_blk = b.q_blk; a.q_dst = b.q_dst;
    return a;
  endfunction

  function automatic lane_op_t sched(input logic [1:0] p, input int bc, input logic ln);
    if (p == 2'd2) return chroma_op(bc, ln);
    return luma_op(p[0], bc, ln);
  endfunction

  // Bs of the line at position i along the edge of lane operation o.
  function automatic bs_t line_bs(input mb_info_t m, input lane_op_t o, input logic [1:0] i);
    int e, k;
    e = int'(o.edge_n); k = int'(o.seg);
    if (o.chroma) begin
      e = 2*e; k = 2*k + int'(i[1]);
    end
    return (o.op == OP_H) ? m.bs_ve[e][k] : m.bs_he[e][k];
  endfunction

  function automatic qp_t p_qp(input mb_info_t m, input lane_op_t o);
    qp_t [2:0] q;
    q = !o.chroma ? m.qp_y : (o.plane ? m.qp_cr : m.qp_cb);
    if (o.edge_n != 0) return q[0];
    return (o.op == OP_H) ? q[1] : q[2];
  endfunction

  function automatic qp_t q_qp(input mb_info_t m, input lane_op_t o);
    return !o.chroma ? m.qp_y[0] : (o.plane ? m.qp_cr[0] : m.qp_cb[0]);
  endfunction

  function automatic wsrc_e sram_src(input blk_t b);
    return blk_sram(b) ? S_SRAM1 : S_SRAM0;
  endfunction
  function automatic wsrc_e arr_src(input logic [1:0] a);
    case (a) 0: return S_ARR0; 1: return S_ARR1; 2: return S_ARR2; default: return S_ARR3; endcase
  endfunction

  // ----------------------------------------------------- per-clock decode
  lane_op_t   lop [2];
  int         bc_now;
  logic [1:0] i_now;
  bs_t        bs_now [2];
  pix_t       alpha_now [2], beta_now [2];
  logic [4:0] tc0_now [2];

  assign bc_now = int'(t) / 4;
  assign i_now  = t[1:0];
  assign bcyc   = 4'(bc_now);

  for (genvar n = 0; n < 2; n++) begin : g_thr
    assign lop[n]    = (state == ST_FILT && bc_now < FILT_BC) ? sched(ph, bc_now, n[0]) : nop();
    assign bs_now[n] = line_bs(mb_q, lop[n], i_now);
    dbf_threshold u_thr (
      .qp_p    (p_qp(mb_q, lop[n])),
      .qp_q    (q_qp(mb_q, lop[n])),
      .offset_a(mb_q.offset_a),
      .offset_b(mb_q.offset_b),
      .bs      (bs_now[n]),
      .alpha   (alpha_now[n]),
      .beta    (beta_now[n]),
      .tc0     (tc0_now[n])
    );
  end

  dp_ctrl_t dpn;   // control for the next clock

  // Load/store helpers. A transfer is a two-stage pipeline: in block slot j
  // the "fetch" half moves block j into a transpose array (one row per clock)
  // while the "drain" half empties block j-1 from the other array. Loads use
  // arrays 0/1, stores arrays 2/3, so that the stores of one phase and the
  // loads of the next run in the same clocks.
  blk_t ld_fetch_blk, ld_drain_blk, st_fetch_blk, st_drain_blk;
  logic ld_fetch, ld_drain, st_fetch, st_drain;
  logic [1:0] ld_ph;   // phase whose blocks are being loaded
  logic io_arr;        // array (of the pair) written by the fetch half

  always_comb begin
    io_arr = t[2];
    ld_ph  = (state == ST_LOAD || ph == 2'd2) ? ((state == ST_LOAD) ? ph : 2'd0) : ph + 2'd1;
    ld_fetch_blk = load_blk(ld_ph, int'(t) / 4);
    ld_drain_blk = load_blk(ld_ph, int'(t) / 4 - 1);
    st_fetch_blk = store_blk(ph, int'(t) / 4);
    st_drain_blk = store_blk(ph, int'(t) / 4 - 1);
    ld_fetch = 1'b0; ld_drain = 1'b0; st_fetch = 1'b0; st_drain = 1'b0;
    if (state == ST_LOAD || (state == ST_STORE && (ph != 2'd2 || ovl))) begin
      ld_fetch = (int'(t) < 4 * n_load(ld_ph));
      ld_drain = (t >= 8'd4) && (int'(t) < 4 * n_load(ld_ph) + 4);
    end
    if (state == ST_STORE) begin
      st_fetch = (int'(t) < 4 * n_store(ph));
      st_drain = (t >= 8'd4) && (int'(t) < 4 * n_store(ph) + 4);
    end
  end

  always_comb begin
    dpn = '0;
    dpn.idx = i_now;
    ext_rd_req = 1'b0; ext_rd_blk = '0; ext_rd_row = '0;
    sram_rd_en = '0; sram_rd_addr = '0;
    for (int a = 0; a < 4; a++) dpn.arr_wr_src[a] = S_NONE;
    for (int s = 0; s < 2; s++) begin
      dpn.sram_wr_src[s] = S_NONE; dpn.fifo_push_src[s] = S_NONE;
      dpn.lane_p[s] = S_NONE; dpn.lane_q[s] = S_NONE;
    end
    dpn.ext_wr_src = S_NONE;

    case (state)
      ST_LOAD, ST_STORE: begin
        // load: fetch row i of block j = t/4 into array j&1 ...
        if (ld_fetch) begin
          ext_rd_req = 1'b1;
          ext_rd_blk = ld_fetch_blk;
          ext_rd_row = i_now;
        end
        for (int a = 0; a < 2; a++) begin
          if (ld_fetch && io_arr == a[0]) dpn.arr_wr_src[a] = S_EXT;
          // ... while block j-1 leaves array (j-1)&1 for its SRAM,
          // top neighbours by column (transposed)
          if (ld_drain && io_arr != a[0]) dpn.arr_rd_col[a] = is_top(ld_drain_blk);
        end
        for (int s = 0; s < 2; s++)
          if (ld_drain && blk_sram(ld_drain_blk) == s[0]) begin
            dpn.sram_wr_src[s]  = io_arr ? S_ARR0 : S_ARR1;
            dpn.sram_wr_addr[s] = blk_addr(ld_drain_blk, i_now);
          end
        // store: row i of block j from its SRAM into array 2 + (j&1), in the
        // direction that turns column-form blocks back into rows ...
        for (int s = 0; s < 2; s++)
          if (st_fetch && blk_sram(st_fetch_blk) == s[0]) begin
            sram_rd_en[s]   = 1'b1;
            sram_rd_addr[s] = blk_addr(st_fetch_blk, i_now);
          end
        for (int a = 2; a < 4; a++)
          if (st_fetch && io_arr == a[0]) begin
            dpn.arr_wr_src[a] = sram_src(st_fetch_blk);
            dpn.arr_wr_col[a] = ends_col(st_fetch_blk);
          end
        // ... while block j-1 goes out of the other array row by row
        if (st_drain) begin
          dpn.ext_wr     = 1'b1;
          dpn.ext_wr_src = io_arr ? S_ARR2 : S_ARR3;
          dpn.ext_wr_blk = st_drain_blk;
          dpn.ext_wr_row = i_now;
        end
      end
      ST_FILT: begin
        for (int n = 0; n < 2; n++) begin
          logic col;
          wsrc_e fo_p, fo_q, ff;
          fo_p = (n == 1) ? S_F1P : S_F0P;
          fo_q = (n == 1) ? S_F1Q : S_F0Q;
          ff   = (n == 1) ? S_FIFO1 : S_FIFO0;
          col  = (lop[n].op != OP_H);   // arrays are accessed by column except around H filtering
          // sources
          case (lop[n].p_src)
            K_FIFO: dpn.lane_p[n] = ff;
            K_ARR:  dpn.lane_p[n] = arr_src(lop[n].p_arr);
            K_SRAM: dpn.lane_p[n] = sram_src(lop[n].p_blk);
            default: ;
          endcase
          case (lop[n].q_src)
            K_FIFO: dpn.lane_q[n] = ff;
            K_ARR:  dpn.lane_q[n] = arr_src(lop[n].q_arr);
            K_SRAM: dpn.lane_q[n] = sram_src(lop[n].q_blk);
            default: ;
          endcase
          dpn.fifo_pop[n] = (lop[n].p_src == K_FIFO) || (lop[n].q_src == K_FIFO);
          if (lop[n].p_dst == K_FIFO) dpn.fifo_push_src[n] = fo_p;
          if (lop[n].q_dst == K_FIFO) dpn.fifo_push_src[n] = fo_q;
          for (int a = 0; a < 4; a++) begin
            if ((lop[n].p_src == K_ARR && lop[n].p_arr == 2'(a)) ||
                (lop[n].q_src == K_ARR && lop[n].q_arr == 2'(a)))
              dpn.arr_rd_col[a] = col;
            if (lop[n].p_dst == K_ARR && lop[n].p_darr == 2'(a)) begin
              dpn.arr_wr_src[a] = fo_p; dpn.arr_wr_col[a] = col;
            end
            if (lop[n].q_dst == K_ARR && lop[n].q_darr == 2'(a)) begin
              dpn.arr_wr_src[a] = fo_q; dpn.arr_wr_col[a] = col;
            end
          end
          for (int s = 0; s < 2; s++) begin
            if (lop[n].p_src == K_SRAM && blk_sram(lop[n].p_blk) == s[0]) begin
              sram_rd_en[s] = 1'b1; sram_rd_addr[s] = blk_addr(lop[n].p_blk, i_now);
            end
            if (lop[n].q_src == K_SRAM && blk_sram(lop[n].q_blk) == s[0]) begin
              sram_rd_en[s] = 1'b1; sram_rd_addr[s] = blk_addr(lop[n].q_blk, i_now);
            end
            if (lop[n].p_dst == K_SRAM && blk_sram(lop[n].p_dblk) == s[0]) begin
              dpn.sram_wr_src[s] = fo_p; dpn.sram_wr_addr[s] = blk_addr(lop[n].p_dblk, i_now);
            end
            if (lop[n].q_dst == K_SRAM && blk_sram(lop[n].q_dblk) == s[0]) begin
              dpn.sram_wr_src[s] = fo_q; dpn.sram_wr_addr[s] = blk_addr(lop[n].q_dblk, i_now);
            end
          end
          // filter parameters
          dpn.par[n].en     = (lop[n].op != OP_MOVE);
          dpn.par[n].chroma = lop[n].chroma;
          dpn.par[n].bs     = bs_now[n];
          dpn.par[n].alpha  = alpha_now[n];
          dpn.par[n].beta   = beta_now[n];
          dpn.par[n].tc0    = tc0_now[n];
        end
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------ state sequencing
  logic last;
  always_comb begin
    case (state)
      ST_LOAD:  last = (int'(t) == 4 * n_load(ph) + 3);
      ST_FILT:  last = (int'(t) == 4 * FILT_BC - 1);
      ST_STORE: last = (int'(t) == 4 * (((ph != 2'd2 || ovl) && n_load(ld_ph) > n_store(ph))
                                        ? n_load(ld_ph) : n_store(ph)) + 3);
      default:  last = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= ST_IDLE;
      ph    <= '0;
      t     <= '0;
      done  <= 1'b0;
      dp    <= '0;
      mb_q  <= '0;
      mb_nxt <= '0;
      pend  <= 1'b0;
      ovl   <= 1'b0;
    end else begin
      dp   <= dpn;
      done <= 1'b0;
      // a start while busy queues the next MB (one deep)
      if (start && state != ST_IDLE && !pend) begin
        mb_nxt <= mb;
        pend   <= 1'b1;
      end
      case (state)
        ST_IDLE: if (pend || start) begin
          mb_q  <= pend ? mb_nxt : mb;
          pend  <= 1'b0;
          ph    <= 2'd0;
          t     <= '0;
          state <= ST_LOAD;
        end
        ST_LOAD: if (last) begin t <= '0; state <= ST_FILT; end else t <= t + 1'b1;
        ST_FILT: if (last) begin
          t     <= '0;
          state <= ST_STORE;
          // a next MB queued by now is loaded beside the final store
          if (ph == 2'd2) ovl <= pend;
        end else t <= t + 1'b1;
        ST_STORE: if (last) begin
          t <= '0;
          if (ph == 2'd2) begin
            done <= 1'b1;
            ovl  <= 1'b0;
            if (ovl) begin
              // the queued MB's upper half is already in the SRAMs
              mb_q  <= mb_nxt;
              pend  <= 1'b0;
              ph    <= 2'd0;
              state <= ST_FILT;
            end else state <= ST_IDLE;
          end else begin ph <= ph + 1'b1; state <= ST_FILT; end   // next phase already loaded
        end else t <= t + 1'b1;
        default: state <= ST_IDLE;
      endcase
    end
  end

  // The schedule must never ask an SRAM for two reads or two writes in one
  // clock: both lanes' SRAM accesses land on different SRAMs.
  always_ff @(posedge clk) begin
    if (!rst && state == ST_FILT) begin
      for (int n = 0; n < 2; n++) begin
        assert (!(lop[n].p_src == K_SRAM && lop[n].q_src == K_SRAM &&
                  blk_sram(lop[n].p_blk) == blk_sram(lop[n].q_blk)))
          else $error("dbf_controller: two reads of one SRAM");
      end
      assert (!(lop[0].q_src == K_SRAM && lop[1].q_src == K_SRAM &&
                blk_sram(lop[0].q_blk) == blk_sram(lop[1].q_blk)))
        else $error("dbf_controller: SRAM read conflict between units");
      assert (!(lop[0].p_dst == K_SRAM && lop[1].p_dst == K_SRAM &&
                blk_sram(lop[0].p_dblk) == blk_sram(lop[1].p_dblk)))
        else $error("dbf_controller: SRAM write conflict between units");
    end
  end

endmodule
