// H.264/AVC in-loop de-blocking filter for one macro-block at a time, built
// around a reordered filtering sequence that lets two edge filter units work
// in parallel and reuse each just-filtered 4x4 block directly for its next
// edge instead of writing it back and re-reading it.
//
// Structure (the parts named in the architecture): two interleaved 32-bit
// internal SRAMs (48 words each), two parallel-in parallel-out edge filter
// units, two 4-word data buffers (FIFOs), four 4x4 transpose arrays and the
// control unit, which also supplies Bs, alpha, beta and tC0. Every internal
// bus is 32 bits, i.e. four pixels of a row or of a column.
//
// Operation: pulse start with the MB's side information on mb (while ready;
// a start during an MB queues the next one, see dbf_controller). The filter
// fetches the 40 blocks it needs (24 of the MB, 8 left and 8 top neighbour
// blocks) row by row through ext_rd_*, filters every edge of the MB in the
// order vertical-before-horizontal that the standard's result requires, and
// writes all 40 blocks back through ext_wr_*. Block numbering is given in
// dbf_pkg. External memory must return the requested row in the clock after
// ext_rd_req (fixed latency 1) on ext_rd_data. done pulses once all stores are
// issued.
//
// Timing: 397 clocks per MB from start to done: 160 words are read and 160
// written, 3 x 52 = 156 clocks are spent filtering, and the stores of one
// phase overlap the loads of the next (see dbf_controller). With the next MB
// queued, its first load overlaps the final store and an MB completes every
// 336 clocks. The datapath is one register stage behind the control unit:
// SRAM reads, external reads,
// data-buffer and transpose-array reads all meet in the execute stage, pass
// the combinational filters, and are written to SRAM, buffers or arrays at
// the end of that clock.
//
// Observation outputs, for test and monitoring: filt_en shows which filter
// units work on an edge in the current clock and filt_active which of them
// actually modified their line.
module deblock_top
  import dbf_pkg::*;
#(
  parameter int unsigned SRAM_DEPTH = 48
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  mb_info_t   mb,
  output logic       busy,
  output logic       ready,   // start would be accepted (queues the next MB while busy)
  output logic       done,
  output logic       ext_rd_req,
  output blk_t       ext_rd_blk,
  output logic [1:0] ext_rd_row,
  input  word_t      ext_rd_data,
  output logic       ext_wr_en,
  output blk_t       ext_wr_blk,
  output logic [1:0] ext_wr_row,
  output word_t      ext_wr_data,
  output logic [1:0] filt_active,   // filter unit n filtered a line this clock
  output logic [1:0] filt_en        // filter unit n is working on an edge this clock
);

  localparam int unsigned AW = $clog2(SRAM_DEPTH);

  dp_ctrl_t         dp;
  logic [1:0]       sram_rd_en;
  logic [1:0][5:0]  sram_rd_addr;
  word_t            sram_rd_data [2];
  word_t            fifo_head [2];
  word_t            arr_rd [4];
  word_t            fp_out [2], fq_out [2];
  word_t            lane_p_in [2], lane_q_in [2];
  logic [1:0]       phase_o, step_o;
  logic [3:0]       bcyc_o;

  dbf_controller u_ctrl (
    .clk, .rst, .start, .mb, .busy, .ready, .done,
    .ext_rd_req, .ext_rd_blk, .ext_rd_row,
    .sram_rd_en, .sram_rd_addr,
    .dp,
    .phase(phase_o), .step(step_o), .bcyc(bcyc_o)
  );

  // word multiplexer of the execute stage
  function automatic word_t pick(input wsrc_e s,
                                 input word_t s0, input word_t s1,
                                 input word_t f0, input word_t f1,
                                 input word_t a0, input word_t a1,
                                 input word_t a2, input word_t a3,
                                 input word_t l0p, input word_t l0q,
                                 input word_t l1p, input word_t l1q,
                                 input word_t ex);
    case (s)
      S_SRAM0: return s0;
      S_SRAM1: return s1;
      S_FIFO0: return f0;
      S_FIFO1: return f1;
      S_ARR0:  return a0;
      S_ARR1:  return a1;
      S_ARR2:  return a2;
      S_ARR3:  return a3;
      S_F0P:   return l0p;
      S_F0Q:   return l0q;
      S_F1P:   return l1p;
      S_F1Q:   return l1q;
      S_EXT:   return ex;
      default: return '0;
    endcase
  endfunction

  // filter inputs never take a filter output, which keeps the datapath free of
  // combinational loops
  `define DBF_PICK_IN(s) pick((s), sram_rd_data[0], sram_rd_data[1], fifo_head[0], fifo_head[1], \
      arr_rd[0], arr_rd[1], arr_rd[2], arr_rd[3], '0, '0, '0, '0, ext_rd_data)
  `define DBF_PICK(s) pick((s), sram_rd_data[0], sram_rd_data[1], fifo_head[0], fifo_head[1], \
      arr_rd[0], arr_rd[1], arr_rd[2], arr_rd[3], fp_out[0], fq_out[0], fp_out[1], fq_out[1], \
      ext_rd_data)

  // ---------------------------------------------------------- SRAMs
  for (genvar s = 0; s < 2; s++) begin : g_sram
    dbf_sram #(.DEPTH(SRAM_DEPTH)) u_sram (
      .clk,
      .rd_en  (sram_rd_en[s]),
      .rd_addr(AW'(sram_rd_addr[s])),
      .rd_data(sram_rd_data[s]),
      .wr_en  (!rst && dp.sram_wr_src[s] != S_NONE),
      .wr_addr(AW'(dp.sram_wr_addr[s])),
      .wr_data(`DBF_PICK(dp.sram_wr_src[s]))
    );
  end

  // ------------------------------------------- filter units and data buffers
  for (genvar n = 0; n < 2; n++) begin : g_lane
    assign lane_p_in[n] = `DBF_PICK_IN(dp.lane_p[n]);
    assign lane_q_in[n] = `DBF_PICK_IN(dp.lane_q[n]);

    edge_filter u_filt (
      .p_in    (lane_p_in[n]),
      .q_in    (lane_q_in[n]),
      .par     (dp.par[n]),
      .p_out   (fp_out[n]),
      .q_out   (fq_out[n]),
      .filtered(filt_active[n])
    );
    assign filt_en[n] = dp.par[n].en;

    logic fifo_empty, fifo_full;
    data_fifo #(.DEPTH(4)) u_fifo (
      .clk, .rst,
      .push (dp.fifo_push_src[n] != S_NONE),
      .din  (`DBF_PICK(dp.fifo_push_src[n])),
      .pop  (dp.fifo_pop[n]),
      .head (fifo_head[n]),
      .empty(fifo_empty),
      .full (fifo_full)
    );
  end

  // ------------------------------------------------------ transpose buffer
  for (genvar a = 0; a < 4; a++) begin : g_arr
    transpose_array u_arr (
      .clk, .rst,
      .wr_en  (dp.arr_wr_src[a] != S_NONE),
      .wr_col (dp.arr_wr_col[a]),
      .wr_idx (dp.idx),
      .wr_data(`DBF_PICK(dp.arr_wr_src[a])),
      .rd_col (dp.arr_rd_col[a]),
      .rd_idx (dp.idx),
      .rd_data(arr_rd[a])
    );
  end

  // ------------------------------------------------------- external stores
  assign ext_wr_en   = dp.ext_wr;
  assign ext_wr_blk  = dp.ext_wr_blk;
  assign ext_wr_row  = dp.ext_wr_row;
  assign ext_wr_data = `DBF_PICK(dp.ext_wr_src);

  `undef DBF_PICK
  `undef DBF_PICK_IN

endmodule
