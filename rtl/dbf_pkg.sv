// Shared types and constants of the H.264/AVC de-blocking filter.
//
// Pixels are 8 bits. A "word" is four pixels of one row (or, for a block held
// transposed, of one column) of a 4x4 block; pixel k of a word sits in bits
// [8k+7:8k], k = 0 being the leftmost (topmost) pixel. For the p side of an
// edge, pixel 3 of the word is p0; for the q side, pixel 0 is q0.
//
// Block numbering of one macro-block (MB) and its neighbours, 40 blocks of
// 4x4 pixels:
//   0..15  luma blocks B0..B15, raster order inside the 16x16 luma block
//   16..19 Cb blocks B16..B19, 20..23 Cr blocks B20..B23 (raster order)
//   24..27 left luma neighbours L1..L4 (one per block row)
//   28..29 left Cb neighbours L5, L6; 30..31 left Cr neighbours L7, L8
//   32..35 top luma neighbours T1..T4 (one per block column)
//   36..37 top Cb neighbours T5, T6;  38..39 top Cr neighbours T7, T8
// The letters B, L, T and the numbering follow the filtering-order figure of
// the architecture; the assignment of L5..L8 and T5..T8 to Cb/Cr is this
// design's choice.
package dbf_pkg;

  localparam int unsigned PIX_W   = 8;
  localparam int unsigned WORD_W  = 4 * PIX_W;   // 32-bit data bus
  localparam int unsigned BLK_W   = 6;           // block id width

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [BLK_W-1:0]  blk_t;
  typedef logic [2:0]        bs_t;
  typedef logic [5:0]        qp_t;      // 0..51
  typedef logic signed [4:0] offset_t;  // FilterOffsetA/B, -12..12

  // Parameters the filter unit needs for one line of samples.
  typedef struct packed {
    logic  en;       // 0: pass the samples through unchanged
    logic  chroma;   // chroma edge (only p0/q0 are modified)
    bs_t   bs;       // boundary strength 0..4
    pix_t  alpha;
    pix_t  beta;
    logic [4:0] tc0;
  } filt_par_t;

  // Per-MB side information, latched when a macro-block starts.
  //   bs_ve[e][k]: Bs of luma vertical edge e (0 = MB left edge), block row k
  //   bs_he[e][k]: Bs of luma horizontal edge e (0 = MB top edge), block column k
  // Chroma edges reuse the luma Bs of the corresponding luma samples.
  typedef struct packed {
    bs_t [3:0][3:0] bs_ve;
    bs_t [3:0][3:0] bs_he;
    qp_t [2:0] qp_y;    // [0] current MB, [1] left MB, [2] top MB
    qp_t [2:0] qp_cb;
    qp_t [2:0] qp_cr;
    offset_t   offset_a;
    offset_t   offset_b;
  } mb_info_t;

  // Sources of a 32-bit word inside the datapath.
  typedef enum logic [3:0] {
    S_NONE  = 4'd0,
    S_SRAM0 = 4'd1,  S_SRAM1 = 4'd2,
    S_FIFO0 = 4'd3,  S_FIFO1 = 4'd4,
    S_ARR0  = 4'd5,  S_ARR1  = 4'd6,  S_ARR2 = 4'd7, S_ARR3 = 4'd8,
    S_F0P   = 4'd9,  S_F0Q   = 4'd10, S_F1P  = 4'd11, S_F1Q = 4'd12,
    S_EXT   = 4'd13
  } wsrc_e;

  // Datapath control for one clock (the "execute" stage).
  typedef struct packed {
    wsrc_e [1:0]      lane_p;        // filter unit n, p input
    wsrc_e [1:0]      lane_q;        // filter unit n, q input
    filt_par_t [1:0]  par;           // filter unit n parameters
    logic [1:0]       idx;           // row/column index for arrays
    logic [3:0]       arr_rd_col;    // array n is read by column
    wsrc_e [3:0]      arr_wr_src;    // S_NONE: no write
    logic [3:0]       arr_wr_col;    // array n is written by column
    wsrc_e [1:0]      sram_wr_src;   // S_NONE: no write
    logic [1:0][5:0]  sram_wr_addr;
    logic [1:0]       fifo_pop;
    wsrc_e [1:0]      fifo_push_src; // S_NONE: no push
    logic             ext_wr;        // word from array 0/1 to external memory
    wsrc_e            ext_wr_src;
    blk_t             ext_wr_blk;
    logic [1:0]       ext_wr_row;
  } dp_ctrl_t;

  // Internal SRAM (0 or 1) that holds a block. The two SRAMs are interleaved
  // in a checkerboard so that horizontally and vertically adjacent blocks sit
  // in different SRAMs.
  function automatic logic blk_sram(input blk_t blk);
    int b, r, c;
    b = int'(blk);
    if (b < 16) begin r = b / 4; c = b % 4; end
    else if (b < 24) begin r = ((b - 16) % 4) / 2; c = (b - 16) % 2; end
    else if (b < 28) begin r = b - 24; c = -1; end
    else if (b < 32) begin r = (b - 28) % 2; c = -1; end
    else if (b < 36) begin r = -1; c = b - 32; end
    else begin r = -1; c = (b - 36) % 2; end
    return 1'((r + c + 3) % 2);
  endfunction

  // Slot (group of 4 words) of a block inside its SRAM. Slots are reused
  // between the three phases (upper luma, lower luma, chroma); B4..B7 keep
  // slots 0..1 from the upper into the lower luma phase.
  function automatic logic [3:0] blk_slot(input blk_t blk);
    int b, r, c;
    b = int'(blk);
    if (b < 16) begin
      r = b / 4; c = b % 4;
      case (r)
        1: return 4'(c / 2);
        0, 2: return 4'(2 + c / 2);
        default: return 4'(4 + c / 2);
      endcase
    end
    else if (b < 24) return 4'((b - 16) / 2);     // Cb rows 0,1; Cr rows 2,3
    else if (b < 28) return 4'd6;                 // L1..L4
    else if (b < 32) return 4'(6 + (b - 28) / 2); // L5,L6 -> 6 ; L7,L8 -> 7
    else if (b < 36) return 4'(4 + (b - 32) / 2); // T1..T4
    else return 4'(4 + (b - 36) / 2);             // T5,T6 -> 4 ; T7,T8 -> 5
  endfunction

  function automatic logic [5:0] blk_addr(input blk_t b, input logic [1:0] row);
    return {blk_slot(b), row};
  endfunction

endpackage
