// Threshold derivation for one edge: from the quantisation parameters of the
// two blocks that meet at the edge, the slice's filter offsets and the
// boundary strength, produce alpha, beta and tC0.
//
// How it works: qPav = (qPp + qPq + 1) >> 1; indexA = Clip3(0, 51, qPav +
// FilterOffsetA) addresses the alpha table and the tC0 table (one row per Bs
// 1..3); indexB = Clip3(0, 51, qPav + FilterOffsetB) addresses the beta table.
// The tables are the 8-bit-sample tables of the standard, as printed in the
// design description. For Bs = 4 and Bs = 0, tC0 is not used and reads 0.
//
// Interface: plain combinational inputs and outputs.
// Timing: combinational; in the full design it sits in the control unit and
// is evaluated in the same clock as the samples it serves.
module dbf_threshold
  import dbf_pkg::*;
(
  input  qp_t     qp_p,
  input  qp_t     qp_q,
  input  offset_t offset_a,
  input  offset_t offset_b,
  input  bs_t     bs,
  output pix_t    alpha,
  output pix_t    beta,
  output logic [4:0] tc0
);

  localparam pix_t ALPHA_TAB [52] = '{
    0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    4, 4, 5, 6, 7, 8, 9, 10, 12, 13, 15, 17, 20, 22, 25, 28,
    32, 36, 40, 45, 50, 56, 63, 71, 80, 90, 101, 113, 127, 144, 162, 182,
    203, 226, 255, 255};

  localparam pix_t BETA_TAB [52] = '{
    0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
    2, 2, 2, 3, 3, 3, 3, 4, 4, 4, 6, 6, 7, 7, 8, 8,
    9, 9, 10, 10, 11, 11, 12, 12, 13, 13, 14, 14, 15, 15, 16, 16,
    17, 17, 18, 18};

  localparam logic [4:0] TC0_TAB [3][52] = '{
    '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
      0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1, 1,
      1, 2, 2, 2, 2, 3, 3, 3, 4, 4, 4, 5, 6, 6, 7, 8,
      9, 10, 11, 13},
    '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
      0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 2,
      2, 2, 2, 3, 3, 3, 4, 4, 5, 5, 6, 7, 8, 8, 10, 11,
      12, 13, 15, 17},
    '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
      0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 2, 2, 2, 2, 3,
      3, 3, 4, 4, 4, 5, 6, 6, 7, 8, 9, 10, 11, 13, 14, 16,
      18, 20, 23, 25}};

  function automatic logic [5:0] clip_index(input logic signed [7:0] v);
    return (v < 0) ? 6'd0 : ((v > 51) ? 6'd51 : v[5:0]);
  endfunction

  logic signed [7:0] qpav;
  logic [5:0] index_a, index_b;

  always_comb begin
    qpav    = 8'(({2'b00, qp_p} + {2'b00, qp_q} + 8'd1) >> 1);
    index_a = clip_index(qpav + 8'(offset_a));
    index_b = clip_index(qpav + 8'(offset_b));
    alpha   = ALPHA_TAB[index_a];
    beta    = BETA_TAB[index_b];
    tc0     = (bs >= 3'd1 && bs <= 3'd3) ? TC0_TAB[2'(bs - 3'd1)][index_a] : 5'd0;
  end

endmodule
