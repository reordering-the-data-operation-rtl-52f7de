// Edge filter unit: filters one line of eight samples p3 p2 p1 p0 | q0 q1 q2 q3
// across a 4x4 block edge, as defined for the H.264/AVC in-loop de-blocking
// filter.
//
// How it works: the unit first decides whether the line is filtered at all
// (Bs != 0, |p0-q0| < alpha, |p1-p0| < beta, |q1-q0| < beta). For Bs 1..3 it
// applies the normal mode: p0/q0 move by a clipped delta, and for luma p1
// (q1) also moves when |p2-p0| < beta (|q2-q0| < beta); the clip bound tC is
// tC0 plus one per such side for luma, tC0+1 for chroma. For Bs 4 it applies
// the strong mode: on each luma side where |p2-p0| < beta (resp. q) and
// |p0-q0| < (alpha>>2)+2 it rewrites three samples with the long taps,
// otherwise only p0 (q0) with the short 3-tap filter; chroma always uses the
// short filter. All of this follows the filter equations of the standard as
// given in the design description.
//
// Interface: p_in carries the p block's row (or transposed column) with p0
// in the last pixel, q_in the q block's with q0 in the first pixel, as two
// 32-bit buses in and two out ("parallel-in parallel-out"). par holds the
// mode and thresholds; par.en = 0 passes the samples through (used when the
// unit only moves data). p3 and q3 are only read: the standard never
// changes them, so those output bits are wires from the inputs.
//
// Timing: purely combinational; the surrounding datapath registers the
// result, so the unit filters one line per clock, a 4x4 edge in four clocks.
module edge_filter
  import dbf_pkg::*;
(
  input  word_t     p_in,
  input  word_t     q_in,
  input  filt_par_t par,
  output word_t     p_out,
  output word_t     q_out,
  output logic      filtered   // the line was modified by the filter
);

  // Samples as 12-bit signed values (enough for all intermediate sums here).
  typedef logic signed [11:0] s_t;

  s_t p0, p1, p2, p3, q0, q1, q2, q3;
  assign p3 = s_t'({4'd0, p_in[7:0]});
  assign p2 = s_t'({4'd0, p_in[15:8]});
  assign p1 = s_t'({4'd0, p_in[23:16]});
  assign p0 = s_t'({4'd0, p_in[31:24]});
  assign q0 = s_t'({4'd0, q_in[7:0]});
  assign q1 = s_t'({4'd0, q_in[15:8]});
  assign q2 = s_t'({4'd0, q_in[23:16]});
  assign q3 = s_t'({4'd0, q_in[31:24]});

  function automatic s_t absd(input s_t a, input s_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  function automatic s_t clip3(input s_t lo, input s_t hi, input s_t v);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  function automatic pix_t clip1(input s_t v);
    return (v < 0) ? 8'd0 : ((v > 255) ? 8'd255 : v[7:0]);
  endfunction

  s_t alpha, beta, tc0;
  assign alpha = s_t'({4'd0, par.alpha});
  assign beta  = s_t'({4'd0, par.beta});
  assign tc0   = s_t'({7'd0, par.tc0});

  logic filter_on, ap, aq, strong_gate;
  assign filter_on   = par.en && (par.bs != 3'd0) && (absd(p0, q0) < alpha) &&
                       (absd(p1, p0) < beta) && (absd(q1, q0) < beta);
  assign ap          = absd(p2, p0) < beta;
  assign aq          = absd(q2, q0) < beta;
  assign strong_gate = absd(p0, q0) < ((alpha >>> 2) + 12'sd2);

  pix_t np0, np1, np2, nq0, nq1, nq2;
  s_t   tc, delta, dp1, dq1;

  always_comb begin
    np0 = p0[7:0]; np1 = p1[7:0]; np2 = p2[7:0];
    nq0 = q0[7:0]; nq1 = q1[7:0]; nq2 = q2[7:0];
    tc = '0; delta = '0; dp1 = '0; dq1 = '0;
    if (filter_on) begin
      if (par.bs != 3'd4) begin
        // normal mode
        tc = par.chroma ? tc0 + 12'sd1
                        : tc0 + (ap ? 12'sd1 : 12'sd0) + (aq ? 12'sd1 : 12'sd0);
        delta = clip3(-tc, tc, ((((q0 - p0) <<< 2) + (p1 - q1) + 12'sd4) >>> 3));
        np0 = clip1(p0 + delta);
        nq0 = clip1(q0 - delta);
        if (!par.chroma) begin
          dp1 = clip3(-tc0, tc0, (p2 + ((p0 + q0 + 12'sd1) >>> 1) - (p1 <<< 1)) >>> 1);
          dq1 = clip3(-tc0, tc0, (q2 + ((p0 + q0 + 12'sd1) >>> 1) - (q1 <<< 1)) >>> 1);
          if (ap) np1 = pix_t'(p1 + dp1);
          if (aq) nq1 = pix_t'(q1 + dq1);
        end
      end else begin
        // strong mode
        if (!par.chroma && ap && strong_gate) begin
          np0 = pix_t'((p2 + 12'sd2*p1 + 12'sd2*p0 + 12'sd2*q0 + q1 + 12'sd4) >>> 3);
          np1 = pix_t'((p2 + p1 + p0 + q0 + 12'sd2) >>> 2);
          np2 = pix_t'((12'sd2*p3 + 12'sd3*p2 + p1 + p0 + q0 + 12'sd4) >>> 3);
        end else begin
          np0 = pix_t'((12'sd2*p1 + p0 + q1 + 12'sd2) >>> 2);
        end
        if (!par.chroma && aq && strong_gate) begin
          nq0 = pix_t'((p1 + 12'sd2*p0 + 12'sd2*q0 + 12'sd2*q1 + q2 + 12'sd4) >>> 3);
          nq1 = pix_t'((p0 + q0 + q1 + q2 + 12'sd2) >>> 2);
          nq2 = pix_t'((12'sd2*q3 + 12'sd3*q2 + q1 + q0 + p0 + 12'sd4) >>> 3);
        end else begin
          nq0 = pix_t'((12'sd2*q1 + q0 + p1 + 12'sd2) >>> 2);
        end
      end
    end
  end

  assign p_out    = {np0, np1, np2, p_in[7:0]};
  assign q_out    = {q_in[31:24], nq2, nq1, nq0};
  assign filtered = filter_on;

endmodule
