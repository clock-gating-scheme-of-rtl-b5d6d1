// dbf_filter_unit: one edge filter of the parallel de-blocking filter. The
// same unit serves as horizontal filter (HF1, HF2: a row across a vertical
// edge) and as vertical filter (VF3, VF4: a column across a horizontal edge).
//
// Inputs are the four pixels on each side of the edge, p[0]/q[0] nearest to
// it, and the thresholds beta and tC. The unit is combinational and decides
// per line:
//   dp = |p2 - 2p1 + p0|, dq = |q2 - 2q1 + q0|, d = dp + dq
//   no filtering   unless en and 2d < beta
//   strong filter  if 4d < beta>>2, |p3-p0| + |q0-q3| < beta>>3 and
//                  |p0-q0| < (5tC+1)>>1: p0..p2 and q0..q2 are replaced by
//                  low-pass averages, each clipped to +-2tC of its input
//   normal filter  otherwise: delta = (9(q0-p0) - 3(q1-p1) + 8) >> 4; if
//                  |delta| < 10tC it is clipped to +-tC and added to p0,
//                  subtracted from q0; p1 (q1) is corrected as well when
//                  2dp (2dq) < (beta + beta>>1) >> 3.
// These are the HEVC luma rules with each decision taken on the line itself
// (HEVC sums lines 0 and 3 of a four-line segment; here a line counts twice).
// p3 and q3 are never changed, so those output bytes are wired through.
// With CHROMA = 1 the unit is the HEVC chroma filter instead: if en, delta =
// clip(+-tC, (4(q0-p0) + p1 - q1 + 4) >> 3) is added to p0 and subtracted
// from q0; nothing else changes and is_strong stays 0.
// The source gives the units' role and number, not their arithmetic: the HEVC
// filter is this design's choice.
module dbf_filter_unit
  import dbf_pkg::*;
#(
  parameter bit CHROMA = 1'b0
) (
  input  line4_t p,
  input  line4_t q,
  input  thr_t   thr,
  output line4_t p_o,
  output line4_t q_o,
  output logic   filtered,   // a filter was applied to this line
  output logic   is_strong     // it was the strong filter
);

  function automatic int clip3(int lo, int hi, int v);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  always_comb begin
    int p0, p1, p2, p3, q0, q1, q2, q3;
    int beta, tc, dp, dq, d, delta, dlt_p, dlt_q;
    p0 = int'(p[0]); p1 = int'(p[1]); p2 = int'(p[2]); p3 = int'(p[3]);
    q0 = int'(q[0]); q1 = int'(q[1]); q2 = int'(q[2]); q3 = int'(q[3]);
    beta = int'(thr.beta);
    tc   = int'(thr.tc);
    dp = iabs(p2 - 2 * p1 + p0);
    dq = iabs(q2 - 2 * q1 + q0);
    d  = dp + dq;
    delta = (9 * (q0 - p0) - 3 * (q1 - p1) + 8) >>> 4;
    dlt_p = 0;
    dlt_q = 0;

    p_o = p;
    q_o = q;
    filtered = 1'b0;
    is_strong = 1'b0;

    if (CHROMA) begin
      if (thr.en) begin
        delta  = clip3(-tc, tc, (4 * (q0 - p0) + p1 - q1 + 4) >>> 3);
        filtered = 1'b1;
        p_o[0] = pix_t'(clip3(0, 255, p0 + delta));
        q_o[0] = pix_t'(clip3(0, 255, q0 - delta));
      end
    end else if (thr.en && (2 * d < beta)) begin
      if ((4 * d < (beta >> 2)) && (iabs(p3 - p0) + iabs(q0 - q3) < (beta >> 3)) &&
          (iabs(p0 - q0) < ((5 * tc + 1) >> 1))) begin
        filtered = 1'b1;
        is_strong = 1'b1;
        p_o[0] = pix_t'(clip3(p0 - 2*tc, p0 + 2*tc, (p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >>> 3));
        p_o[1] = pix_t'(clip3(p1 - 2*tc, p1 + 2*tc, (p2 + p1 + p0 + q0 + 2) >>> 2));
        p_o[2] = pix_t'(clip3(p2 - 2*tc, p2 + 2*tc, (2*p3 + 3*p2 + p1 + p0 + q0 + 4) >>> 3));
        q_o[0] = pix_t'(clip3(q0 - 2*tc, q0 + 2*tc, (p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) >>> 3));
        q_o[1] = pix_t'(clip3(q1 - 2*tc, q1 + 2*tc, (p0 + q0 + q1 + q2 + 2) >>> 2));
        q_o[2] = pix_t'(clip3(q2 - 2*tc, q2 + 2*tc, (p0 + q0 + q1 + 3*q2 + 2*q3 + 4) >>> 3));
      end else if (iabs(delta) < 10 * tc) begin
        filtered = 1'b1;
        delta  = clip3(-tc, tc, delta);
        p_o[0] = pix_t'(clip3(0, 255, p0 + delta));
        q_o[0] = pix_t'(clip3(0, 255, q0 - delta));
        if (2 * dp < ((beta + (beta >> 1)) >> 3)) begin
          dlt_p  = clip3(-(tc >> 1), tc >> 1, (((p2 + p0 + 1) >>> 1) - p1 + delta) >>> 1);
          p_o[1] = pix_t'(clip3(0, 255, p1 + dlt_p));
        end
        if (2 * dq < ((beta + (beta >> 1)) >> 3)) begin
          dlt_q  = clip3(-(tc >> 1), tc >> 1, (((q2 + q0 + 1) >>> 1) - q1 - delta) >>> 1);
          q_o[1] = pix_t'(clip3(0, 255, q1 + dlt_q));
        end
      end
    end
  end

endmodule
