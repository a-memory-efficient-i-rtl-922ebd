// df_filter4: strong/weak luma filter unit, four lines in parallel.
// Each line takes the 8 samples p3..p0 | q0..q3 across the edge. The strong
// filter rewrites three samples per side (p2..q2), the weak filter at most two
// (p1..q1; p1/q1 only when dEp/dEq allow it, nothing when |delta| >= 10*tc).
// Both are computed for every line and the decision selects the output, as in
// the document's filter unit. Equations and clipping are those of HEVC.
// Index: p[k][i] is line k, distance i from the edge. Combinational.
module df_filter4
  import hevc_pkg::*;
(
  input  df_dec_t dec,
  input  logic    line_en [4],     // a line not enabled passes through
  input  pix_t    p  [4][4],
  input  pix_t    q  [4][4],
  output pix_t    po [4][4],
  output pix_t    qo [4][4]
);
  always_comb begin
    for (int k = 0; k < 4; k++) begin
      int p0, p1, p2, p3, q0, q1, q2, q3, tc, dl, dpv, dqv;
      p0 = int'(p[k][0]); p1 = int'(p[k][1]); p2 = int'(p[k][2]); p3 = int'(p[k][3]);
      q0 = int'(q[k][0]); q1 = int'(q[k][1]); q2 = int'(q[k][2]); q3 = int'(q[k][3]);
      tc = int'(dec.tc);
      dl = 0; dpv = 0; dqv = 0;
      po[k] = p[k];
      qo[k] = q[k];
      if (line_en[k] && dec.mode == DF_STRONG) begin
        po[k][0] = pix_t'(clip3(p0 - 2*tc, p0 + 2*tc, (p2 + 2*p1 + 2*p0 + 2*q0 + q1 + 4) >>> 3));
        po[k][1] = pix_t'(clip3(p1 - 2*tc, p1 + 2*tc, (p2 + p1 + p0 + q0 + 2) >>> 2));
        po[k][2] = pix_t'(clip3(p2 - 2*tc, p2 + 2*tc, (2*p3 + 3*p2 + p1 + p0 + q0 + 4) >>> 3));
        qo[k][0] = pix_t'(clip3(q0 - 2*tc, q0 + 2*tc, (p1 + 2*p0 + 2*q0 + 2*q1 + q2 + 4) >>> 3));
        qo[k][1] = pix_t'(clip3(q1 - 2*tc, q1 + 2*tc, (p0 + q0 + q1 + q2 + 2) >>> 2));
        qo[k][2] = pix_t'(clip3(q2 - 2*tc, q2 + 2*tc, (p0 + q0 + q1 + 3*q2 + 2*q3 + 4) >>> 3));
      end else if (line_en[k] && dec.mode == DF_WEAK) begin
        dl = (9 * (q0 - p0) - 3 * (q1 - p1) + 8) >>> 4;
        if (iabs(dl) < tc * 10) begin
          dl = clip3(-tc, tc, dl);
          po[k][0] = clip_pix(p0 + dl);
          qo[k][0] = clip_pix(q0 - dl);
          if (dec.dep) begin
            dpv = clip3(-(tc >>> 1), tc >>> 1, (((p2 + p0 + 1) >>> 1) - p1 + dl) >>> 1);
            po[k][1] = clip_pix(p1 + dpv);
          end
          if (dec.deq) begin
            dqv = clip3(-(tc >>> 1), tc >>> 1, (((q2 + q0 + 1) >>> 1) - q1 - dl) >>> 1);
            qo[k][1] = clip_pix(q1 + dqv);
          end
        end
      end
    end
  end
endmodule
