// df_edge_detect: edge detection unit of the deblocking filter (luma, one
// 4-line edge segment), with the prediction-based judge.
// From QP and boundary strength it looks up beta and tc, measures the
// second-derivative activity [1,-2,1] of lines 0 and 3 on both sides of the
// edge (dp0, dp3, dq0, dq3) and decides, as HEVC does: off, weak (with the
// dEp/dEq side flags) or strong. The prediction-based judge (pred_on) decides
// from the P side alone, for an edge whose Q block is not decoded yet:
// it predicts "filter on" when dp0+dp3 < beta/2, i.e. it assumes dq ~ dp.
// Indices: p[k][i] is line k (0..3 along the edge), distance i (0..3) from it.
// Purely combinational.
module df_edge_detect
  import hevc_pkg::*;
(
  input  pix_t             p [4][4],
  input  pix_t             q [4][4],
  input  logic [1:0]       bs,
  input  logic [5:0]       qp,
  input  logic signed [4:0] beta_offset,  // slice_beta_offset_div2 * 2
  input  logic signed [4:0] tc_offset,    // slice_tc_offset_div2 * 2
  output df_dec_t          dec,
  output logic [6:0]       beta,
  output logic             pred_on
);
  logic signed [31:0] b, t, dp0, dp3, dq0, dq3, d;
  logic ds0, ds3;

  function automatic logic dsam(input int dpq, input pix_t p0, input pix_t p3,
                                input pix_t q0, input pix_t q3, input int bb, input int tt);
    return (2 * dpq < (bb >>> 2)) &&
           (iabs(int'(p3) - int'(p0)) + iabs(int'(q0) - int'(q3)) < (bb >>> 3)) &&
           (iabs(int'(p0) - int'(q0)) < ((5 * tt + 1) >>> 1));
  endfunction

  always_comb begin
    b   = df_beta(clip3(0, 51, int'(qp) + int'(beta_offset)));
    t   = df_tc(clip3(0, 53, int'(qp) + 2 * (int'(bs) - 1) + int'(tc_offset)));
    dp0 = iabs(int'(p[0][2]) - 2 * int'(p[0][1]) + int'(p[0][0]));
    dp3 = iabs(int'(p[3][2]) - 2 * int'(p[3][1]) + int'(p[3][0]));
    dq0 = iabs(int'(q[0][2]) - 2 * int'(q[0][1]) + int'(q[0][0]));
    dq3 = iabs(int'(q[3][2]) - 2 * int'(q[3][1]) + int'(q[3][0]));
    d   = dp0 + dq0 + dp3 + dq3;
    ds0 = dsam(dp0 + dq0, p[0][0], p[0][3], q[0][0], q[0][3], b, t);
    ds3 = dsam(dp3 + dq3, p[3][0], p[3][3], q[3][0], q[3][3], b, t);
    beta    = 7'(b);
    dec.tc  = 5'(t);
    dec.dep = (dp0 + dp3) < ((b + (b >>> 1)) >>> 3);
    dec.deq = (dq0 + dq3) < ((b + (b >>> 1)) >>> 3);
    if (bs == 2'd0 || d >= b) dec.mode = DF_OFF;
    else if (ds0 && ds3)      dec.mode = DF_STRONG;
    else                      dec.mode = DF_WEAK;
    pred_on = (bs != 2'd0) && (2 * (dp0 + dp3) < b);
  end
endmodule
