// idst4_pe: 4-point inverse DST processing engine (HEVC 4x4 intra luma).
// Uses the constants 29, 55, 74 and 84 of the DST matrix. It shares partial
// sums the way the standard's fast inverse DST does: c0+c2, c2+c3, c0-c3 and
// 74*c1, so it needs 8 constant multiplications (the document counts 9
// multipliers and 7 adders in its engine).
// Combinational; the sums are returned unrounded for the caller to shift.
module idst4_pe
  import hevc_pkg::*;
(
  input  coef_t                    c [4],
  output logic signed [26:0]       y [4]
);
  logic signed [31:0] s0, s1, s2, m1;
  always_comb begin
    s0 = int'(c[0]) + int'(c[2]);
    s1 = int'(c[2]) + int'(c[3]);
    s2 = int'(c[0]) - int'(c[3]);
    m1 = 74 * int'(c[1]);
    y[0] = 27'(29 * s0 + 55 * s1 + m1);
    y[1] = 27'(55 * s2 - 29 * s1 + m1);
    y[2] = 27'(74 * (int'(c[0]) - int'(c[2]) + int'(c[3])));
    y[3] = 27'(55 * s0 + 29 * s2 - m1);
  end
endmodule
