// idct4_pe: 4-point inverse DCT processing engine of the HEVC transform.
// Even/odd butterfly: E0/E1 from c0,c2 (factor 64), O0/O1 from c1,c3 (factors
// 83 and 36), outputs E+-O. Purely combinational; the sums are returned
// unrounded so that the caller applies the pass-dependent shift (the rounding
// is a right shift, "by wire shifting" as in the document). The same engine is
// the even half of the 8-point transform (it_unit8), as the document proposes.
module idct4_pe
  import hevc_pkg::*;
(
  input  coef_t                    c [4],
  output logic signed [26:0]       y [4]
);
  logic signed [26:0] e0, e1, o0, o1;
  always_comb begin
    e0 = 27'(64 * int'(c[0]) + 64 * int'(c[2]));
    e1 = 27'(64 * int'(c[0]) - 64 * int'(c[2]));
    o0 = 27'(83 * int'(c[1]) + 36 * int'(c[3]));
    o1 = 27'(36 * int'(c[1]) - 83 * int'(c[3]));
    y[0] = e0 + o0;
    y[1] = e1 + o1;
    y[2] = e1 - o1;
    y[3] = e0 - o0;
  end
endmodule
