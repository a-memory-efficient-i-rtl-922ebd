// it_unit8: one 1-D inverse transform unit of the shared transform coder.
// In 8-point mode the even coefficients (c0,c2,c4,c6) go through the 4-point
// DCT engine (idct4_pe) and the odd ones through an odd butterfly with the
// factors 89, 75, 50 and 18; outputs are E+-O. In 4-point mode only the
// 4-point DCT engine, or the DST engine when dst=1, is used on c0..c3, and
// y[4..7] are zero. Every output is rounded by 2^(shift-1), shifted right by
// `shift` and clipped to 16 bits. Combinational.
module it_unit8
  import hevc_pkg::*;
(
  input  coef_t       c [8],
  input  logic        size8,   // 1: 8-point DCT, 0: 4-point
  input  logic        dst,     // 4-point only: 1 selects the DST engine
  input  logic [3:0]  shift,   // 7 after the first pass, 12 after the second
  output res_t        y [8]
);
  coef_t              ce [4];
  coef_t              c4 [4];
  logic signed [26:0] ye [4];
  logic signed [26:0] yd [4];
  logic signed [31:0] o [4];
  logic signed [31:0] full [8];
  logic signed [31:0] rnd;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      ce[i] = size8 ? c[2*i] : c[i];
      c4[i] = c[i];
    end
  end

  idct4_pe u_even (.c(ce), .y(ye));
  idst4_pe u_dst  (.c(c4), .y(yd));

  always_comb begin
    o[0] = 89 * int'(c[1]) + 75 * int'(c[3]) + 50 * int'(c[5]) + 18 * int'(c[7]);
    o[1] = 75 * int'(c[1]) - 18 * int'(c[3]) - 89 * int'(c[5]) - 50 * int'(c[7]);
    o[2] = 50 * int'(c[1]) - 89 * int'(c[3]) + 18 * int'(c[5]) + 75 * int'(c[7]);
    o[3] = 18 * int'(c[1]) - 50 * int'(c[3]) + 75 * int'(c[5]) - 89 * int'(c[7]);
    for (int i = 0; i < 8; i++) full[i] = 0;
    if (size8) begin
      for (int k = 0; k < 4; k++) begin
        full[k]     = int'(ye[k]) + o[k];
        full[7 - k] = int'(ye[k]) - o[k];
      end
    end else begin
      for (int k = 0; k < 4; k++) full[k] = dst ? int'(yd[k]) : int'(ye[k]);
    end
    rnd = 1 << (shift - 4'd1);
    for (int i = 0; i < 8; i++) y[i] = clip16((full[i] + rnd) >>> shift);
  end
endmodule
