// intra_filter_engine: one 2-tap interpolation engine of the intra predictor.
// Computes ((32-f)*a + f*b + 16) >> 5 as a + ((f*(b-a) + 16) >> 5): one
// multiplier and three adders/subtractors, the mix the document gives for its
// engine. The two forms are equal because 32*a is a multiple of 32.
// Combinational; the result is always within [min(a,b), max(a,b)].
module intra_filter_engine
  import hevc_pkg::*;
(
  input  pix_t       a,
  input  pix_t       b,
  input  logic [4:0] f,
  output pix_t       y
);
  logic signed [9:0]  diff;
  logic signed [15:0] prod;
  always_comb begin
    diff = $signed({2'b0, b}) - $signed({2'b0, a});
    prod = diff * $signed({11'b0, f});
    y    = pix_t'($signed({8'b0, a}) + ((prod + 16'sd16) >>> 5));
  end
endmodule
