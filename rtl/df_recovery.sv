// df_recovery: data recovery for the shared line buffer.
// With line buffer sharing, the bottom pixel row of a macroblock row is kept
// only once, unfiltered, in the intra predictor's line (*B). Before the
// horizontal edge below it is deblocked, that row must get the vertical-edge
// filtering it missed. This unit keeps the decision of every vertical edge
// segment that touches the bottom row (one df_dec_t per 8 columns) and, when
// the row comes back from *B, re-applies the vertical-edge filter to its 8
// samples across that edge with the stored decision (df_filter4, one line).
// Timing: save takes one cycle; a recover request answers one cycle later.
// The recovery step is the document's; keeping the decisions in a small
// decision line (one byte per 8 columns) is this design's choice.
module df_recovery
  import hevc_pkg::*;
#(
  parameter int unsigned FRAME_WIDTH = 7680,
  localparam int unsigned EDGES      = FRAME_WIDTH / 8,
  localparam int unsigned EW         = $clog2(EDGES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          save_valid,
  input  logic [EW-1:0] save_edge,
  input  df_dec_t       save_dec,
  input  logic          rec_valid,
  input  logic [EW-1:0] rec_edge,
  input  pix_t          rec_p [4],   // p0..p3 of the *B row, left of the edge
  input  pix_t          rec_q [4],   // q0..q3, right of the edge
  output logic          out_valid,
  output pix_t          out_p [4],
  output pix_t          out_q [4]
);
  df_dec_t dec_line [EDGES];
  df_dec_t dec_sel;
  pix_t    fp [4][4];
  pix_t    fq [4][4];
  pix_t    gp [4][4];
  pix_t    gq [4][4];
  logic    en [4];

  always_comb begin
    dec_sel = dec_line[rec_edge];
    for (int k = 0; k < 4; k++) begin
      en[k] = (k == 0);
      for (int i = 0; i < 4; i++) begin
        fp[k][i] = rec_p[i];
        fq[k][i] = rec_q[i];
      end
    end
  end

  df_filter4 u_filt (.dec(dec_sel), .line_en(en), .p(fp), .q(fq), .po(gp), .qo(gq));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < EDGES; e++) dec_line[e] <= '0;
      out_valid <= 1'b0;
      for (int i = 0; i < 4; i++) begin out_p[i] <= '0; out_q[i] <= '0; end
    end else begin
      if (save_valid) dec_line[save_edge] <= save_dec;
      out_valid <= rec_valid;
      if (rec_valid) begin
        out_p <= gp[0];
        out_q <= gq[0];
      end
    end
  end
endmodule
