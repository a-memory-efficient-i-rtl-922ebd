// inv_transform: shared 2-D inverse transform coder (4x4 DCT, 4x4 DST, 8x8 DCT).
// A block of dequantised coefficients is accepted whole (valid/ready), held in
// a block register and transformed by four 1-D units (it_unit8) that are used
// twice: first down the columns (shift 7, clip to 16 bits), then, fed back from
// the block register, along the rows (shift 12, for 8-bit video). A 4x4 block
// needs one column cycle and one row cycle; an 8x8 block needs two of each
// because the four units take four columns (rows) per cycle.
// Timing: a block accepted at clock edge t is presented on out_* after edge t+3
// (4x4) or t+5 (8x8) and held until out_ready. A new block is accepted in the
// cycle the previous result is taken, so 4x4 blocks stream at one per 3 cycles.
// in_tag travels with the block so that several intra lanes can share the unit.
// Coefficient/residual arrays are row-major: index 8*row + column; a 4x4 block
// uses rows and columns 0..3.
// The document gives four engines with a feedback path and the 4x4/8x8 DCT and
// 4x4 DST; the block register, the handshake and the tag are this design's.
module inv_transform
  import hevc_pkg::*;
#(
  parameter int unsigned TAG_W = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_size8,
  input  logic              in_dst,
  input  logic [TAG_W-1:0]  in_tag,
  input  coef_t             in_coef [64],
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_size8,
  output logic [TAG_W-1:0]  out_tag,
  output res_t              out_res [64]
);
  typedef enum logic [2:0] {S_IDLE, S_COL0, S_COL1, S_ROW0, S_ROW1, S_DONE} state_e;
  state_e             state;
  logic               size8_q, dst_q;
  logic [TAG_W-1:0]   tag_q;
  coef_t              blk [64];
  coef_t              u_in  [4][8];
  res_t               u_out [4][8];
  logic               row_pass;
  logic [2:0]         base;      // first column/row handled this cycle
  logic [3:0]         shift;

  always_comb begin
    row_pass = (state == S_ROW0) || (state == S_ROW1);
    base     = ((state == S_COL1) || (state == S_ROW1)) ? 3'd4 : 3'd0;
    shift    = row_pass ? 4'd12 : 4'd7;
    for (int u = 0; u < 4; u++)
      for (int k = 0; k < 8; k++) begin
        if (!size8_q && k >= 4) u_in[u][k] = '0;
        else if (row_pass)      u_in[u][k] = blk[8 * (int'(base) + u) + k];
        else                    u_in[u][k] = blk[8 * k + int'(base) + u];
      end
  end

  for (genvar g = 0; g < 4; g++) begin : g_unit
    it_unit8 u_unit (.c(u_in[g]), .size8(size8_q), .dst(dst_q & ~size8_q),
                     .shift(shift), .y(u_out[g]));
  end

  assign in_ready  = (state == S_IDLE) || (state == S_DONE && out_ready);
  assign out_valid = (state == S_DONE);
  assign out_size8 = size8_q;
  assign out_tag   = tag_q;
  always_comb for (int i = 0; i < 64; i++) out_res[i] = res_t'(blk[i]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      size8_q <= 1'b0;
      dst_q   <= 1'b0;
      tag_q   <= '0;
      for (int i = 0; i < 64; i++) blk[i] <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          if (in_valid && in_ready) begin
            blk     <= in_coef;
            size8_q <= in_size8;
            dst_q   <= in_dst;
            tag_q   <= in_tag;
            state   <= S_COL0;
          end else if (state == S_DONE && out_ready) begin
            state   <= S_IDLE;
          end
        end
        S_COL0, S_COL1: begin
          for (int u = 0; u < 4; u++)
            for (int k = 0; k < 8; k++)
              if (size8_q || k < 4) blk[8 * k + int'(base) + u] <= coef_t'(u_out[u][k]);
          state <= (state == S_COL0 && size8_q) ? S_COL1 : S_ROW0;
        end
        S_ROW0, S_ROW1: begin
          for (int u = 0; u < 4; u++)
            for (int k = 0; k < 8; k++)
              if (size8_q || k < 4) blk[8 * (int'(base) + u) + k] <= coef_t'(u_out[u][k]);
          state <= (state == S_ROW0 && size8_q) ? S_ROW1 : S_DONE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
