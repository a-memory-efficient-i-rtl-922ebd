// alf_4x4: adaptive loop filter with the 19-tap cross/diamond shape merged to
// a 4x4 block, in raster block order with left/current/right registers.
// Each input step delivers one 4-column chunk of 10 rows (3 above the block
// row, the 4 block rows, 3 below). The chunks shift right->current->left, so
// the 12x10 window around the current 4x4 block (76 of whose pixels are used)
// is read once per block instead of 19 times per pixel. All 16 outputs are
// computed together: out = clip((sum_k coef[k]*(I_k + I_{18-k}) + coef[9]*I_9
// + 128) >> 8), with I_0..I_18 the shape's pixels in the order top-to-bottom,
// left-to-right. alf_on=0 passes the block through.
// Timing: the first chunk of a row is flagged in_first; from the third chunk
// on, each chunk yields the block of the previous chunk one cycle after
// out_valid's edge (out_valid pulses two edges after in_valid).
// The shape, the merging and the register shifting are the document's; the
// coefficient precision (8 fractional bits) and the chunk interface are this
// design's.
module alf_4x4
  import hevc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic              in_first,
  input  pix_t              in_col [10][4],
  input  logic              alf_on,
  input  logic signed [9:0] coef [10],
  output logic              out_valid,
  output pix_t              out_blk [16]
);
  pix_t        win [10][12];     // columns 0..3 left, 4..7 current, 8..11 right
  logic [1:0]  fill;
  logic        calc;
  pix_t        res [16];

  // shape taps: row offset, column offset, coefficient index
  localparam int DY [19] = '{-3,-2,-1,-1,-1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 2, 3};
  localparam int DX [19] = '{ 0, 0,-1, 0, 1,-4,-3,-2,-1, 0, 1, 2, 3, 4,-1, 0, 1, 0, 0};

  always_comb begin
    for (int by = 0; by < 4; by++)
      for (int bx = 0; bx < 4; bx++) begin
        int acc;
        acc = 0;
        for (int t = 0; t < 19; t++) begin
          int ci;
          ci  = (t <= 9) ? t : 18 - t;
          acc += int'(coef[ci]) * int'(win[3 + by + DY[t]][4 + bx + DX[t]]);
        end
        res[4*by + bx] = alf_on ? clip_pix((acc + 128) >>> 8) : win[3 + by][4 + bx];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill <= '0; calc <= 1'b0; out_valid <= 1'b0;
      for (int r = 0; r < 10; r++) for (int c = 0; c < 12; c++) win[r][c] <= '0;
      for (int i = 0; i < 16; i++) out_blk[i] <= '0;
    end else begin
      calc      <= 1'b0;
      out_valid <= 1'b0;
      if (in_valid) begin
        for (int r = 0; r < 10; r++) begin
          for (int c = 0; c < 8; c++) win[r][c] <= win[r][c + 4];
          for (int c = 0; c < 4; c++) win[r][8 + c] <= in_col[r][c];
        end
        fill <= in_first ? 2'd1 : ((fill == 2'd3) ? 2'd3 : fill + 2'd1);
        calc <= !in_first && (fill >= 2'd2);
      end
      if (calc) begin
        out_valid <= 1'b1;
        out_blk   <= res;
      end
    end
  end
endmodule
