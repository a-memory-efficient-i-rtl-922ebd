// intra_pred: HEVC 4x4 intra predictor with reconstruction (planar, DC and the
// 33 angular modes), four predicted pixels per cycle.
// A start pulse latches the mode, the reference samples chosen by the
// reference selection (corner, 8 top incl. top-right, 8 left incl. bottom-left)
// and the 4x4 residual from the transform. Then one line per cycle is computed
// by four intra_filter_engine instances: a row for vertical-class modes (18..34),
// planar and DC, a column for horizontal-class modes (2..17). For negative angles
// the side array is projected onto the main array with the inverse angle.
// Luma blocks get the DC edge smoothing and the mode-10/26 boundary filter;
// chroma blocks (luma=0) do not. After four line cycles done pulses for one
// cycle with the 16 predicted and the 16 reconstructed (pred + residual,
// clipped) pixels, row-major, which stay valid until the next start.
// Latency: start at edge t, lines at edges t+1..t+4, done high after edge t+4.
// The document fixes the 4-pixel parallelism, the engine and the planar
// structure; the start/done handshake and the line order are this design's.
module intra_pred
  import hevc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [5:0] mode,
  input  logic       luma,
  input  pix_t       corner,
  input  pix_t       top  [8],
  input  pix_t       left [8],
  input  res_t       res  [16],
  output logic       busy,
  output logic       done,
  output pix_t       pred  [16],
  output pix_t       recon [16]
);
  logic [5:0] mode_q;
  logic       luma_q;
  pix_t       corner_q;
  pix_t       top_q [8];
  pix_t       left_q [8];
  res_t       res_q [16];
  logic [2:0] line;          // line being computed, 0..3
  logic       run;

  // Angular main array, index -4..8 stored at +4.
  pix_t       ref_a [13];
  logic signed [31:0] angle, inv_angle, i_idx, fact, dcv, sum;
  logic       is_vert;
  pix_t       ea [4];
  pix_t       eb [4];
  logic [4:0] ef;
  pix_t       ey [4];
  pix_t       lv [4];        // this cycle's four output pixels

  always_comb begin
    is_vert   = (mode_q >= 6'd18);
    angle     = intra_angle(mode_q);
    inv_angle = intra_inv_angle(angle);
    ref_a[4]  = corner_q;
    for (int k = 1; k <= 8; k++) ref_a[4 + k] = is_vert ? top_q[k-1] : left_q[k-1];
    for (int k = -4; k <= -1; k++) begin
      int idx;
      idx = -1 + ((k * inv_angle + 128) >>> 8);
      if (idx < 0)      ref_a[4 + k] = corner_q;
      else if (idx > 7) ref_a[4 + k] = corner_q;
      else              ref_a[4 + k] = is_vert ? left_q[idx] : top_q[idx];
    end
    i_idx = ((int'(line) + 1) * angle) >>> 5;
    fact  = ((int'(line) + 1) * angle) & 31;
    ef    = 5'(fact);
    for (int i = 0; i < 4; i++) begin
      int p;
      p = i + i_idx + 1 + 4;
      if (p < 0)  p = 0;
      if (p > 12) p = 12;
      ea[i] = ref_a[p];
      eb[i] = ref_a[(p < 12) ? p + 1 : 12];   // b is unused when the phase is 0
    end
  end

  for (genvar g = 0; g < 4; g++) begin : g_eng
    intra_filter_engine u_eng (.a(ea[g]), .b(eb[g]), .f(ef), .y(ey[g]));
  end

  always_comb begin
    sum = 0;
    for (int k = 0; k < 4; k++) sum += int'(top_q[k]) + int'(left_q[k]);
    dcv = (sum + 4) >>> 3;
    for (int i = 0; i < 4; i++) begin
      int y, x;
      // planar and DC work along rows: line = y, i = x
      y = int'(line); x = i;
      if (mode_q == 6'd0) begin
        lv[i] = pix_t'(((3 - x) * int'(left_q[y]) + (x + 1) * int'(top_q[4]) +
                        (3 - y) * int'(top_q[x]) + (y + 1) * int'(left_q[4]) + 4) >>> 3);
      end else if (mode_q == 6'd1) begin
        if (!luma_q)              lv[i] = pix_t'(dcv);
        else if (y == 0 && x == 0) lv[i] = pix_t'((int'(left_q[0]) + 2 * dcv + int'(top_q[0]) + 2) >>> 2);
        else if (y == 0)           lv[i] = pix_t'((int'(top_q[x]) + 3 * dcv + 2) >>> 2);
        else if (x == 0)           lv[i] = pix_t'((int'(left_q[y]) + 3 * dcv + 2) >>> 2);
        else                       lv[i] = pix_t'(dcv);
      end else begin
        lv[i] = ey[i];
        // boundary smoothing of the pure vertical / horizontal modes (luma)
        if (luma_q && i == 0 && mode_q == 6'd26)
          lv[i] = clip_pix(int'(top_q[0]) + ((int'(left_q[line]) - int'(corner_q)) >>> 1));
        if (luma_q && i == 0 && mode_q == 6'd10)
          lv[i] = clip_pix(int'(left_q[0]) + ((int'(top_q[line]) - int'(corner_q)) >>> 1));
      end
    end
  end

  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode_q <= '0; luma_q <= 1'b1; corner_q <= '0; line <= '0; run <= 1'b0; done <= 1'b0;
      for (int k = 0; k < 8; k++) begin top_q[k] <= '0; left_q[k] <= '0; end
      for (int k = 0; k < 16; k++) begin res_q[k] <= '0; pred[k] <= '0; recon[k] <= '0; end
    end else begin
      done <= 1'b0;
      if (start && !run) begin
        mode_q <= mode; luma_q <= luma; corner_q <= corner;
        top_q <= top; left_q <= left; res_q <= res;
        line <= '0; run <= 1'b1;
      end else if (run) begin
        begin
          for (int i = 0; i < 4; i++) begin
            int r, c;
            // horizontal-class angular modes produce a column per cycle
            if (mode_q >= 6'd2 && mode_q < 6'd18) begin r = i; c = int'(line); end
            else begin r = int'(line); c = i; end
            pred[4*r + c]  <= lv[i];
            recon[4*r + c] <= clip_pix(int'(lv[i]) + int'(res_q[4*r + c]));
          end
          line <= line + 3'd1;
          if (line == 3'd3) begin
            run  <= 1'b0;
            done <= 1'b1;
          end
        end
      end
    end
  end
endmodule
