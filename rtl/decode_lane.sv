// decode_lane: one of the parallel intra lanes of the I-frame decoder:
// transform request, intra prediction with reconstruction, and the write of
// the reconstructed block into the lane's ping-pong stage buffer.
// A transform unit (4x4 coefficients, intra mode, reference samples, position
// tu_blk 0..15 in the 16x16 macroblock) is accepted when the lane is idle. The
// coefficients go to the shared transform coder; when the residual comes
// back, the intra predictor runs (5 cycles) and the 16 reconstructed pixels
// are announced on rec_* for one cycle and written as four 32-bit words to
// ping-pong address 4*tu_blk + row. tu_last commits the bank (end of the
// macroblock); the lane waits while both banks are full.
// The stage order is the document's pipeline; the lane controller itself is
// this design's.
module decode_lane
  import hevc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tu_valid,
  output logic       tu_ready,
  input  logic [5:0] tu_mode,
  input  logic       tu_luma,
  input  logic       tu_dst,
  input  logic [3:0] tu_blk,
  input  logic       tu_last,
  input  coef_t      tu_coef  [16],
  input  pix_t       tu_corner,
  input  pix_t       tu_top   [8],
  input  pix_t       tu_left  [8],
  // shared transform coder
  output logic       it_req_valid,
  input  logic       it_req_ready,
  output logic       it_req_dst,
  output coef_t      it_req_coef [16],
  input  logic       it_resp_valid,
  output logic       it_resp_ready,
  input  res_t       it_resp_res [16],
  // reconstructed block
  output logic       rec_valid,
  output logic [3:0] rec_blk,
  output pix_t       rec_pix [16],
  // ping-pong stage buffer write side
  output logic       pp_wr_en,
  output logic [5:0] pp_wr_addr,
  output logic [31:0] pp_wr_data,
  output logic       pp_commit,
  input  logic       pp_wr_ready
);
  typedef enum logic [2:0] {L_IDLE, L_REQ, L_WAIT, L_PRED, L_WRITE} lstate_e;
  lstate_e    st;
  logic [5:0] mode_q;
  logic       luma_q, dst_q, last_q;
  logic [3:0] blk_q;
  coef_t      coef_q [16];
  pix_t       corner_q;
  pix_t       top_q [8];
  pix_t       left_q [8];
  res_t       res_q [16];
  logic       ip_start, ip_busy, ip_done;
  pix_t       ip_pred [16];
  pix_t       ip_recon [16];
  logic [2:0] wrow;

  assign tu_ready      = (st == L_IDLE);
  assign it_req_valid  = (st == L_REQ);
  assign it_req_dst    = dst_q;
  assign it_req_coef   = coef_q;
  assign it_resp_ready = (st == L_WAIT);
  assign rec_pix       = ip_recon;
  assign rec_blk       = blk_q;

  intra_pred u_intra (
    .clk, .rst_n, .start(ip_start), .mode(mode_q), .luma(luma_q),
    .corner(corner_q), .top(top_q), .left(left_q), .res(res_q),
    .busy(ip_busy), .done(ip_done), .pred(ip_pred), .recon(ip_recon)
  );

  always_comb begin
    pp_wr_en   = (st == L_WRITE) && (wrow < 3'd4) && pp_wr_ready;
    pp_wr_addr = {blk_q, wrow[1:0]};
    pp_wr_data = {ip_recon[4*wrow[1:0] + 3], ip_recon[4*wrow[1:0] + 2],
                  ip_recon[4*wrow[1:0] + 1], ip_recon[4*wrow[1:0]]};
    pp_commit  = (st == L_WRITE) && (wrow == 3'd4) && last_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= L_IDLE; mode_q <= '0; luma_q <= 1'b1; dst_q <= 1'b0; last_q <= 1'b0;
      blk_q <= '0; corner_q <= '0; ip_start <= 1'b0; rec_valid <= 1'b0; wrow <= '0;
      for (int i = 0; i < 16; i++) begin coef_q[i] <= '0; res_q[i] <= '0; end
      for (int i = 0; i < 8; i++) begin top_q[i] <= '0; left_q[i] <= '0; end
    end else begin
      ip_start  <= 1'b0;
      rec_valid <= 1'b0;
      case (st)
        L_IDLE: if (tu_valid) begin
          mode_q <= tu_mode; luma_q <= tu_luma; dst_q <= tu_dst; blk_q <= tu_blk;
          last_q <= tu_last; coef_q <= tu_coef; corner_q <= tu_corner;
          top_q <= tu_top; left_q <= tu_left;
          st <= L_REQ;
        end
        L_REQ:  if (it_req_ready) st <= L_WAIT;
        L_WAIT: if (it_resp_valid) begin
          res_q    <= it_resp_res;
          ip_start <= 1'b1;
          st       <= L_PRED;
        end
        L_PRED: if (ip_done) begin
          rec_valid <= 1'b1;
          wrow      <= '0;
          st        <= L_WRITE;
        end
        L_WRITE: begin
          if (wrow < 3'd4) begin
            if (pp_wr_ready) wrow <= wrow + 3'd1;
          end else if (!last_q || pp_wr_ready) begin
            st <= L_IDLE;
          end
        end
        default: st <= L_IDLE;
      endcase
    end
  end
endmodule
