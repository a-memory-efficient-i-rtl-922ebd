// hevc_iframe_dec: memory-efficient HEVC I-frame decoder core with four-lane
// wavefront parallel processing (WPP).
// Structure: one shared inverse transform coder (it_share) feeds four lanes;
// each lane (decode_lane) runs intra prediction and reconstruction and writes
// into its own ping-pong stage buffer, and has its own deblocking edge
// detection unit, strong/weak filter unit and 4x4-merged adaptive loop filter.
// The wpp_scheduler starts macroblocks on the lanes two macroblocks behind the
// row above. Only one frame-wide line memory exists: the shared line buffer
// (*B), written with the unfiltered bottom row of the last lane's blocks and
// read by the first lane's reference fetch and by the deblocking filter.
// The deblocking filter's other three boundary lines live in the
// prediction-based cache (pred_cache), whose store prediction comes from the
// last lane's edge detection unit (pred_on) and whose load need comes from
// the first lane's edge decision; df_recovery keeps the last lane's
// vertical-edge decisions and re-filters the *B row for the first lane.
// Boundary: the entropy decoder, the reference-sample selection, the
// macroblock-level deblocking/ALF sequencing from the ping-pong buffers, and
// external memory sit outside; their signals are ports here.
// Timing: see each block; a 4x4 transform unit takes about 15-16 cycles
// through a lane, so a 16x16 macroblock of luma needs at most about 254.
module hevc_iframe_dec
  import hevc_pkg::*;
#(
  parameter int unsigned LANES        = 4,
  parameter int unsigned FRAME_WIDTH  = 7680,
  parameter int unsigned FRAME_HEIGHT = 4320,
  parameter int unsigned REDUCTION    = 8,
  localparam int unsigned LBW = $clog2(FRAME_WIDTH / 4),
  localparam int unsigned EW  = $clog2(FRAME_WIDTH / 8),
  localparam int unsigned RW  = $clog2(FRAME_HEIGHT / 16 + LANES + 1),
  localparam int unsigned CW  = $clog2(FRAME_WIDTH / 16 + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // ---- WPP macroblock scheduling
  input  logic              frame_start,
  output logic              frame_busy,
  output logic              mb_start [LANES],
  output logic [RW-1:0]     mb_row   [LANES],
  output logic [CW-1:0]     mb_col   [LANES],
  input  logic              mb_done  [LANES],
  output logic [31:0]       wpp_waits,
  // ---- transform units into the lanes
  input  logic              tu_valid  [LANES],
  output logic              tu_ready  [LANES],
  input  logic [5:0]        tu_mode   [LANES],
  input  logic              tu_luma   [LANES],
  input  logic              tu_dst    [LANES],
  input  logic [3:0]        tu_blk    [LANES],
  input  logic              tu_last   [LANES],
  input  coef_t             tu_coef   [LANES][16],
  input  pix_t              tu_corner [LANES],
  input  pix_t              tu_top    [LANES][8],
  input  pix_t              tu_left   [LANES][8],
  input  logic              tu_lb_store [LANES],   // last lane: bottom row to *B
  input  logic [LBW-1:0]    tu_lb_addr  [LANES],
  output logic              rec_valid [LANES],
  output logic [3:0]        rec_blk   [LANES],
  output pix_t              rec_pix   [LANES][16],
  output logic [31:0]       it_conflicts,
  // ---- ping-pong stage buffers, read side
  input  logic              pp_rd_en      [LANES],
  input  logic [5:0]        pp_rd_addr    [LANES],
  output logic [31:0]       pp_rd_data    [LANES],
  input  logic              pp_rd_release [LANES],
  output logic              pp_rd_avail   [LANES],
  output logic [31:0]       pp_swaps      [LANES],
  // ---- shared line buffer *B: first lane's reference reads, DF reads
  input  logic              lb_rd_req,
  input  logic [LBW-1:0]    lb_rd_addr,
  output logic              lb_rd_gnt,
  output logic              lb_rd_valid,
  output logic [31:0]       lb_rd_data,
  input  logic              lb_df_req,
  input  logic [LBW-1:0]    lb_df_addr,
  output logic              lb_df_gnt,
  output logic              lb_df_valid,
  output logic [31:0]       lb_df_data,
  output logic [31:0]       lb_df_stalls,
  // ---- deblocking filter, per lane (one 4-line edge segment per cycle)
  input  logic              df_valid [LANES],
  input  pix_t              df_p     [LANES][4][4],
  input  pix_t              df_q     [LANES][4][4],
  input  logic [1:0]        df_bs    [LANES],
  input  logic [5:0]        df_qp    [LANES],
  input  logic signed [4:0] df_beta_offset,
  input  logic signed [4:0] df_tc_offset,
  output logic              df_out_valid [LANES],
  output df_dec_t           df_out_dec   [LANES],
  output logic              df_out_pred  [LANES],
  output pix_t              df_po        [LANES][4][4],
  output pix_t              df_qo        [LANES][4][4],
  // ---- prediction-based cache for the 3 deblocking lines (last -> first lane)
  input  logic              pc_st_valid,
  input  logic [LBW-1:0]    pc_st_seg,
  input  logic [95:0]       pc_st_data,
  input  logic              pc_ld_valid,
  output logic              pc_ld_ready,
  input  logic [LBW-1:0]    pc_ld_seg,
  output logic              pc_ld_resp,
  output logic              pc_ld_hit,
  output logic              pc_ld_skip,
  output logic [95:0]       pc_ld_data,
  output logic              ext_wr_valid,
  output logic [LBW-1:0]    ext_wr_seg,
  output logic [95:0]       ext_wr_data,
  output logic              ext_rd_req,
  output logic [LBW-1:0]    ext_rd_seg,
  input  logic              ext_rd_valid,
  input  logic [95:0]       ext_rd_data,
  output logic [31:0]       pc_hits,
  output logic [31:0]       pc_misses,
  output logic [31:0]       pc_cached,
  // ---- data recovery of the *B row
  input  logic              rc_save,
  input  logic [EW-1:0]     rc_save_edge,
  input  logic              rc_valid,
  input  logic [EW-1:0]     rc_edge,
  input  pix_t              rc_p [4],
  input  pix_t              rc_q [4],
  output logic              rc_out_valid,
  output pix_t              rc_out_p [4],
  output pix_t              rc_out_q [4],
  // ---- adaptive loop filter, per lane
  input  logic              alf_valid [LANES],
  input  logic              alf_first [LANES],
  input  pix_t              alf_col   [LANES][10][4],
  input  logic              alf_on    [LANES],
  input  logic signed [9:0] alf_coef  [10],
  output logic              alf_out_valid [LANES],
  output pix_t              alf_out_blk   [LANES][16]
);
  localparam int unsigned LL = LANES - 1;

  // ---------------- WPP scheduler
  wpp_scheduler #(.LANES(LANES), .MB_COLS(FRAME_WIDTH / 16), .MB_ROWS(FRAME_HEIGHT / 16)) u_wpp (
    .clk, .rst_n, .frame_start, .frame_busy, .mb_start, .mb_row, .mb_col, .mb_done,
    .waits(wpp_waits)
  );

  // ---------------- shared transform coder and lanes
  logic  it_req_valid [LANES];
  logic  it_req_ready [LANES];
  logic  it_req_dst   [LANES];
  coef_t it_req_coef  [LANES][16];
  logic  it_resp_valid [LANES];
  logic  it_resp_ready [LANES];
  res_t  it_resp_res  [16];
  logic        pp_wr_en    [LANES];
  logic [5:0]  pp_wr_addr  [LANES];
  logic [31:0] pp_wr_data  [LANES];
  logic        pp_commit   [LANES];
  logic        pp_wr_ready [LANES];

  it_share #(.LANES(LANES)) u_it (
    .clk, .rst_n, .req_valid(it_req_valid), .req_ready(it_req_ready), .req_dst(it_req_dst),
    .req_coef(it_req_coef), .resp_valid(it_resp_valid), .resp_ready(it_resp_ready),
    .resp_res(it_resp_res), .conflicts(it_conflicts)
  );

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    decode_lane u_lane (
      .clk, .rst_n,
      .tu_valid(tu_valid[l]), .tu_ready(tu_ready[l]), .tu_mode(tu_mode[l]), .tu_luma(tu_luma[l]),
      .tu_dst(tu_dst[l]), .tu_blk(tu_blk[l]), .tu_last(tu_last[l]), .tu_coef(tu_coef[l]),
      .tu_corner(tu_corner[l]), .tu_top(tu_top[l]), .tu_left(tu_left[l]),
      .it_req_valid(it_req_valid[l]), .it_req_ready(it_req_ready[l]), .it_req_dst(it_req_dst[l]),
      .it_req_coef(it_req_coef[l]), .it_resp_valid(it_resp_valid[l]),
      .it_resp_ready(it_resp_ready[l]), .it_resp_res(it_resp_res),
      .rec_valid(rec_valid[l]), .rec_blk(rec_blk[l]), .rec_pix(rec_pix[l]),
      .pp_wr_en(pp_wr_en[l]), .pp_wr_addr(pp_wr_addr[l]), .pp_wr_data(pp_wr_data[l]),
      .pp_commit(pp_commit[l]), .pp_wr_ready(pp_wr_ready[l])
    );

    pingpong_buf #(.BANK_BYTES(256)) u_pp (
      .clk, .rst_n, .wr_en(pp_wr_en[l]), .wr_addr(pp_wr_addr[l]), .wr_data(pp_wr_data[l]),
      .wr_commit(pp_commit[l]), .wr_ready(pp_wr_ready[l]),
      .rd_en(pp_rd_en[l]), .rd_addr(pp_rd_addr[l]), .rd_data(pp_rd_data[l]),
      .rd_release(pp_rd_release[l]), .rd_avail(pp_rd_avail[l]), .n_swaps(pp_swaps[l])
    );

    // deblocking: edge detection + strong/weak filter, registered
    df_dec_t dec;
    logic    pred;
    pix_t    fpo [4][4];
    pix_t    fqo [4][4];
    logic    all_lines [4];
    assign all_lines = '{1'b1, 1'b1, 1'b1, 1'b1};
    df_edge_detect u_ed (
      .p(df_p[l]), .q(df_q[l]), .bs(df_bs[l]), .qp(df_qp[l]),
      .beta_offset(df_beta_offset), .tc_offset(df_tc_offset),
      .dec(dec), .beta(), .pred_on(pred)
    );
    df_filter4 u_f (.dec(dec), .line_en(all_lines), .p(df_p[l]), .q(df_q[l]), .po(fpo), .qo(fqo));
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        df_out_valid[l] <= 1'b0;
        df_out_dec[l]   <= '0;
        df_out_pred[l]  <= 1'b0;
        for (int k = 0; k < 4; k++) for (int i = 0; i < 4; i++) begin
          df_po[l][k][i] <= '0; df_qo[l][k][i] <= '0;
        end
      end else begin
        df_out_valid[l] <= df_valid[l];
        if (df_valid[l]) begin
          df_out_dec[l]  <= dec;
          df_out_pred[l] <= pred;
          df_po[l]       <= fpo;
          df_qo[l]       <= fqo;
        end
      end
    end

    alf_4x4 u_alf (
      .clk, .rst_n, .in_valid(alf_valid[l]), .in_first(alf_first[l]), .in_col(alf_col[l]),
      .alf_on(alf_on[l]), .coef(alf_coef), .out_valid(alf_out_valid[l]), .out_blk(alf_out_blk[l])
    );
  end

  // ---------------- shared line buffer *B
  logic          lb_wr;
  logic [31:0]   lb_wdata;
  logic          lb_in_gnt;
  always_comb begin
    // the last lane stores the bottom row (row 3) of its reconstructed block
    lb_wr    = rec_valid[LL] && tu_lb_store[LL];
    lb_wdata = {rec_pix[LL][15], rec_pix[LL][14], rec_pix[LL][13], rec_pix[LL][12]};
    lb_rd_gnt = lb_in_gnt && !lb_wr;
  end
  logic [LBW-1:0] lb_wr_addr_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lb_wr_addr_q <= '0;
    else if (tu_valid[LL] && tu_ready[LL]) lb_wr_addr_q <= tu_lb_addr[LL];

  shared_line_buffer #(.FRAME_WIDTH(FRAME_WIDTH)) u_lb (
    .clk, .rst_n,
    .in_req(lb_wr || lb_rd_req), .in_we(lb_wr), .in_addr(lb_wr ? lb_wr_addr_q : lb_rd_addr),
    .in_wdata(lb_wdata), .in_gnt(lb_in_gnt), .in_rvalid(lb_rd_valid), .in_rdata(lb_rd_data),
    .df_req(lb_df_req), .df_addr(lb_df_addr), .df_gnt(lb_df_gnt), .df_rvalid(lb_df_valid),
    .df_rdata(lb_df_data), .df_stall()
  );
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lb_df_stalls <= '0;
    else if (lb_df_req && !lb_df_gnt) lb_df_stalls <= lb_df_stalls + 32'd1;

  // ---------------- prediction-based cache (store: last lane, load: first lane)
  pred_cache #(.FRAME_WIDTH(FRAME_WIDTH), .REDUCTION(REDUCTION)) u_pc (
    .clk, .rst_n,
    .st_valid(pc_st_valid), .st_seg(pc_st_seg), .st_guess(df_out_pred[LL]), .st_data(pc_st_data),
    .ext_wr_valid, .ext_wr_seg, .ext_wr_data,
    .ld_valid(pc_ld_valid), .ld_ready(pc_ld_ready), .ld_seg(pc_ld_seg),
    .ld_need(df_out_dec[0].mode != DF_OFF),
    .ld_resp(pc_ld_resp), .ld_hit(pc_ld_hit), .ld_skip(pc_ld_skip), .ld_data(pc_ld_data),
    .ext_rd_req, .ext_rd_seg, .ext_rd_valid, .ext_rd_data,
    .n_hit(pc_hits), .n_miss(pc_misses), .n_cached(pc_cached)
  );

  // ---------------- data recovery (decisions from the last lane)
  df_recovery #(.FRAME_WIDTH(FRAME_WIDTH)) u_rc (
    .clk, .rst_n, .save_valid(rc_save), .save_edge(rc_save_edge), .save_dec(df_out_dec[LL]),
    .rec_valid(rc_valid), .rec_edge(rc_edge), .rec_p(rc_p), .rec_q(rc_q),
    .out_valid(rc_out_valid), .out_p(rc_out_p), .out_q(rc_out_q)
  );
endmodule
