// it_share: one inverse transform coder shared by the parallel intra lanes.
// Each lane offers a 4x4 coefficient block (req_valid/req_ready). A
// round-robin arbiter grants one lane at a time to inv_transform, tagging the
// block with the lane number; the residual block is returned to the lane
// named by the tag (resp_valid/resp_ready). Requests that lose arbitration
// wait (conflicts counts those cycles).
// Sharing a single transform coder among the four lanes is the document's
// proposal; the round-robin order is this design's.
module it_share
  import hevc_pkg::*;
#(
  parameter int unsigned LANES = 4,
  localparam int unsigned LW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid [LANES],
  output logic        req_ready [LANES],
  input  logic        req_dst   [LANES],
  input  coef_t       req_coef  [LANES][16],
  output logic        resp_valid [LANES],
  input  logic        resp_ready [LANES],
  output res_t        resp_res  [16],
  output logic [31:0] conflicts
);
  logic [LW-1:0] last_gnt;
  logic          any;
  logic [LW-1:0] gnt;
  logic          it_in_ready, it_out_valid, it_out_size8;
  logic [LW-1:0] it_out_tag;
  coef_t         it_coef [64];
  res_t          it_res  [64];
  logic signed [31:0] nreq;

  always_comb begin
    any = 1'b0;
    gnt = last_gnt;
    nreq = 0;
    for (int k = 1; k <= LANES; k++) begin
      int l;
      l = (int'(last_gnt) + k) % LANES;
      if (req_valid[l] && !any) begin
        any = 1'b1;
        gnt = LW'(l);
      end
      if (req_valid[l]) nreq++;
    end
    for (int i = 0; i < 64; i++) it_coef[i] = '0;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) it_coef[8*r + c] = req_coef[gnt][4*r + c];
    for (int l = 0; l < LANES; l++) begin
      req_ready[l]  = it_in_ready && any && (gnt == LW'(l));
      resp_valid[l] = it_out_valid && (it_out_tag == LW'(l));
    end
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) resp_res[4*r + c] = it_res[8*r + c];
  end

  inv_transform #(.TAG_W(LW)) u_it (
    .clk, .rst_n,
    .in_valid(any), .in_ready(it_in_ready), .in_size8(1'b0), .in_dst(req_dst[gnt]),
    .in_tag(gnt), .in_coef(it_coef),
    .out_valid(it_out_valid), .out_ready(resp_ready[it_out_tag]), .out_size8(it_out_size8),
    .out_tag(it_out_tag), .out_res(it_res)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_gnt  <= LW'(LANES - 1);
      conflicts <= '0;
    end else begin
      if (any && it_in_ready) last_gnt <= gnt;
      if (nreq > 1 || (any && !it_in_ready)) conflicts <= conflicts + 32'd1;
    end
  end
endmodule
