// tb_decode_lane: one lane with its own transform coder (it_share with one
// lane) and a model ping-pong write side. Sends a macroblock of 16 transform
// units with random modes, coefficients and references; checks each
// reconstructed block against transform + prediction models, the ping-pong
// writes (address 4*blk+row, pixel order) and the commit after the last unit.
module tb_decode_lane;
  import hevc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic tu_valid = 0, tu_ready, tu_luma = 1, tu_dst = 0, tu_last = 0;
  logic [5:0] tu_mode = 0;
  logic [3:0] tu_blk = 0, rec_blk;
  coef_t tu_coef [16];
  pix_t tu_corner = 0, tu_top [8], tu_left [8], rec_pix [16];
  logic it_req_valid, it_req_ready, it_req_dst, it_resp_valid, it_resp_ready, rec_valid;
  coef_t it_req_coef [16];
  res_t it_resp_res [16];
  logic pp_wr_en, pp_commit, pp_wr_ready = 1;
  logic [5:0] pp_wr_addr;
  logic [31:0] pp_wr_data;
  logic [31:0] conflicts;
  int checks = 0, failures = 0, commits = 0, writes = 0;
  logic [31:0] bank [64];
  always #5 clk = ~clk;
  decode_lane dut (.*);
  logic rv [1], rr [1], rd [1], sv [1], sr [1];
  coef_t rc [1][16];
  assign rv[0] = it_req_valid; assign it_req_ready = rr[0]; assign rd[0] = it_req_dst;
  assign rc[0] = it_req_coef; assign it_resp_valid = sv[0]; assign sr[0] = it_resp_ready;
  it_share #(.LANES(1)) u_it (.clk, .rst_n, .req_valid(rv), .req_ready(rr), .req_dst(rd),
                               .req_coef(rc), .resp_valid(sv), .resp_ready(sr),
                               .resp_res(it_resp_res), .conflicts(conflicts));
  always @(posedge clk) begin
    if (pp_wr_en) begin bank[pp_wr_addr] <= pp_wr_data; writes++; end
    if (pp_commit) commits++;
  end
  initial begin
    int exp_rec [16][16];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 16; b++) begin
      int c[64]; int r[64]; int t[8]; int l[8]; int cr; int pr[16]; int m; bit d;
      m = int'($urandom_range(0, 34)); d = 1'($urandom);
      for (int i = 0; i < 64; i++) c[i] = 0;
      for (int i = 0; i < 16; i++) begin
        c[8*(i/4) + i%4] = ($urandom_range(0, 2) == 0) ? int'($urandom_range(0, 255)) - 128 : 0;
        tu_coef[i] = coef_t'(c[8*(i/4) + i%4]);
      end
      for (int k = 0; k < 8; k++) begin
        t[k] = int'($urandom_range(0, 255)); l[k] = int'($urandom_range(0, 255));
        tu_top[k] = pix_t'(t[k]); tu_left[k] = pix_t'(l[k]);
      end
      cr = int'($urandom_range(0, 255)); tu_corner = pix_t'(cr);
      inv2d(4, d, c, r);
      intra4(m, 1'b1, cr, t, l, pr);
      for (int i = 0; i < 16; i++) exp_rec[b][i] = cl(0, 255, pr[i] + r[8*(i/4) + i%4]);
      @(negedge clk);
      while (!tu_ready) @(negedge clk);
      tu_valid = 1; tu_mode = 6'(m); tu_dst = d; tu_blk = 4'(b); tu_last = (b == 15);
      @(negedge clk);
      tu_valid = 0;
      while (!rec_valid) @(negedge clk);
      checks++;
      if (int'(rec_blk) != b) failures++;
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (int'(rec_pix[i]) != exp_rec[b][i]) failures++;
      end
    end
    while (!tu_ready) @(negedge clk);
    repeat (3) @(negedge clk);
    for (int b = 0; b < 16; b++)
      for (int row = 0; row < 4; row++) begin
        checks++;
        if (bank[4*b + row] != {8'(exp_rec[b][4*row+3]), 8'(exp_rec[b][4*row+2]),
                                8'(exp_rec[b][4*row+1]), 8'(exp_rec[b][4*row])}) failures++;
      end
    checks += 2;
    if (commits != 1) failures++;
    if (writes != 64) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
