// tb_hevc_iframe_dec_full: the decoder core at its real size (7680x4320
// frame, 4 lanes, cache reduction 8; parameters left at their defaults).
// Simulating a whole 8K frame would take hours, so the testbench decodes the
// first eight macroblock rows (two full 480-macroblock rows per lane, under the
// WPP scheduler) and checks every reconstructed block and every ping-pong
// read, then runs the shared line buffer, deblocking units, prediction-based
// cache, data recovery and ALF over the full frame width, as the reduced
// end-to-end testbench does. Every mechanism is counted and must occur.
module tb_hevc_iframe_dec_full;
  import hevc_pkg::*;
  import tb_ref_pkg::*;
  localparam int L = 4, FW = 7680, FH = 4320, RED = 8, ROWS_RUN = 8;
  localparam int LBW = $clog2(FW / 4), EW = $clog2(FW / 8);
  localparam int RW = $clog2(FH / 16 + L + 1), CW = $clog2(FW / 16 + 1);
  localparam int SEGS = FW / 4;

  logic clk = 0, rst_n = 0;
  logic frame_start = 0, frame_busy;
  logic mb_start [L]; logic [RW-1:0] mb_row [L]; logic [CW-1:0] mb_col [L]; logic mb_done [L];
  logic [31:0] wpp_waits, it_conflicts, lb_df_stalls, pc_hits, pc_misses, pc_cached;
  logic tu_valid [L], tu_ready [L], tu_luma [L], tu_dst [L], tu_last [L], tu_lb_store [L];
  logic [5:0] tu_mode [L]; logic [3:0] tu_blk [L]; coef_t tu_coef [L][16];
  pix_t tu_corner [L], tu_top [L][8], tu_left [L][8];
  logic [LBW-1:0] tu_lb_addr [L];
  logic rec_valid [L]; logic [3:0] rec_blk [L]; pix_t rec_pix [L][16];
  logic pp_rd_en [L], pp_rd_release [L], pp_rd_avail [L];
  logic [5:0] pp_rd_addr [L]; logic [31:0] pp_rd_data [L], pp_swaps [L];
  logic lb_rd_req = 0, lb_rd_gnt, lb_rd_valid, lb_df_req = 0, lb_df_gnt, lb_df_valid;
  logic [LBW-1:0] lb_rd_addr = 0, lb_df_addr = 0;
  logic [31:0] lb_rd_data, lb_df_data;
  logic df_valid [L]; pix_t df_p [L][4][4], df_q [L][4][4]; logic [1:0] df_bs [L]; logic [5:0] df_qp [L];
  logic signed [4:0] df_beta_offset = 0, df_tc_offset = 0;
  logic df_out_valid [L]; df_dec_t df_out_dec [L]; logic df_out_pred [L];
  pix_t df_po [L][4][4], df_qo [L][4][4];
  logic pc_st_valid = 0, pc_ld_valid = 0, pc_ld_ready, pc_ld_resp, pc_ld_hit, pc_ld_skip;
  logic [LBW-1:0] pc_st_seg = 0, pc_ld_seg = 0, ext_wr_seg, ext_rd_seg;
  logic [95:0] pc_st_data = 0, pc_ld_data, ext_wr_data, ext_rd_data = 0;
  logic ext_wr_valid, ext_rd_req, ext_rd_valid = 0;
  logic rc_save = 0, rc_valid = 0, rc_out_valid;
  logic [EW-1:0] rc_save_edge = 0, rc_edge = 0;
  pix_t rc_p [4], rc_q [4], rc_out_p [4], rc_out_q [4];
  logic alf_valid [L], alf_first [L], alf_on [L], alf_out_valid [L];
  pix_t alf_col [L][10][4], alf_out_blk [L][16];
  logic signed [9:0] alf_coef [10];

  int checks = 0, failures = 0, mbs_done = 0, lanes_idle = 0, mb_cycles_max = 0;
  time t_mb0 [L];
  int n_off = 0, n_weak = 0, n_strong = 0, n_rec = 0, n_alf = 0, n_skip = 0, n_lbrd = 0;
  logic [31:0] lb_model [SEGS];
  bit lb_written [SEGS];

  always #5 clk = ~clk;

  hevc_iframe_dec dut (.*);

  task automatic fail(input string what);
    failures++;
    if (failures < 10) $display("FAIL: %s", what);
  endtask

  // ---------------- phase 1: per-lane macroblock decoding
  for (genvar l = 0; l < L; l++) begin : g_lane
    int my_mbs = 0;
    initial begin
      tu_valid[l] = 0; tu_luma[l] = 1; tu_dst[l] = 0; tu_last[l] = 0; tu_lb_store[l] = 0;
      tu_mode[l] = 0; tu_blk[l] = 0; tu_corner[l] = 0; tu_lb_addr[l] = 0;
      for (int i = 0; i < 16; i++) tu_coef[l][i] = '0;
      for (int k = 0; k < 8; k++) begin tu_top[l][k] = '0; tu_left[l][k] = '0; end
      pp_rd_en[l] = 0; pp_rd_release[l] = 0; pp_rd_addr[l] = 0; mb_done[l] = 0;
      df_valid[l] = 0; df_bs[l] = 0; df_qp[l] = 0; alf_valid[l] = 0; alf_first[l] = 0; alf_on[l] = 1;
      for (int k = 0; k < 4; k++) for (int i = 0; i < 4; i++) begin df_p[l][k][i] = '0; df_q[l][k][i] = '0; end
      for (int r = 0; r < 10; r++) for (int c = 0; c < 4; c++) alf_col[l][r][c] = '0;
      wait (rst_n);
      forever begin
        int mbc; int exp_rec [16][16];
        @(posedge clk);
        if (my_mbs == (ROWS_RUN / L) * (FW / 16)) break;   // this lane's rows are done
        if (!mb_start[l]) continue;
        mbc = int'(mb_col[l]);
        t_mb0[l] = $time;
        for (int b = 0; b < 16; b++) begin
          int c[64]; int r[64]; int t[8]; int lf[8]; int cr; int pr[16]; int m; bit d;
          m = int'($urandom_range(0, 34)); d = 1'($urandom);
          for (int i = 0; i < 64; i++) c[i] = 0;
          @(negedge clk);
          for (int i = 0; i < 16; i++) begin
            c[8*(i/4) + i%4] = ($urandom_range(0, 2) == 0) ? int'($urandom_range(0, 255)) - 128 : 0;
            tu_coef[l][i] = coef_t'(c[8*(i/4) + i%4]);
          end
          for (int k = 0; k < 8; k++) begin
            t[k] = int'($urandom_range(0, 255)); lf[k] = int'($urandom_range(0, 255));
            tu_top[l][k] = pix_t'(t[k]); tu_left[l][k] = pix_t'(lf[k]);
          end
          cr = int'($urandom_range(0, 255)); tu_corner[l] = pix_t'(cr);
          inv2d(4, d, c, r);
          intra4(m, 1'b1, cr, t, lf, pr);
          for (int i = 0; i < 16; i++) exp_rec[b][i] = cl(0, 255, pr[i] + r[8*(i/4) + i%4]);
          while (!tu_ready[l]) @(negedge clk);
          tu_valid[l] = 1; tu_mode[l] = 6'(m); tu_dst[l] = d; tu_blk[l] = 4'(b); tu_last[l] = (b == 15);
          tu_lb_store[l] = (l == L - 1) && (b >= 12);
          tu_lb_addr[l] = LBW'(mbc * 4 + (b % 4));
          @(negedge clk);
          tu_valid[l] = 0;
          while (!rec_valid[l]) @(negedge clk);
          checks++;
          for (int i = 0; i < 16; i++) if (int'(rec_pix[l][i]) != exp_rec[b][i]) begin fail("recon"); break; end
          if (l == L - 1 && b >= 12) begin
            lb_model[mbc * 4 + b % 4] = {8'(exp_rec[b][15]), 8'(exp_rec[b][14]), 8'(exp_rec[b][13]), 8'(exp_rec[b][12])};
            lb_written[mbc * 4 + b % 4] = 1;
          end
        end
        if (($time - t_mb0[l]) / 10 > mb_cycles_max) mb_cycles_max = int'(($time - t_mb0[l]) / 10);
        // read the macroblock back from the ping-pong buffer
        while (!pp_rd_avail[l]) @(negedge clk);
        for (int w = 0; w < 64; w++) begin
          pp_rd_en[l] = 1; pp_rd_addr[l] = 6'(w);
          @(negedge clk);
          pp_rd_en[l] = 0;
          checks++;
          if (pp_rd_data[l] != {8'(exp_rec[w/4][4*(w%4)+3]), 8'(exp_rec[w/4][4*(w%4)+2]),
                                8'(exp_rec[w/4][4*(w%4)+1]), 8'(exp_rec[w/4][4*(w%4)])}) fail("ping-pong");
        end
        pp_rd_release[l] = 1;
        mb_done[l] = 1;
        @(negedge clk);
        pp_rd_release[l] = 0;
        mb_done[l] = 0;
        mbs_done++;
        my_mbs++;
      end
      lanes_idle++;
    end
  end

  // external memory model for the cache: 2-cycle reads
  logic [95:0] ext_mem [SEGS];
  always @(posedge clk) if (ext_wr_valid) ext_mem[ext_wr_seg] <= ext_wr_data;
  initial begin
    forever begin
      @(posedge clk);
      if (ext_rd_req) begin
        logic [LBW-1:0] s;
        s = ext_rd_seg;
        repeat (2) @(posedge clk);
        #1 ext_rd_valid = 1; ext_rd_data = ext_mem[s];
        @(posedge clk);
        #1 ext_rd_valid = 0;
      end
    end
  end

  // one deblocking segment on lane l, checked; returns the decision
  int last_m, last_t; bit last_dep, last_deq;
  task automatic df_seg(input int l, input int kind, output int m, output bit pr);
    int P[4][4]; int Q[4][4]; int a, b, t, bt; bit dep, deq;
    // kind 0: rough sides (filter off), 1: small step on mild texture (weak),
    // 2: tiny step on flat sides (strong)
    a = int'($urandom_range(40, 150));
    b = a + ((kind == 0) ? 20 : (kind == 1) ? 9 : 3);
    for (int k = 0; k < 4; k++) for (int i = 0; i < 4; i++) begin
      P[k][i] = a + ((kind == 0) ? 40 * (i % 2) : (kind == 1) ? int'($urandom_range(0, 2)) * (i % 2) : 0);
      Q[k][i] = b + ((kind == 0) ? 40 * (i % 2) : (kind == 1) ? int'($urandom_range(0, 2)) * (i % 2) : 0);
      df_p[l][k][i] = pix_t'(P[k][i]); df_q[l][k][i] = pix_t'(Q[k][i]);
    end
    df_bs[l] = 2'd2; df_qp[l] = 6'd37;
    df_dec(P, Q, 2, 37, 0, 0, m, t, dep, deq, pr, bt);
    last_m = m; last_t = t; last_dep = dep; last_deq = deq;
    df_valid[l] = 1;
    @(negedge clk);
    df_valid[l] = 0;
    checks += 2;
    if (!df_out_valid[l] || int'(df_out_dec[l].mode) != m || df_out_pred[l] != pr) fail("df decision");
    for (int k = 0; k < 4; k++) begin
      int pl[4]; int ql[4];
      for (int i = 0; i < 4; i++) begin pl[i] = P[k][i]; ql[i] = Q[k][i]; end
      df_line(m, t, dep, deq, pl, ql);
      for (int i = 0; i < 4; i++)
        if (int'(df_po[l][k][i]) != pl[i] || int'(df_qo[l][k][i]) != ql[i]) begin fail("df pixels"); break; end
    end
    if (m == 0) n_off++; else if (m == 1) n_weak++; else n_strong++;
  endtask

  initial begin
    int cached_model [SEGS];
    int sv_m [SEGS/2]; int sv_t [SEGS/2]; bit sv_dep [SEGS/2]; bit sv_deq [SEGS/2];
    logic [95:0] seg_data [SEGS];
    int used;
    for (int k = 0; k < 10; k++) alf_coef[k] = '0;
    for (int i = 0; i < 4; i++) begin rc_p[i] = '0; rc_q[i] = '0; end
    for (int s = 0; s < SEGS; s++) lb_written[s] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    wait (lanes_idle == L);
    @(negedge clk);
    checks++;
    if (mbs_done != ROWS_RUN * (FW/16)) fail("macroblock count");

    // ---- shared line buffer: first-lane reads against deblocking reads
    for (int s = 0; s < SEGS; s++) begin
      logic [31:0] got;
      @(negedge clk);
      lb_rd_req = 1; lb_rd_addr = LBW'(s);
      lb_df_req = 1; lb_df_addr = LBW'(SEGS - 1 - s);
      @(negedge clk);
      lb_rd_req = 0;
      got = lb_rd_data;
      checks++;
      if (!lb_rd_valid || !lb_written[s] || got != lb_model[s]) fail("line buffer intra read");
      // the deblocking read waited and is granted now
      @(negedge clk);
      lb_df_req = 0;
      checks++;
      if (!lb_df_valid || lb_df_data != lb_model[SEGS - 1 - s]) fail("line buffer df read");
      n_lbrd++;
    end

    // ---- deblocking on every lane, with the cache fed from the last lane
    used = 0;
    for (int s = 0; s < SEGS; s++) begin
      int m; bit pr;
      df_seg(L - 1, s % 3, m, pr);          // last lane's bottom edge: prediction
      pc_st_valid = 1; pc_st_seg = LBW'(s);
      pc_st_data = {$urandom, $urandom, $urandom}; seg_data[s] = pc_st_data;
      cached_model[s] = pr && (used < SEGS / RED);
      if (cached_model[s]) used++;
      // decision of the vertical edge kept for data recovery
      rc_save = (s % 2 == 0); rc_save_edge = EW'(s / 2);
      if (s % 2 == 0) begin
        sv_m[s/2] = last_m; sv_t[s/2] = last_t; sv_dep[s/2] = last_dep; sv_deq[s/2] = last_deq;
      end
      @(negedge clk);
      pc_st_valid = 0; rc_save = 0;
    end
    for (int s = 0; s < SEGS; s++) begin
      int m; bit pr;
      df_seg(0, (s * 5) % 3, m, pr);        // first lane's top edge: true decision
      pc_ld_valid = 1; pc_ld_seg = LBW'(s);
      @(negedge clk);
      pc_ld_valid = 0;
      while (!pc_ld_resp) @(negedge clk);
      checks++;
      if (cached_model[s] != 0) begin
        if (!pc_ld_hit || pc_ld_data != seg_data[s]) fail("cache hit");
      end else if (m != 0) begin
        if (pc_ld_hit || pc_ld_skip || pc_ld_data != seg_data[s]) fail("cache miss");
      end else begin
        n_skip++;
        if (!pc_ld_skip) fail("cache skip");
      end
      @(negedge clk);
    end
    for (int l = 1; l < L - 1; l++) for (int k = 0; k < 6; k++) begin
      int m; bit pr;
      df_seg(l, k % 3, m, pr);
    end

    // ---- data recovery of the *B row, with the decisions saved above
    for (int e = 0; e < SEGS / 2; e++) begin
      int pl[4]; int ql[4]; int a;
      a = int'($urandom_range(50, 180));
      for (int i = 0; i < 4; i++) begin
        pl[i] = a; ql[i] = a + 8; rc_p[i] = pix_t'(pl[i]); rc_q[i] = pix_t'(ql[i]);
      end
      rc_valid = 1; rc_edge = EW'(e);
      @(negedge clk);
      rc_valid = 0;
      df_line(sv_m[e], sv_t[e], sv_dep[e], sv_deq[e], pl, ql);
      checks++;
      if (!rc_out_valid) fail("recovery valid");
      for (int i = 0; i < 4; i++)
        if (int'(rc_out_p[i]) != pl[i] || int'(rc_out_q[i]) != ql[i]) begin fail("recovery pixels"); break; end
      if (sv_m[e] != 0) n_rec++;
    end

    // ---- ALF on every lane: a 3-chunk strip with identity coefficients
    alf_coef[9] = 10'sd256;
    for (int l = 0; l < L; l++) begin
      pix_t exp_blk [16];
      for (int ch = 0; ch < 3; ch++) begin
        alf_valid[l] = 1; alf_first[l] = (ch == 0);
        for (int r = 0; r < 10; r++) for (int c = 0; c < 4; c++) alf_col[l][r][c] = pix_t'($urandom);
        if (ch == 1) for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) exp_blk[4*r+c] = alf_col[l][3+r][c];
        @(negedge clk);
      end
      alf_valid[l] = 0;
      @(negedge clk);
      checks++;
      if (!alf_out_valid[l] || alf_out_blk[l] != exp_blk) fail("alf");
      else n_alf++;
    end

    // ---- every mechanism must have happened
    $display("longest macroblock (16 luma 4x4 units, one lane) = %0d cycles", mb_cycles_max);
    $display("wpp waits=%0d transform conflicts=%0d line-buffer df stalls=%0d", wpp_waits, it_conflicts, lb_df_stalls);
    $display("cache hits=%0d misses=%0d skips=%0d cached=%0d", pc_hits, pc_misses, n_skip, pc_cached);
    $display("df off=%0d weak=%0d strong=%0d recoveries=%0d alf blocks=%0d swaps lane0=%0d",
             n_off, n_weak, n_strong, n_rec, n_alf, pp_swaps[0]);
    checks += 12;
    if (wpp_waits == 0)    fail("no WPP wait");
    if (it_conflicts == 0) fail("no transform sharing conflict");
    if (lb_df_stalls == 0) fail("no line buffer structure hazard");
    if (pc_hits == 0)      fail("no cache hit");
    if (pc_misses == 0)    fail("no cache miss");
    if (n_skip == 0)       fail("no cache skip");
    if (n_off == 0)        fail("no filter-off edge");
    if (n_weak == 0)       fail("no weak filter");
    if (n_strong == 0)     fail("no strong filter");
    if (n_rec == 0)        fail("no recovery");
    if (n_alf != L)        fail("alf");
    for (int l = 0; l < L; l++) if (pp_swaps[l] != 32'((ROWS_RUN / L) * (FW/16))) fail("ping-pong swaps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
