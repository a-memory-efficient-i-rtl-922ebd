// tb_df_recovery: stores random vertical-edge decisions for many edge
// positions, then recovers *B rows at those positions in a different order
// and compares with the reference line filter using the stored decision.
// Checks the one-cycle answer.
module tb_df_recovery;
  import hevc_pkg::*;
  import tb_ref_pkg::*;
  localparam int W = 256;
  localparam int E = W / 8;
  logic clk = 0, rst_n = 0;
  logic save_valid = 0, rec_valid = 0, out_valid;
  logic [$clog2(E)-1:0] save_edge = 0, rec_edge = 0;
  df_dec_t save_dec;
  pix_t rec_p [4], rec_q [4], out_p [4], out_q [4];
  int checks = 0, failures = 0;
  df_dec_t stored [E];
  always #5 clk = ~clk;
  df_recovery #(.FRAME_WIDTH(W)) dut (.*);
  initial begin
    save_dec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int e = 0; e < E; e++) begin
      @(negedge clk);
      stored[e].mode = df_mode_e'($urandom_range(0, 2));
      stored[e].tc   = 5'($urandom_range(1, 20));
      stored[e].dep  = 1'($urandom);
      stored[e].deq  = 1'($urandom);
      save_valid = 1; save_edge = $bits(save_edge)'(e); save_dec = stored[e];
    end
    @(negedge clk); save_valid = 0;
    for (int n = 0; n < 400; n++) begin
      int e, a, b; int pl[4]; int ql[4];
      e = (n * 7 + 3) % E;
      a = int'($urandom_range(30, 220)); b = a + int'($urandom_range(0, 30)) - 15;
      for (int i = 0; i < 4; i++) begin
        pl[i] = cl(0, 255, a + int'($urandom_range(0, 4))); ql[i] = cl(0, 255, b + int'($urandom_range(0, 4)));
        rec_p[i] = pix_t'(pl[i]); rec_q[i] = pix_t'(ql[i]);
      end
      rec_valid = 1; rec_edge = $bits(rec_edge)'(e);
      @(negedge clk);
      rec_valid = 0;
      df_line(int'(stored[e].mode), int'(stored[e].tc), stored[e].dep, stored[e].deq, pl, ql);
      checks++;
      if (!out_valid) failures++;
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (int'(out_p[i]) != pl[i]) failures++;
        if (int'(out_q[i]) != ql[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
