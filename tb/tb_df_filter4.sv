// tb_df_filter4: the four-line strong/weak filter against the reference
// line filter, for random decisions (off, weak with every dEp/dEq, strong),
// random tc and random samples, with random line enables.
module tb_df_filter4;
  import hevc_pkg::*;
  import tb_ref_pkg::*;
  df_dec_t dec;
  logic line_en [4];
  pix_t p [4][4], q [4][4], po [4][4], qo [4][4];
  int checks = 0, failures = 0;
  int changed = 0;
  df_filter4 dut (.*);
  initial begin
    for (int n = 0; n < 20000; n++) begin
      int P[4][4]; int Q[4][4]; int m, t, a, b;
      m = n % 3; t = int'($urandom_range(0, 24));
      dec.mode = df_mode_e'(m); dec.tc = 5'(t);
      dec.dep = 1'($urandom); dec.deq = 1'($urandom);
      a = int'($urandom_range(0, 255)); b = cl(0, 255, a + int'($urandom_range(0, 60)) - 30);
      for (int k = 0; k < 4; k++) begin
        line_en[k] = (n % 7 == 0) ? 1'($urandom) : 1'b1;
        for (int i = 0; i < 4; i++) begin
          P[k][i] = (n % 5 == 0) ? int'($urandom_range(0, 255)) : cl(0, 255, a + int'($urandom_range(0, 6)) - 3);
          Q[k][i] = (n % 5 == 0) ? int'($urandom_range(0, 255)) : cl(0, 255, b + int'($urandom_range(0, 6)) - 3);
          p[k][i] = pix_t'(P[k][i]); q[k][i] = pix_t'(Q[k][i]);
        end
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        int pl[4]; int ql[4];
        for (int i = 0; i < 4; i++) begin pl[i] = P[k][i]; ql[i] = Q[k][i]; end
        if (line_en[k]) df_line(m, t, dec.dep, dec.deq, pl, ql);
        for (int i = 0; i < 4; i++) begin
          checks += 2;
          if (int'(po[k][i]) != pl[i]) failures++;
          if (int'(qo[k][i]) != ql[i]) failures++;
          if (pl[i] != P[k][i]) changed++;
        end
      end
    end
    checks++;
    if (changed == 0) failures++;
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
