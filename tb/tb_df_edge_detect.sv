// tb_df_edge_detect: random edge segments (smooth sides with a step, plus
// noisy ones) over all QPs and boundary strengths, against the reference
// decision with literal beta/tc tables. Counts that off, weak and strong
// decisions and both prediction outcomes all occurred.
module tb_df_edge_detect;
  import hevc_pkg::*;
  import tb_ref_pkg::*;
  pix_t p [4][4], q [4][4];
  logic [1:0] bs;
  logic [5:0] qp;
  logic signed [4:0] beta_offset, tc_offset;
  df_dec_t dec;
  logic [6:0] beta;
  logic pred_on;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};
  int npred [2] = '{0, 0};
  df_edge_detect dut (.*);
  initial begin
    for (int n = 0; n < 20000; n++) begin
      int P[4][4]; int Q[4][4]; int a, b, noise, m, t, bt; bit dep, deq, pr;
      a = int'($urandom_range(20, 235)); b = a + int'($urandom_range(0, 40)) - 20;
      noise = (n % 4 == 0) ? 12 : (n % 4 == 1) ? 0 : 2;
      for (int k = 0; k < 4; k++)
        for (int i = 0; i < 4; i++) begin
          P[k][i] = cl(0, 255, a + int'($urandom_range(0, noise)) + i * (n % 3));
          Q[k][i] = cl(0, 255, b + int'($urandom_range(0, noise)));
          p[k][i] = pix_t'(P[k][i]); q[k][i] = pix_t'(Q[k][i]);
        end
      bs = 2'($urandom_range(0, 2));
      qp = 6'($urandom_range(10, 51));
      beta_offset = 5'(2 * (int'($urandom_range(0, 6)) - 3));
      tc_offset   = 5'(2 * (int'($urandom_range(0, 6)) - 3));
      #1;
      df_dec(P, Q, int'(bs), int'(qp), int'(beta_offset), int'(tc_offset), m, t, dep, deq, pr, bt);
      checks += 4;
      if (int'(dec.mode) != m) failures++;
      if (int'(dec.tc) != t)   failures++;
      if (int'(beta) != bt)    failures++;
      if (pred_on != pr)       failures++;
      if (m == 1) begin
        checks += 2;
        if (dec.dep != dep) failures++;
        if (dec.deq != deq) failures++;
      end
      seen[m]++;
      npred[pr]++;
    end
    $display("decisions off=%0d weak=%0d strong=%0d  predicted on=%0d off=%0d",
             seen[0], seen[1], seen[2], npred[1], npred[0]);
    for (int k = 0; k < 3; k++) begin checks++; if (seen[k] == 0) failures++; end
    for (int k = 0; k < 2; k++) begin checks++; if (npred[k] == 0) failures++; end
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
