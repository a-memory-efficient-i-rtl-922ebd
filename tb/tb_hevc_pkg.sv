// tb_hevc_pkg: checks the package's table functions (beta, tc, intra angle,
// inverse angle) against literal tables and the clipping helpers at their
// limits.
module tb_hevc_pkg;
  import hevc_pkg::*;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  initial begin
    for (int q = 0; q < 52; q++) begin checks++; if (df_beta(q) != BETA_T[q]) failures++; end
    for (int q = 0; q < 54; q++) begin checks++; if (df_tc(q) != TC_T[q]) failures++; end
    for (int m = 2; m < 35; m++) begin
      int a;
      a = intra_angle(6'(m));
      checks++;
      if (a != ANG[m]) failures++;
      if (a < 0) begin
        checks++;
        // invAngle = round(8192 / angle)
        if (intra_inv_angle(a) != -((8192 + (-a) / 2) / (-a))) failures++;
      end
    end
    checks += 6;
    if (clip_pix(-5) != 8'd0) failures++;
    if (clip_pix(300) != 8'd255) failures++;
    if (clip_pix(77) != 8'd77) failures++;
    if (clip16(40000) != 16'sd32767) failures++;
    if (clip16(-40000) != -16'sd32768) failures++;
    if (iabs(-9) != 9) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
