// tb_intra_pred: all 35 modes, luma and chroma, random and flat references,
// against the standard's sample equations (tb_ref_pkg::intra4). Checks the
// predicted and reconstructed pixels and the 4-pixels-per-cycle timing
// (one line per cycle: done rises at the fourth edge after the one that takes start, and is sampled at the fifth).
module tb_intra_pred;
  import hevc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, luma = 1, busy, done;
  logic [5:0] mode = 0;
  pix_t corner, top [8], left [8], pred [16], recon [16];
  res_t res [16];
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  intra_pred dut (.*);

  task automatic one(input int m, input bit lu, input int style);
    int t[8]; int l[8]; int c; int rs[16]; int e[16]; int t0;
    c = int'($urandom_range(0, 255));
    for (int k = 0; k < 8; k++) begin
      t[k] = (style == 0) ? int'($urandom_range(0, 255)) : (style == 1 ? 128 : 16 * k + 10);
      l[k] = (style == 0) ? int'($urandom_range(0, 255)) : (style == 1 ? 128 : 250 - 20 * k);
      top[k] = pix_t'(t[k]); left[k] = pix_t'(l[k]);
    end
    if (style == 1) c = 128;
    corner = pix_t'(c);
    for (int i = 0; i < 16; i++) begin rs[i] = int'($urandom_range(0, 600)) - 300; res[i] = res_t'(rs[i]); end
    intra4(m, lu, c, t, l, e);
    @(negedge clk);
    mode = 6'(m); luma = lu; start = 1;
    @(posedge clk); t0 = cyc;
    #1 start = 0;
    while (!done) @(posedge clk);
    checks++;
    if (cyc - t0 != 5) begin failures++; $display("latency %0d", cyc - t0); end
    #1;
    for (int i = 0; i < 16; i++) begin
      checks += 2;
      if (int'(pred[i]) != e[i]) begin
        failures++;
        if (failures < 8) $display("mode %0d luma %0d pix %0d got %0d exp %0d", m, lu, i, pred[i], e[i]);
      end
      if (int'(recon[i]) != cl(0, 255, e[i] + rs[i])) failures++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 20; rep++)
      for (int m = 0; m < 35; m++) one(m, (rep % 4) != 3, (rep < 16) ? 0 : rep - 16 > 1 ? 2 : rep - 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
