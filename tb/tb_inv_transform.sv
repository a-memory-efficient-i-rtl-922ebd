// tb_inv_transform: 2-D inverse transform against a matrix-product model
// (columns: shift 7 and 16-bit clip; rows: shift 12) for random 4x4 DCT,
// 4x4 DST and 8x8 DCT blocks, with random output back-pressure. Checks the
// latency (3 cycles for 4x4, 5 for 8x8 from acceptance to out_valid) and
// that the tag travels with the block.
module tb_inv_transform;
  import hevc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_size8 = 0, in_dst = 0, out_valid, out_ready = 0, out_size8;
  logic [1:0] in_tag = 0, out_tag;
  coef_t in_coef [64];
  res_t  out_res [64];
  int checks = 0, failures = 0, cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  inv_transform dut (.*);

  task automatic run_block(input bit s8, input bit dst, input int sparse, input bit bp);
    int c[64]; int r[64]; int n; int t0, lat;
    n = s8 ? 8 : 4;
    for (int i = 0; i < 64; i++) begin
      int rr, cc;
      rr = i / 8; cc = i % 8;
      c[i] = 0;
      if (rr < n && cc < n) begin
        if (sparse == 0)      c[i] = int'($urandom_range(0, 65535)) - 32768;
        else if (sparse == 1) c[i] = int'($urandom_range(0, 511)) - 256;
        else                  c[i] = ($urandom_range(0, 3) == 0) ? int'($urandom_range(0, 4095)) - 2048 : 0;
      end
      in_coef[i] = coef_t'(c[i]);
    end
    inv2d(n, dst, c, r);
    @(negedge clk);
    in_valid = 1; in_size8 = s8; in_dst = dst; in_tag = 2'($urandom);
    while (!in_ready) @(negedge clk);
    @(posedge clk); t0 = cyc;
    #1 in_valid = 0;
    while (!out_valid) @(posedge clk);
    lat = cyc - t0;
    checks++;
    if (lat != (s8 ? 5 : 3)) begin failures++; $display("latency %0d size8=%0d", lat, s8); end
    if (bp) repeat ($urandom_range(1, 4)) @(negedge clk);
    @(negedge clk);
    checks++;
    if (out_tag != in_tag) failures++;
    for (int i = 0; i < 64; i++) begin
      if ((i / 8) < n && (i % 8) < n) begin
        checks++;
        if (int'(out_res[i]) != r[i]) begin
          failures++;
          if (failures < 6) $display("mismatch s8=%0d dst=%0d i=%0d got %0d exp %0d", s8, dst, i, out_res[i], r[i]);
        end
      end
    end
    out_ready = 1;
    @(negedge clk);
    out_ready = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int kind;
      kind = t % 3;
      run_block(kind == 2, kind == 1, t % 3, t[0]);
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
