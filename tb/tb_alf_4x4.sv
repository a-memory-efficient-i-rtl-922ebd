// tb_alf_4x4: filters a random 10-row x 32-column strip (3 rows above, one
// row of 4x4 blocks, 3 below) fed as 4-column chunks, with random symmetric
// coefficients, and compares every block with a direct evaluation of the
// 19-tap shape on the strip. Also checks alf_on=0 pass-through, the output
// timing (two edges after the chunk) and the number of blocks produced.
module tb_alf_4x4;
  import hevc_pkg::*;
  import tb_ref_pkg::*;
  localparam int COLS = 32;
  logic clk = 0, rst_n = 0, in_valid = 0, in_first = 0, alf_on = 1, out_valid;
  pix_t in_col [10][4], out_blk [16];
  logic signed [9:0] coef [10];
  int checks = 0, failures = 0, nblk = 0, expblk = 0;
  int img [10][COLS];
  int cf [10];
  always #5 clk = ~clk;
  alf_4x4 dut (.*);

  function automatic int ref_pix(input int y, input int x);
    int acc;
    acc = 0;
    for (int t = 0; t < 19; t++) acc += cf[(t <= 9) ? t : 18 - t] * img[y + AY[t]][x + AX[t]];
    return cl(0, 255, (acc + 128) >>> 8);
  endfunction

  task automatic strip(input bit on, input bit gaps);
    int bx;
    for (int r = 0; r < 10; r++) for (int c = 0; c < COLS; c++) img[r][c] = int'($urandom_range(0, 255));
    alf_on = on;
    bx = 0;
    for (int ch = 0; ch < COLS / 4; ch++) begin
      @(negedge clk);
      in_valid = 1; in_first = (ch == 0);
      for (int r = 0; r < 10; r++) for (int c = 0; c < 4; c++) in_col[r][c] = pix_t'(img[r][4*ch + c]);
      if (ch >= 2) begin
        // block of chunk ch-1 appears after two edges
        fork
          begin
            int b;
            b = ch - 1;
            @(posedge clk); @(posedge clk); #1;
            checks++;
            if (!out_valid) failures++;
            else begin
              nblk++;
              for (int by = 0; by < 4; by++) for (int x = 0; x < 4; x++) begin
                int e;
                e = on ? ref_pix(3 + by, 4*b + x) : img[3 + by][4*b + x];
                checks++;
                if (int'(out_blk[4*by + x]) != e) begin
                  failures++;
                  if (failures < 5) $display("blk %0d (%0d,%0d) got %0d exp %0d", b, by, x, out_blk[4*by+x], e);
                end
              end
            end
          end
        join_none
        expblk++;
      end
      if (gaps) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < 9; k++) begin cf[k] = int'($urandom_range(0, 40)) - 12; end
    cf[9] = 256;
    for (int k = 0; k < 9; k++) cf[9] -= 2 * cf[k];
    for (int k = 0; k < 10; k++) coef[k] = 10'(cf[k]);
    repeat (2) @(negedge clk);
    rst_n = 1;
    strip(1, 0);
    strip(1, 1);
    strip(0, 0);
    for (int k = 0; k < 10; k++) begin cf[k] = int'($urandom_range(0, 100)) - 50; coef[k] = 10'(cf[k]); end
    strip(1, 0);
    checks++;
    if (nblk != expblk) failures++;
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
