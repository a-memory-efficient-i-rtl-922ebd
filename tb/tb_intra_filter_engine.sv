// tb_intra_filter_engine: exhaustive check of the 2-tap engine against
// ((32-f)*a + f*b + 16) >> 5 over a grid of a, b and all 32 phases.
module tb_intra_filter_engine;
  import hevc_pkg::*;
  pix_t a, b, y;
  logic [4:0] f;
  int checks = 0, failures = 0;
  intra_filter_engine dut (.a(a), .b(b), .f(f), .y(y));
  initial begin
    for (int ia = 0; ia < 256; ia += 3)
      for (int ib = 0; ib < 256; ib += 5)
        for (int fi = 0; fi < 32; fi++) begin
          int e;
          a = pix_t'(ia); b = pix_t'(ib); f = 5'(fi);
          #1;
          e = ((32 - fi) * ia + fi * ib + 16) / 32;
          checks++;
          if (int'(y) != e) begin
            failures++;
            if (failures < 5) $display("a=%0d b=%0d f=%0d got %0d exp %0d", ia, ib, fi, y, e);
          end
        end
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
