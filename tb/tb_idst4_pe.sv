// tb_idst4_pe: compares the 4-point inverse DST engine with the matrix product
// y[i] = sum_k c[k]*D4[k][i] for corner values and 2000 random vectors.
module tb_idst4_pe;
  import hevc_pkg::*;
  import tb_ref_pkg::*;
  coef_t c [4];
  logic signed [26:0] y [4];
  int checks = 0, failures = 0;
  idst4_pe dut (.c(c), .y(y));
  initial begin
    int cv[8]; int ref_y[8];
    for (int n = 0; n < 2004; n++) begin
      for (int k = 0; k < 8; k++) cv[k] = 0;
      for (int k = 0; k < 4; k++) begin
        if (n < 4) cv[k] = (n == 0) ? 32767 : (n == 1) ? -32768 : (k == n) ? 1000 : 0;
        else       cv[k] = int'($urandom_range(0, 65535)) - 32768;
        c[k] = coef_t'(cv[k]);
      end
      #1;
      inv1d(4, 1'b1, cv, ref_y);
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (int'(y[i]) != ref_y[i]) begin
          failures++;
          if (failures < 5) $display("mismatch n=%0d i=%0d got %0d exp %0d", n, i, y[i], ref_y[i]);
        end
      end
    end
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
