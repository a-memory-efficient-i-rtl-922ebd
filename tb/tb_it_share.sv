// tb_it_share: four lanes request 4x4 transforms at random times, all at once
// in bursts. Checks that each lane gets back exactly its own residual blocks
// in order (matrix-product model), that competing requests are served
// round-robin (no lane served twice while another waits) and that the
// conflict counter moved.
module tb_it_share;
  import hevc_pkg::*;
  import tb_ref_pkg::*;
  localparam int L = 4, NB = 40;
  logic clk = 0, rst_n = 0;
  logic req_valid [L], req_ready [L], req_dst [L], resp_valid [L], resp_ready [L];
  coef_t req_coef [L][16];
  res_t resp_res [16];
  logic [31:0] conflicts;
  int checks = 0, failures = 0, done_lanes = 0;
  int grants [L];
  always #5 clk = ~clk;
  it_share #(.LANES(L)) dut (.*);

  for (genvar l = 0; l < L; l++) begin : g_lane
    initial begin
      req_valid[l] = 0; resp_ready[l] = 0; req_dst[l] = 0; grants[l] = 0;
      for (int i = 0; i < 16; i++) req_coef[l][i] = '0;
      wait (rst_n);
      for (int b = 0; b < NB; b++) begin
        int c[64]; int r[64]; bit d;
        d = 1'($urandom);
        for (int i = 0; i < 64; i++) c[i] = 0;
        for (int i = 0; i < 16; i++) begin
          c[8*(i/4) + i%4] = int'($urandom_range(0, 2047)) - 1024;
          req_coef[l][i] = coef_t'(c[8*(i/4) + i%4]);
        end
        inv2d(4, d, c, r);
        if (b % 10 != 0) repeat ($urandom_range(0, 3)) @(negedge clk);
        @(negedge clk);
        req_valid[l] = 1; req_dst[l] = d;
        @(posedge clk);
        while (!req_ready[l]) @(posedge clk);
        grants[l]++;
        #1 req_valid[l] = 0; resp_ready[l] = 1;
        @(posedge clk);
        while (!resp_valid[l]) @(posedge clk);
        for (int i = 0; i < 16; i++) begin
          checks++;
          if (int'(resp_res[i]) != r[8*(i/4) + i%4]) failures++;
        end
        #1 resp_ready[l] = 0;
      end
      done_lanes++;
    end
  end

  // round-robin fairness: while lane l waits, no other lane is granted twice
  int since [L];
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < L; l++) begin
      if (req_valid[l] && req_ready[l]) since[l] = 0;
      else if (req_valid[l]) begin
        for (int o = 0; o < L; o++) if (o != l && req_valid[o] && req_ready[o]) since[l]++;
        checks++;
        if (since[l] > L - 1) failures++;
      end else since[l] = 0;
    end
  end

  initial begin
    for (int l = 0; l < L; l++) since[l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (done_lanes == L);
    checks++;
    if (conflicts == 0) failures++;
    $display("conflict cycles=%0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
