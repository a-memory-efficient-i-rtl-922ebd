// tb_shared_line_buffer: random intra writes/reads and deblocking reads on
// the single port, checked against a model array. Checks that the intra side
// always wins, that a competing deblocking read waits (stall) and is served
// later with the right word, and the one-cycle read latency.
module tb_shared_line_buffer;
  localparam int W = 512;
  localparam int N = W / 4;
  logic clk = 0, rst_n = 0;
  logic in_req = 0, in_we = 0, in_gnt, in_rvalid, df_req = 0, df_gnt, df_rvalid, df_stall;
  logic [$clog2(N)-1:0] in_addr = 0, df_addr = 0;
  logic [31:0] in_wdata = 0, in_rdata, df_rdata;
  int checks = 0, failures = 0, stalls = 0, dfreads = 0;
  logic [31:0] model [N];
  always #5 clk = ~clk;
  shared_line_buffer #(.FRAME_WIDTH(W)) dut (.*);
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < N; a++) begin
      @(negedge clk);
      in_req = 1; in_we = 1; in_addr = $bits(in_addr)'(a); in_wdata = $urandom; model[a] = in_wdata;
    end
    @(negedge clk); in_req = 0; in_we = 0;
    for (int n = 0; n < 3000; n++) begin
      logic [31:0] exp_in, exp_df;
      bit ir, iw, dr, in_rd, df_ok;
      ir = ($urandom_range(0, 2) == 0); iw = 1'($urandom); dr = 1'($urandom);
      in_req = ir; in_we = iw; in_addr = $bits(in_addr)'($urandom_range(0, N-1)); in_wdata = $urandom;
      df_req = dr; df_addr = $bits(df_addr)'($urandom_range(0, N-1));
      exp_in = model[in_addr]; exp_df = model[df_addr];
      #1;
      checks++;
      if (df_gnt != (dr && !ir)) failures++;
      if (dr && ir) begin checks++; stalls++; if (!df_stall) failures++; end
      in_rd = ir && !iw; df_ok = dr && !ir;
      if (ir && iw) model[in_addr] = in_wdata;
      @(negedge clk);
      if (in_rd) begin checks += 2; if (!in_rvalid) failures++; if (in_rdata != exp_in) failures++; end
      if (df_ok) begin checks += 2; dfreads++; if (!df_rvalid) failures++; if (df_rdata != exp_df) failures++; end
      in_req = 0; df_req = 0;
    end
    checks++;
    if (stalls == 0 || dfreads == 0) failures++;
    $display("stalls=%0d df reads=%0d", stalls, dfreads);
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
