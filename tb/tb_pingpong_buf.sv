// tb_pingpong_buf: a producer writes 64-word blocks and commits them while a
// slower consumer reads and releases them. Checks every word read, that the
// producer is held off while both banks are full, and the swap count.
module tb_pingpong_buf;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_commit = 0, wr_ready, rd_en = 0, rd_release = 0, rd_avail;
  logic [5:0] wr_addr = 0, rd_addr = 0;
  logic [31:0] wr_data = 0, rd_data, n_swaps;
  int checks = 0, failures = 0, held = 0;
  logic [31:0] blocks [8][64];
  always #5 clk = ~clk;
  pingpong_buf dut (.*);
  initial begin
    for (int b = 0; b < 8; b++) for (int i = 0; i < 64; i++) blocks[b][i] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    fork
      begin : producer
        for (int b = 0; b < 8; b++) begin
          for (int i = 0; i < 64; i++) begin
            while (!wr_ready) begin held++; @(negedge clk); end
            wr_en = 1; wr_addr = 6'(i); wr_data = blocks[b][i];
            @(negedge clk);
            wr_en = 0;
          end
          wr_commit = 1;
          @(negedge clk);
          wr_commit = 0;
        end
      end
      begin : consumer
        for (int b = 0; b < 8; b++) begin
          while (!rd_avail) @(negedge clk);
          for (int i = 0; i < 64; i++) begin
            rd_en = 1; rd_addr = 6'(i);
            @(negedge clk);
            rd_en = 0;
            checks++;
            if (rd_data != blocks[b][i]) failures++;
            repeat (2) @(negedge clk);
          end
          rd_release = 1;
          @(negedge clk);
          rd_release = 0;
        end
      end
    join
    checks += 2;
    if (n_swaps != 32'd8) failures++;
    if (held == 0) failures++;
    $display("producer held %0d cycles", held);
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
