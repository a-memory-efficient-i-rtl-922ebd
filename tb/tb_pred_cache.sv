// tb_pred_cache: several macroblock rows of a small frame. For each row every
// 4-column segment is stored with a random guess bit, then loaded one row
// later with a random true decision, in order. An external-memory model
// (fixed latency) serves misses. Checks the returned data of every hit and
// miss, the hit/miss/skip classification against a model of the slot pool
// (guess=1 is cached while a slot is free), and the counters.
module tb_pred_cache;
  localparam int W = 256, R = 4;
  localparam int SEGS = W / 4, SLOTS = SEGS / R;
  localparam int SW = $clog2(SEGS);
  logic clk = 0, rst_n = 0;
  logic st_valid = 0, st_guess = 0, ld_valid = 0, ld_need = 0, ld_ready, ld_resp, ld_hit, ld_skip;
  logic [SW-1:0] st_seg = 0, ld_seg = 0, ext_wr_seg, ext_rd_seg;
  logic [95:0] st_data = 0, ext_wr_data, ld_data, ext_rd_data = 0;
  logic ext_wr_valid, ext_rd_req, ext_rd_valid = 0;
  logic [31:0] n_hit, n_miss, n_cached;
  int checks = 0, failures = 0, hits = 0, misses = 0, skips = 0;
  logic [95:0] ext_mem [SEGS];
  logic [95:0] line_data [SEGS];
  bit cached [SEGS];
  always #5 clk = ~clk;
  pred_cache #(.FRAME_WIDTH(W), .REDUCTION(R)) dut (.*);

  // external memory: takes writes, answers reads after 3 cycles
  always @(posedge clk) begin
    if (ext_wr_valid) ext_mem[ext_wr_seg] <= ext_wr_data;
  end
  initial begin
    forever begin
      @(posedge clk);
      if (ext_rd_req) begin
        logic [SW-1:0] s;
        s = ext_rd_seg;
        repeat (3) @(posedge clk);
        #1 ext_rd_valid = 1; ext_rd_data = ext_mem[s];
        @(posedge clk);
        #1 ext_rd_valid = 0;
      end
    end
  end

  initial begin
    int used;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int row = 0; row < 6; row++) begin
      // load the previous row's segments (first row has none)
      if (row > 0)
        for (int s = 0; s < SEGS; s++) begin
          bit need;
          need = ($urandom_range(0, 2) != 0);
          @(negedge clk);
          ld_valid = 1; ld_seg = SW'(s); ld_need = need;
          while (!ld_ready) @(negedge clk);
          @(negedge clk);
          ld_valid = 0;
          while (!ld_resp) @(negedge clk);
          checks += 2;
          if (cached[s]) begin
            hits++;
            if (!ld_hit) failures++;
            if (ld_data != line_data[s]) failures++;
          end else if (need) begin
            misses++;
            if (ld_hit || ld_skip) failures++;
            if (ld_data != line_data[s]) failures++;
          end else begin
            skips++;
            if (!ld_skip) failures++;
            checks--;
          end
        end
      // store this row's bottom lines
      used = 0;
      for (int s = 0; s < SEGS; s++) begin
        bit g;
        g = ($urandom_range(0, 1) == 0) || (row == 3);
        @(negedge clk);
        st_valid = 1; st_seg = SW'(s); st_guess = g;
        st_data = {$urandom, $urandom, $urandom};
        line_data[s] = st_data;
        cached[s] = g && (used < SLOTS);
        if (cached[s]) used++;
        checks++;
        #1 if (ext_wr_valid == cached[s]) failures++;
      end
      @(negedge clk); st_valid = 0;
    end
    checks += 2;
    if (int'(n_hit) != hits) failures++;
    if (int'(n_miss) != misses) failures++;
    checks++;
    if (hits == 0 || misses == 0 || skips == 0) failures++;
    $display("hits=%0d misses=%0d skips=%0d", hits, misses, skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
