// tb_wpp_scheduler: 4 lanes on a 6x9-macroblock frame with random per-lane
// decode times. Checks that every macroblock starts exactly once, on lane
// row%4, left to right, only after the macroblock above-right (or the whole
// row above) has finished; that lanes overlap; and that the frame ends.
module tb_wpp_scheduler;
  localparam int L = 4, C = 6, R = 9;
  localparam int RW = $clog2(R + L + 1), CW = $clog2(C + 1);
  logic clk = 0, rst_n = 0, frame_start = 0, frame_busy;
  logic mb_start [L];
  logic [RW-1:0] mb_row [L];
  logic [CW-1:0] mb_col [L];
  logic mb_done [L];
  logic [31:0] waits;
  int checks = 0, failures = 0, maxpar = 0, started = 0;
  bit fin [R][C];
  bit st  [R][C];
  int busy [L];
  always #5 clk = ~clk;
  wpp_scheduler #(.LANES(L), .MB_COLS(C), .MB_ROWS(R)) dut (.*);

  for (genvar l = 0; l < L; l++) begin : g_lane
    initial begin
      mb_done[l] = 0;
      forever begin
        @(posedge clk);
        if (mb_start[l]) begin
          int r, c;
          r = int'(mb_row[l]); c = int'(mb_col[l]);
          busy[l] = 1;
          repeat ($urandom_range(2, 12)) @(posedge clk);
          #1 mb_done[l] = 1; fin[r][c] = 1;
          @(posedge clk);
          #1 mb_done[l] = 0; busy[l] = 0;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    int par;
    par = 0;
    for (int l = 0; l < L; l++) begin
      par += busy[l];
      if (mb_start[l]) begin
        int r, c, need;
        r = int'(mb_row[l]); c = int'(mb_col[l]);
        started++;
        checks += 3;
        if (r % L != l) failures++;
        if (st[r][c]) failures++;
        st[r][c] = 1;
        if (c > 0 && !st[r][c-1]) failures++;
        if (r > 0) begin
          need = (c + 1 < C) ? c + 1 : C - 1;
          checks++;
          if (!fin[r-1][need]) begin
            failures++;
            $display("MB (%0d,%0d) started before (%0d,%0d) finished", r, c, r-1, need);
          end
        end
      end
    end
    if (par > maxpar) maxpar = par;
  end

  initial begin
    for (int l = 0; l < L; l++) busy[l] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); frame_start = 1;
    @(negedge clk); frame_start = 0;
    while (frame_busy) @(negedge clk);
    repeat (20) @(negedge clk);
    checks += 3;
    if (started != R * C) failures++;
    if (maxpar < 2) failures++;
    if (waits == 0) failures++;
    $display("started=%0d max parallel lanes=%0d waits=%0d", started, maxpar, waits);
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
