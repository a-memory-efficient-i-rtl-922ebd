// wpp_scheduler: wavefront (WPP) scheduling of macroblock rows onto the
// parallel decoding lanes.
// Lane l decodes macroblock rows l, l+LANES, l+2*LANES, ... left to right. A
// macroblock (r, c) may start only when the row above has finished column
// c+1, i.e. the row above is two macroblocks ahead (its top-right neighbour is
// decoded), or the row above is complete. So lanes run as a staircase and the
// one-line buffer is needed only between the last lane and the first.
// Per lane: mb_start pulses with (mb_row, mb_col) and the lane answers with a
// mb_done pulse when that macroblock has left the lane. waits counts cycles in
// which an idle lane was held back by the dependency.
// The lane count and the two-macroblock lead are the document's; the
// start/done handshake is this design's.
module wpp_scheduler #(
  parameter int unsigned LANES   = 4,
  parameter int unsigned MB_COLS = 480,   // 7680 / 16
  parameter int unsigned MB_ROWS = 270,   // 4320 / 16
  localparam int unsigned RW     = $clog2(MB_ROWS + LANES + 1),
  localparam int unsigned CW     = $clog2(MB_COLS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_start,
  output logic          frame_busy,
  output logic          mb_start [LANES],
  output logic [RW-1:0] mb_row   [LANES],
  output logic [CW-1:0] mb_col   [LANES],
  input  logic          mb_done  [LANES],
  output logic [31:0]   waits
);
  logic [RW-1:0] row  [LANES];     // row the lane is on
  logic [CW-1:0] col  [LANES];     // next column to start
  logic [CW-1:0] fin  [LANES];     // columns finished in that row
  logic          busy [LANES];     // a macroblock is in flight
  logic          act;
  logic          ok   [LANES];
  logic          idle [LANES];

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic signed [31:0] up;
      logic signed [31:0] need;
      up   = (l == 0) ? LANES - 1 : l - 1;
      need = (int'(col[l]) + 2 > int'(MB_COLS)) ? int'(MB_COLS) : int'(col[l]) + 2;
      idle[l] = act && !busy[l] && (int'(row[l]) < int'(MB_ROWS)) && (int'(col[l]) < int'(MB_COLS));
      if (row[l] == '0)                  ok[l] = 1'b1;
      else if (int'(row[up]) > int'(row[l]) - 1) ok[l] = 1'b1;
      else                               ok[l] = (int'(fin[up]) >= need);
    end
  end

  assign frame_busy = act;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= 1'b0; waits <= '0;
      for (int l = 0; l < LANES; l++) begin
        row[l] <= RW'(l); col[l] <= '0; fin[l] <= '0; busy[l] <= 1'b0;
        mb_start[l] <= 1'b0; mb_row[l] <= '0; mb_col[l] <= '0;
      end
    end else begin
      if (frame_start && !act) begin
        act <= 1'b1;
        for (int l = 0; l < LANES; l++) begin
          row[l] <= RW'(l); col[l] <= '0; fin[l] <= '0; busy[l] <= 1'b0;
        end
      end else if (act) begin
        logic all_done;
        all_done = 1'b1;
        for (int l = 0; l < LANES; l++) begin
          mb_start[l] <= 1'b0;
          if (idle[l] && ok[l]) begin
            mb_start[l] <= 1'b1;
            mb_row[l]   <= row[l];
            mb_col[l]   <= col[l];
            col[l]      <= col[l] + 1'b1;
            busy[l]     <= 1'b1;
          end else if (idle[l]) begin
            waits <= waits + 32'd1;
          end
          if (busy[l] && mb_done[l]) begin
            busy[l] <= 1'b0;
            if (int'(fin[l]) + 1 == int'(MB_COLS)) begin
              row[l] <= row[l] + RW'(LANES);
              col[l] <= '0;
              fin[l] <= '0;
            end else begin
              fin[l] <= fin[l] + 1'b1;
            end
          end
          if (int'(row[l]) < int'(MB_ROWS)) all_done = 1'b0;
        end
        if (all_done) act <= 1'b0;
      end
    end
  end
endmodule
