// pingpong_buf: double-buffered pipeline stage memory between two decoder
// stages (two banks of 256 bytes, one 16x16 block of 8-bit pixels each).
// The producer fills the write bank and commits it; the banks then swap so
// that the consumer reads the committed bank while the producer fills the
// other. A bank is "full" from commit to release; the producer sees wr_ready
// low while both banks are full, the consumer sees rd_avail low while none is.
// Words are 4 pixels (32 bits), 64 words per bank; reads return data one
// cycle after rd_en. Sizes are the document's; the commit/release handshake
// is this design's.
module pingpong_buf
  import hevc_pkg::*;
#(
  parameter int unsigned BANK_BYTES = 256,
  localparam int unsigned WORDS     = BANK_BYTES / 4,
  localparam int unsigned AW        = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [31:0]   wr_data,
  input  logic          wr_commit,
  output logic          wr_ready,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_data,
  input  logic          rd_release,
  output logic          rd_avail,
  output logic [31:0]   n_swaps
);
  logic [31:0] bank0 [WORDS];
  logic [31:0] bank1 [WORDS];
  logic        full [2];
  logic        wsel, rsel;

  assign wr_ready = !full[wsel];
  assign rd_avail = full[rsel];

  always_ff @(posedge clk) begin
    if (wr_en && wr_ready) begin
      if (wsel) bank1[wr_addr] <= wr_data;
      else      bank0[wr_addr] <= wr_data;
    end
    if (rd_en) rd_data <= rsel ? bank1[rd_addr] : bank0[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full[0] <= 1'b0; full[1] <= 1'b0; wsel <= 1'b0; rsel <= 1'b0; n_swaps <= '0;
    end else begin
      if (wr_commit && wr_ready) begin
        full[wsel] <= 1'b1;
        wsel       <= !wsel;
        n_swaps    <= n_swaps + 32'd1;
      end
      if (rd_release && rd_avail) begin
        full[rsel] <= 1'b0;
        rsel       <= !rsel;
      end
    end
  end

  a_no_write_when_full: assert property (@(posedge clk) disable iff (!rst_n)
                                         wr_en |-> wr_ready);
endmodule
