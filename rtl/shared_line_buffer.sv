// shared_line_buffer: the single-port 1-line buffer (*B) shared by the intra
// predictor and the deblocking filter.
// It holds one frame-wide line of unfiltered reconstructed pixels, four pixels
// per word. The intra predictor reads its top references from it and writes
// the bottom row of each reconstructed block back to the same address; the
// deblocking filter reads the same unfiltered row instead of keeping its own
// fourth line. Because the RAM has one port, the two users are arbitrated so
// that their accesses never overlap: the intra side has priority and a
// deblocking request waits (df_gnt low) while the intra side accesses.
// Read data appears one cycle after the grant with a *_rvalid strobe.
// The document gives the sharing, the single port and the non-overlapping
// schedule; the fixed priority is this design's choice.
module shared_line_buffer
  import hevc_pkg::*;
#(
  parameter int unsigned FRAME_WIDTH = 7680,
  localparam int unsigned WORDS      = FRAME_WIDTH / 4,
  localparam int unsigned AW         = $clog2(WORDS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // intra predictor port
  input  logic           in_req,
  input  logic           in_we,
  input  logic [AW-1:0]  in_addr,
  input  logic [31:0]    in_wdata,
  output logic           in_gnt,
  output logic           in_rvalid,
  output logic [31:0]    in_rdata,
  // deblocking filter port (read only)
  input  logic           df_req,
  input  logic [AW-1:0]  df_addr,
  output logic           df_gnt,
  output logic           df_rvalid,
  output logic [31:0]    df_rdata,
  output logic           df_stall   // a deblocking request waited this cycle
);
  logic [31:0]   mem [WORDS];
  logic [31:0]   rdata_q;
  logic          in_rd_q, df_rd_q;

  assign in_gnt   = in_req;
  assign df_gnt   = df_req && !in_req;
  assign df_stall = df_req && in_req;
  assign in_rdata = rdata_q;
  assign df_rdata = rdata_q;
  assign in_rvalid = in_rd_q;
  assign df_rvalid = df_rd_q;

  always_ff @(posedge clk) begin
    if (in_gnt && in_we)       mem[in_addr] <= in_wdata;
    else if (in_gnt)           rdata_q <= mem[in_addr];
    else if (df_gnt)           rdata_q <= mem[df_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_rd_q <= 1'b0;
      df_rd_q <= 1'b0;
    end else begin
      in_rd_q <= in_gnt && !in_we;
      df_rd_q <= df_gnt;
    end
  end

  // one access per cycle on the single port
  a_one_port: assert property (@(posedge clk) disable iff (!rst_n) !(in_gnt && df_gnt));
endmodule
