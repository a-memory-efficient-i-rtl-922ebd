// pred_cache: prediction-based second-level memory for the deblocking filter's
// three vertically-filtered lines (*A) at a macroblock-row boundary.
// Instead of a 3-line buffer the width of the frame, a small SRAM of
// SEGS/REDUCTION slots keeps 4-column segments (3 lines x 4 pixels) whose
// prediction bit (from the edge detection unit's prediction-based judge) says
// that the horizontal edge below will be filtered. Other segments go to
// external memory (ext_wr_*). A tag per segment records whether, and in which
// slot, it is cached. When the next macroblock row reaches the segment, a load
// is a hit if it is cached (read from the SRAM, the slot is freed), a miss if
// it is not cached but the true decision needs it (ext_rd_* request; the reply
// is forwarded) and a skip if neither. A store with a set prediction bit finds
// no slot only when the SRAM is full; it then goes to external memory too.
// Timing: a store takes one cycle. A hit answers one cycle after the load; a
// miss answers in the cycle ext_rd_valid arrives, and ld_ready stays low until then.
// The reduction factor (8) and the 12-byte slot are the document's; the
// lowest-free-slot allocation and the handshakes are this design's.
module pred_cache
  import hevc_pkg::*;
#(
  parameter int unsigned FRAME_WIDTH = 7680,
  parameter int unsigned REDUCTION   = 8,
  localparam int unsigned SEGS       = FRAME_WIDTH / 4,
  localparam int unsigned SLOTS      = SEGS / REDUCTION,
  localparam int unsigned SW         = $clog2(SEGS),
  localparam int unsigned TW         = $clog2(SLOTS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // store: bottom 3 vertically-filtered lines of one segment
  input  logic           st_valid,
  input  logic [SW-1:0]  st_seg,
  input  logic           st_guess,
  input  logic [95:0]    st_data,
  output logic           ext_wr_valid,
  output logic [SW-1:0]  ext_wr_seg,
  output logic [95:0]    ext_wr_data,
  // load: the same segment, one macroblock row later
  input  logic           ld_valid,
  output logic           ld_ready,
  input  logic [SW-1:0]  ld_seg,
  input  logic           ld_need,    // true edge decision: filter on
  output logic           ld_resp,    // data (or skip) answer
  output logic           ld_hit,
  output logic           ld_skip,
  output logic [95:0]    ld_data,
  output logic           ext_rd_req,
  output logic [SW-1:0]  ext_rd_seg,
  input  logic           ext_rd_valid,
  input  logic [95:0]    ext_rd_data,
  // statistics
  output logic [31:0]    n_hit,
  output logic [31:0]    n_miss,
  output logic [31:0]    n_cached
);
  logic [95:0]   sram [SLOTS];
  logic          tag_v   [SEGS];
  logic [TW-1:0] tag_slot [SEGS];
  logic          used [SLOTS];
  logic          free_found;
  logic [TW-1:0] free_slot;
  logic          pending;
  logic          hit_q;
  logic [95:0]   hit_data;

  always_comb begin
    free_found = 1'b0;
    free_slot  = '0;
    for (int i = SLOTS - 1; i >= 0; i--)
      if (!used[i]) begin
        free_found = 1'b1;
        free_slot  = TW'(i);
      end
  end

  assign ld_ready = !pending;
  wire ld_fire    = ld_valid && !pending;
  wire ld_is_hit  = ld_fire && tag_v[ld_seg];
  wire ld_is_miss = ld_fire && !tag_v[ld_seg] && ld_need;
  wire st_cache   = st_valid && st_guess && free_found;

  always_comb begin
    ext_wr_valid = st_valid && !st_cache;
    ext_wr_seg   = st_seg;
    ext_wr_data  = st_data;
  end

  always_ff @(posedge clk) begin
    if (st_cache)  sram[free_slot] <= st_data;
    if (st_cache)  tag_slot[st_seg] <= free_slot;   // meaningful only while tag_v
    if (ld_is_hit) hit_data <= sram[tag_slot[ld_seg]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SEGS; s++) tag_v[s] <= 1'b0;
      for (int i = 0; i < SLOTS; i++) used[i] <= 1'b0;
      pending <= 1'b0; hit_q <= 1'b0; ld_skip <= 1'b0;
      ext_rd_req <= 1'b0; ext_rd_seg <= '0;
      n_hit <= '0; n_miss <= '0; n_cached <= '0;
    end else begin
      hit_q      <= ld_is_hit;
      ld_skip    <= ld_fire && !tag_v[ld_seg] && !ld_need;
      ext_rd_req <= 1'b0;
      if (ld_is_hit) begin
        tag_v[ld_seg]         <= 1'b0;
        used[tag_slot[ld_seg]] <= 1'b0;
        n_hit                 <= n_hit + 32'd1;
      end
      // a store allocates after a same-cycle load has been served
      if (st_cache) begin
        used[free_slot]  <= 1'b1;
        tag_v[st_seg]    <= 1'b1;
        n_cached         <= n_cached + 32'd1;
      end
      if (ld_is_miss) begin
        pending    <= 1'b1;
        ext_rd_req <= 1'b1;
        ext_rd_seg <= ld_seg;
        n_miss     <= n_miss + 32'd1;
      end
      if (pending && ext_rd_valid) pending <= 1'b0;
    end
  end

  always_comb begin
    ld_hit  = hit_q;
    ld_resp = hit_q || ld_skip || (pending && ext_rd_valid);
    ld_data = hit_q ? hit_data : ext_rd_data;
  end
endmodule
