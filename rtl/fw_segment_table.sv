// fw_segment_table: register-based parallel range search of the SLRC.
//
// Every segment is a pair of page registers (start, last) and a valid bit. The
// page number of the incoming address (the address without its 12 offset bits)
// is compared with all segments at once: segment i matches when it is valid and
// start_i <= page <= last_i. The per-segment match lines feed an N -> log2(N)
// encoder that gives the index of the matching segment; when several segments
// overlap the lowest index wins. Registers, comparators and the encoder follow
// the document's range-search figure; the inclusive bounds, the valid bit and
// the lowest-index priority are this design's choices.
//
// Interface and timing: the search is combinational from page_i to hit_o/idx_o.
// Writes (wr_i with wr_idx_i, wr_start_i, wr_last_i) set a segment and make it
// valid at the next clock edge; clr_all_i invalidates every segment at the next
// edge (and wins over a write in the same cycle). Reset invalidates all segments.
module fw_segment_table
  import fw_pkg::*;
#(
  parameter int unsigned N_SEG = 16,
  localparam int unsigned IDX_W = (N_SEG > 1) ? $clog2(N_SEG) : 1
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // search
  input  logic [PAGE_W-1:0] page_i,
  output logic              hit_o,
  output logic [IDX_W-1:0]  idx_o,
  // configuration
  input  logic              wr_i,
  input  logic [IDX_W-1:0]  wr_idx_i,
  input  logic [PAGE_W-1:0] wr_start_i,
  input  logic [PAGE_W-1:0] wr_last_i,
  input  logic              clr_all_i,
  output logic [N_SEG-1:0]  valid_o
);

  logic [PAGE_W-1:0] start_q [N_SEG];
  logic [PAGE_W-1:0] last_q  [N_SEG];
  logic [N_SEG-1:0]  valid_q;
  logic [N_SEG-1:0]  match;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_q <= '0;
      for (int i = 0; i < N_SEG; i++) begin
        start_q[i] <= '0;
        last_q[i]  <= '0;
      end
    end else if (clr_all_i) begin
      valid_q <= '0;
    end else if (wr_i) begin
      start_q[wr_idx_i] <= wr_start_i;
      last_q[wr_idx_i]  <= wr_last_i;
      valid_q[wr_idx_i] <= 1'b1;
    end
  end

  // One pair of comparators per segment.
  always_comb begin
    for (int i = 0; i < N_SEG; i++) begin
      match[i] = valid_q[i] && (page_i >= start_q[i]) && (page_i <= last_q[i]);
    end
  end

  // N -> log2(N) encoder, lowest index first.
  always_comb begin
    hit_o = |match;
    idx_o = '0;
    for (int i = N_SEG - 1; i >= 0; i--) begin
      if (match[i]) idx_o = IDX_W'(i);
    end
  end

  assign valid_o = valid_q;

endmodule
