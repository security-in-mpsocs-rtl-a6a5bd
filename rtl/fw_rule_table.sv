// fw_rule_table: the SLRC rule memory.
//
// One 8-bit deny rule per (PID, segment) pair: 64 PIDs x 16 segments = 1024
// entries of 8 bits, the size of the document's FPGA prototype. The entry
// address is {pid, segment index}: the PID selects the block of rules of a
// process and the encoded segment index selects the rule inside it, as the
// document describes. The rule storage is a plain array (a block RAM on an FPGA).
// Because such a memory cannot be reset, each entry also has a valid flag held
// in flip-flops; an entry that was never written, or was deleted, reads as the
// all-zero rule, which denies nothing (allow by default). The valid flags and the
// two-cycle read are this design's choices.
//
// Interface and timing: a read is requested with rd_i and rd_addr_i; the rule is
// on rd_rule_o two clock edges later (address register, then output register)
// and stays there until the next read. A write (wr_i, wr_addr_i, wr_rule_i) takes
// effect at the next edge; del_i clears the entry's valid flag instead. Writes and
// reads of different entries may happen in the same cycle.
module fw_rule_table
  import fw_pkg::*;
#(
  parameter int unsigned N_SEG = 16,
  parameter int unsigned N_PID = 64,
  localparam int unsigned DEPTH  = N_SEG * N_PID,
  localparam int unsigned AW     = $clog2(DEPTH)
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              rd_i,
  input  logic [AW-1:0]     rd_addr_i,
  output logic [RULE_W-1:0] rd_rule_o,
  input  logic              wr_i,
  input  logic              del_i,
  input  logic [AW-1:0]     wr_addr_i,
  input  logic [RULE_W-1:0] wr_rule_i
);

  logic [RULE_W-1:0] mem [DEPTH];
  logic [DEPTH-1:0]  valid_q;
  logic [AW-1:0]     addr_q;
  logic              rd_q;

  // Storage: written without reset.
  always_ff @(posedge clk_i) begin
    if (wr_i) mem[wr_addr_i] <= wr_rule_i;
  end

  // Valid flags and read pipeline.
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      valid_q   <= '0;
      addr_q    <= '0;
      rd_q      <= 1'b0;
      rd_rule_o <= '0;
    end else begin
      if (del_i)     valid_q[wr_addr_i] <= 1'b0;
      else if (wr_i) valid_q[wr_addr_i] <= 1'b1;
      rd_q <= rd_i;
      if (rd_i) addr_q <= rd_addr_i;
      if (rd_q) rd_rule_o <= valid_q[addr_q] ? mem[addr_q] : '0;
    end
  end

endmodule
