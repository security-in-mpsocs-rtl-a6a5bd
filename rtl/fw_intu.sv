// fw_intu: interrupt unit of the NoC firewall.
//
// The INTU accepts, in parallel, interrupt requests from the OMC (invalid
// command) and from the SLRC (access denied by a rule, monitor threshold
// reached) and reports them to the CPU with their context. Each cause has a
// pending bit and a mask bit; the interrupt line is high while any unmasked
// cause is pending. The context of the first denied access (address, PID,
// segment, rule and access attributes) and the opcode of the first invalid
// command are captured and held until the CPU clears the cause, so the service
// routine reads the event that raised the interrupt; a further event of the
// same cause while it is pending sets an overflow flag instead. The CPU clears
// causes by writing ones to clr_i (the interrupt reset register of the driver)
// and sets the mask through mask_we_i / mask_i.
// That the INTU collects OMC and SLRC requests in parallel, reports interrupt
// contexts and is cleared by the CPU's service routine follows the document;
// the pending/mask/overflow organisation is this design's choice.
//
// Timing: an event pulse sets its pending bit at the clock edge where it is
// seen, so irq_o rises one cycle after the pulse. A clear takes effect at the
// next edge; an event arriving at the same edge as its clear wins. Reset: no
// cause pending, all causes unmasked.
module fw_intu
  import fw_pkg::*;
(
  input  logic               clk_i,
  input  logic               rst_ni,
  // event sources
  input  logic               deny_i,
  input  fw_deny_ctx_t       deny_ctx_i,
  input  logic               bad_i,
  input  logic [3:0]         bad_op_i,
  input  logic               thresh_i,
  // CPU setup
  input  logic [N_IRQ-1:0]   clr_i,
  input  logic               mask_we_i,
  input  logic [N_IRQ-1:0]   mask_i,
  // to the CPU
  output logic               irq_o,
  output logic [N_IRQ-1:0]   pending_o,
  output logic [N_IRQ-1:0]   overflow_o,
  output logic [N_IRQ-1:0]   mask_o,
  output fw_deny_ctx_t       deny_ctx_o,
  output logic [3:0]         bad_op_o
);

  logic [N_IRQ-1:0] ev;
  assign ev[IRQ_DENY]   = deny_i;
  assign ev[IRQ_BADCMD] = bad_i;
  assign ev[IRQ_THRESH] = thresh_i;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      pending_o  <= '0;
      overflow_o <= '0;
      mask_o     <= '1;
      deny_ctx_o <= '0;
      bad_op_o   <= '0;
    end else begin
      if (mask_we_i) mask_o <= mask_i;
      for (int i = 0; i < N_IRQ; i++) begin
        if (ev[i]) begin
          if (pending_o[i] && !clr_i[i]) overflow_o[i] <= 1'b1;
          else if (clr_i[i])            overflow_o[i] <= 1'b0;
          pending_o[i] <= 1'b1;
        end else if (clr_i[i]) begin
          pending_o[i]  <= 1'b0;
          overflow_o[i] <= 1'b0;
        end
      end
      // Capture the context of the event that makes a cause pending.
      if (deny_i && (!pending_o[IRQ_DENY] || clr_i[IRQ_DENY])) deny_ctx_o <= deny_ctx_i;
      if (bad_i && (!pending_o[IRQ_BADCMD] || clr_i[IRQ_BADCMD])) bad_op_o <= bad_op_i;
    end
  end

  assign irq_o = |(pending_o & mask_o);

endmodule
