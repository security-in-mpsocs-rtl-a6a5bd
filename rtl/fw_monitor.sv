// fw_monitor: SLRC activity monitors (a timer and event counters).
//
// The document says only that the SLRC holds timers and event counters that
// record activity and report security issues to the interrupt unit. This block
// is the simplest form of that: three event counters (requests checked, allowed
// and denied), a timer that counts clock cycles while checking is enabled, and a
// threshold on the deny counter. When the deny counter reaches a non-zero
// threshold, thresh_o pulses for one cycle, so that interrupts can be raised per
// batch of denied accesses rather than per access. Counter widths, the threshold
// and the clear command are this design's choices.
//
// Interface and timing: the event inputs are one-cycle pulses sampled at the
// clock edge; counts are visible one cycle after the event. clr_i zeroes all
// counters and the timer at the next edge (an event in the same cycle is lost).
// thresh_o is registered and pulses in the cycle after the edge at which the
// deny count became equal to thresh_i. Counters wrap at 2**CNT_W.
module fw_monitor
  import fw_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         en_i,       // checking enabled: the timer runs
  input  logic         clr_i,
  input  logic         ev_check_i,
  input  logic         ev_allow_i,
  input  logic         ev_deny_i,
  input  logic [W-1:0] thresh_i,   // 0: no threshold event
  output logic [W-1:0] n_check_o,
  output logic [W-1:0] n_allow_o,
  output logic [W-1:0] n_deny_o,
  output logic [W-1:0] timer_o,
  output logic         thresh_o
);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      n_check_o <= '0;
      n_allow_o <= '0;
      n_deny_o  <= '0;
      timer_o   <= '0;
      thresh_o  <= 1'b0;
    end else if (clr_i) begin
      n_check_o <= '0;
      n_allow_o <= '0;
      n_deny_o  <= '0;
      timer_o   <= '0;
      thresh_o  <= 1'b0;
    end else begin
      if (en_i)       timer_o   <= timer_o + 1'b1;
      if (ev_check_i) n_check_o <= n_check_o + 1'b1;
      if (ev_allow_i) n_allow_o <= n_allow_o + 1'b1;
      if (ev_deny_i)  n_deny_o  <= n_deny_o + 1'b1;
      thresh_o <= ev_deny_i && (thresh_i != '0) && (n_deny_o + 1'b1 == thresh_i);
    end
  end

endmodule
