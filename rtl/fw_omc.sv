// fw_omc: operating mode controller of the NoC firewall.
//
// The OMC is the firewall's entry point. It accepts configuration commands on
// the setup port and memory requests from the CPU, decodes them and dispatches
// them one at a time, in the order accepted, to the SLRC. Because commands and
// requests share one ordered path, a request accepted after a rule update is
// always checked against the updated rules. When both arrive in the same cycle
// the command goes first. The OMC also holds the operating mode: whether
// checking is enabled and the PID of the running process, which the OS writes
// with a command. Each request leaves the OMC tagged with both.
// A command with an unknown opcode, a segment index or PID outside the
// configured sizes, or a segment whose start lies above its end is invalid: it
// is dropped and reported to the INTU (bad_o pulse with the opcode).
// That the OMC decodes and dispatches commands and reports invalid commands to
// the INTU follows the document; the command set, the command-first priority
// and the validity rules are this design's choices.
//
// Interface and timing: valid/ready handshakes on both inputs and on the
// dispatch output. An accepted item is held in a one-entry register and is
// offered to the SLRC in the next cycle. SET_PID and SET_ENABLE change the mode
// at the edge that accepts them and are still dispatched, so that the SLRC can
// report their completion. Reset: checking enabled, PID 0.
module fw_omc
  import fw_pkg::*;
#(
  parameter int unsigned N_SEG = 16,
  parameter int unsigned N_PID = 64
) (
  input  logic     clk_i,
  input  logic     rst_ni,
  // setup commands
  input  logic     cmd_valid_i,
  output logic     cmd_ready_o,
  input  fw_cmd_t  cmd_i,
  // requests from the CPU
  input  logic     req_valid_i,
  output logic     req_ready_o,
  input  fw_req_t  req_i,
  // dispatch to the SLRC
  output logic     d_valid_o,
  input  logic     d_ready_i,
  output fw_disp_t d_o,
  // invalid command report to the INTU
  output logic       bad_o,
  output logic [3:0] bad_op_o,
  // operating mode
  output logic       en_o,
  output logic [5:0] pid_o
);

  logic     free;
  logic     take_cmd, take_req;
  logic     cmd_ok;
  fw_disp_t d_q;
  logic     d_valid_q;

  assign free        = !d_valid_q || d_ready_i;
  assign cmd_ready_o = free;
  assign req_ready_o = free && !cmd_valid_i;
  assign take_cmd    = cmd_valid_i && cmd_ready_o;
  assign take_req    = req_valid_i && req_ready_o;

  // Command decoding.
  always_comb begin
    unique case (cmd_i.op)
      CMD_ADD_SEG:  cmd_ok = (32'(cmd_i.seg) < N_SEG) && (cmd_i.start <= cmd_i.last);
      CMD_SET_RULE,
      CMD_DEL_RULE: cmd_ok = (32'(cmd_i.seg) < N_SEG) && (32'(cmd_i.pid) < N_PID);
      CMD_SET_PID:  cmd_ok = (32'(cmd_i.pid) < N_PID);
      CMD_DEL_ALL,
      CMD_SET_ENABLE,
      CMD_SET_THRESH,
      CMD_CLR_MON:  cmd_ok = 1'b1;
      default:      cmd_ok = 1'b0;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      d_valid_q <= 1'b0;
      d_q       <= '0;
      en_o      <= 1'b1;
      pid_o     <= '0;
      bad_o     <= 1'b0;
      bad_op_o  <= '0;
    end else begin
      bad_o <= 1'b0;
      if (d_valid_q && d_ready_i) d_valid_q <= 1'b0;
      if (take_cmd) begin
        if (cmd_ok) begin
          d_valid_q    <= 1'b1;
          d_q.is_cmd   <= 1'b1;
          d_q.cmd      <= cmd_i;
          d_q.req      <= '0;
          d_q.pid      <= pid_o;
          d_q.en       <= en_o;
          if (cmd_i.op == CMD_SET_PID)    pid_o <= cmd_i.pid;
          if (cmd_i.op == CMD_SET_ENABLE) en_o  <= cmd_i.rule[0];
        end else begin
          bad_o    <= 1'b1;
          bad_op_o <= cmd_i.op;
        end
      end else if (take_req) begin
        d_valid_q  <= 1'b1;
        d_q.is_cmd <= 1'b0;
        d_q.cmd    <= '0;
        d_q.req    <= req_i;
        d_q.pid    <= pid_o;
        d_q.en     <= en_o;
      end
    end
  end

  assign d_valid_o = d_valid_q;
  assign d_o       = d_q;

  // The dispatch register must hold its item while the SLRC is not ready.
  a_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
    d_valid_o && !d_ready_i |=> d_valid_o && $stable(d_o));

endmodule
