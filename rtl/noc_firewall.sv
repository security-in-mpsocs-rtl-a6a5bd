// noc_firewall: segment-level NoC firewall for the network interface of an
// initiator (CPU, DMA, accelerator).
//
// The firewall sits between an initiator and the network-on-chip and filters
// the initiator's memory requests by physical address. Up to N_SEG segments of
// physical memory (page ranges) are programmed; for every process (PID) each
// segment can carry an 8-bit deny rule over read/write, data/execute,
// privileged/non-privileged and secure/non-secure accesses. Policy is allow by
// default: a request whose page lies in no segment, or whose rule does not deny
// it, is forwarded to memory; a denied request is dropped before it enters the
// network and raises an interrupt with its context.
//
// It is built from three blocks, as in the document's top-level figure:
//   fw_omc  - operating mode controller: accepts setup commands and CPU
//             requests, decodes and orders them, holds the PID and enable mode,
//             reports invalid commands;
//   fw_slrc - segment-level rule checking: segment registers with parallel
//             comparators, rule memory (N_SEG x N_PID x 8 bits), monitors;
//   fw_intu - interrupt unit: collects OMC and SLRC interrupt requests, holds
//             their context, drives the interrupt line, cleared by the CPU.
// Sizes follow the document's FPGA prototype: 16 segments, 64 PIDs, 8-bit rules
// (1024x8 rule memory), 20-bit page number of a 32-bit address, 32-bit data.
// Latencies follow its hardware timing table: 2 cycles for an access that hits
// no segment, 5 for one that hits a segment, 3 for a segment table command.
// The command format, the handshakes and the interrupt registers are this
// design's choices; the bus adapter (AXI4) of the prototype is not included.
//
// Interface: three valid/ready channels (setup commands in, requests in,
// allowed requests out), a done pulse per executed command, the CPU's
// interrupt controls (clear, mask) and status outputs (mode, segment valid
// bits, monitor counters, interrupt context). Requests and commands are
// processed one at a time in the order the firewall accepted them.
module noc_firewall
  import fw_pkg::*;
#(
  parameter int unsigned N_SEG = 16,
  parameter int unsigned N_PID = 64
) (
  input  logic               clk_i,
  input  logic               rst_ni,
  // setup commands (NoC firewall setup)
  input  logic               cmd_valid_i,
  output logic               cmd_ready_o,
  input  fw_cmd_t            cmd_i,
  output logic               cmd_done_o,
  // requests from the CPU
  input  logic               req_valid_i,
  output logic               req_ready_o,
  input  fw_req_t            req_i,
  // requests to memory (through the NI into the NoC)
  output logic               fwd_valid_o,
  input  logic               fwd_ready_i,
  output fw_req_t            fwd_o,
  // interrupt setup from the CPU
  input  logic [N_IRQ-1:0]   irq_clr_i,
  input  logic               irq_mask_we_i,
  input  logic [N_IRQ-1:0]   irq_mask_i,
  // interrupt to the CPU and its context
  output logic               irq_o,
  output logic [N_IRQ-1:0]   irq_pending_o,
  output logic [N_IRQ-1:0]   irq_overflow_o,
  output logic [N_IRQ-1:0]   irq_mask_o,
  output fw_deny_ctx_t       deny_ctx_o,
  output logic [3:0]         bad_op_o,
  // status
  output logic               en_o,
  output logic [5:0]         pid_o,
  output logic [N_SEG-1:0]   seg_valid_o,
  output logic [CNT_W-1:0]   n_check_o,
  output logic [CNT_W-1:0]   n_allow_o,
  output logic [CNT_W-1:0]   n_deny_o,
  output logic [CNT_W-1:0]   timer_o
);

  logic         d_valid, d_ready;
  fw_disp_t     disp;
  logic         bad;
  logic [3:0]   bad_op;
  logic         deny, thresh;
  fw_deny_ctx_t deny_ctx;

  fw_omc #(.N_SEG(N_SEG), .N_PID(N_PID)) u_omc (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .cmd_valid_i (cmd_valid_i),
    .cmd_ready_o (cmd_ready_o),
    .cmd_i       (cmd_i),
    .req_valid_i (req_valid_i),
    .req_ready_o (req_ready_o),
    .req_i       (req_i),
    .d_valid_o   (d_valid),
    .d_ready_i   (d_ready),
    .d_o         (disp),
    .bad_o       (bad),
    .bad_op_o    (bad_op),
    .en_o        (en_o),
    .pid_o       (pid_o)
  );

  fw_slrc #(.N_SEG(N_SEG), .N_PID(N_PID)) u_slrc (
    .clk_i       (clk_i),
    .rst_ni      (rst_ni),
    .mode_en_i   (en_o),
    .d_valid_i   (d_valid),
    .d_ready_o   (d_ready),
    .d_i         (disp),
    .fwd_valid_o (fwd_valid_o),
    .fwd_ready_i (fwd_ready_i),
    .fwd_o       (fwd_o),
    .done_o      (cmd_done_o),
    .deny_o      (deny),
    .deny_ctx_o  (deny_ctx),
    .thresh_o    (thresh),
    .seg_valid_o (seg_valid_o),
    .n_check_o   (n_check_o),
    .n_allow_o   (n_allow_o),
    .n_deny_o    (n_deny_o),
    .timer_o     (timer_o)
  );

  fw_intu u_intu (
    .clk_i      (clk_i),
    .rst_ni     (rst_ni),
    .deny_i     (deny),
    .deny_ctx_i (deny_ctx),
    .bad_i      (bad),
    .bad_op_i   (bad_op),
    .thresh_i   (thresh),
    .clr_i      (irq_clr_i),
    .mask_we_i  (irq_mask_we_i),
    .mask_i     (irq_mask_i),
    .irq_o      (irq_o),
    .pending_o  (irq_pending_o),
    .overflow_o (irq_overflow_o),
    .mask_o     (irq_mask_o),
    .deny_ctx_o (deny_ctx_o),
    .bad_op_o   (bad_op_o)
  );

endmodule
