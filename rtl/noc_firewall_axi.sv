// noc_firewall_axi: the NoC firewall as a memory-mapped device, the form in
// which it was prototyped on an FPGA.
//
// The firewall core (noc_firewall: OMC, SLRC and INTU) filters the initiator's
// requests on its way into the network; a CPU driver programs it through an
// AXI4-Lite register interface (fw_axil_cfg) and is told of denied accesses
// and invalid commands by a single interrupt line. This mirrors the prototype's
// two attachments, a programming interface and a data/instruction interface:
// the programming interface is AXI4-Lite here, the data/instruction interface
// stays a valid/ready request channel in and out (the AXI4 bridge that carries
// it in the prototype is not part of this design). See fw_axil_cfg for the
// register map and noc_firewall for the checking and its latencies.
//
// Interface: AXI4-Lite slave (13-bit byte address), request in, allowed request
// out, interrupt out. All sizes are those of the prototype: 16 segments,
// 64 PIDs, 8-bit rules, 32-bit addresses and data.
module noc_firewall_axi
  import fw_pkg::*;
#(
  parameter int unsigned N_SEG = 16,
  parameter int unsigned N_PID = 64
) (
  input  logic        clk_i,
  input  logic        rst_ni,
  // programming interface (AXI4-Lite)
  input  logic        s_awvalid_i,
  output logic        s_awready_o,
  input  logic [12:0] s_awaddr_i,
  input  logic        s_wvalid_i,
  output logic        s_wready_o,
  input  logic [31:0] s_wdata_i,
  input  logic [3:0]  s_wstrb_i,
  output logic        s_bvalid_o,
  input  logic        s_bready_i,
  output logic [1:0]  s_bresp_o,
  input  logic        s_arvalid_i,
  output logic        s_arready_o,
  input  logic [12:0] s_araddr_i,
  output logic        s_rvalid_o,
  input  logic        s_rready_i,
  output logic [31:0] s_rdata_o,
  output logic [1:0]  s_rresp_o,
  // data/instruction interface: requests from the CPU
  input  logic        req_valid_i,
  output logic        req_ready_o,
  input  fw_req_t     req_i,
  // allowed requests towards memory
  output logic        fwd_valid_o,
  input  logic        fwd_ready_i,
  output fw_req_t     fwd_o,
  // interrupt to the CPU
  output logic        irq_o
);

  logic               cmd_valid, cmd_ready, cmd_done;
  fw_cmd_t            cmd;
  logic [N_IRQ-1:0]   irq_clr, irq_mask_w, irq_pending, irq_overflow, irq_mask;
  logic               irq_mask_we;
  fw_deny_ctx_t       deny_ctx;
  logic [3:0]         bad_op;
  logic               en;
  logic [5:0]         pid;
  logic [N_SEG-1:0]   seg_valid;
  logic [CNT_W-1:0]   n_check, n_allow, n_deny, timer;

  fw_axil_cfg #(.N_SEG(N_SEG), .N_PID(N_PID), .AXI_AW(13)) u_cfg (
    .clk_i          (clk_i),
    .rst_ni         (rst_ni),
    .awvalid_i      (s_awvalid_i),
    .awready_o      (s_awready_o),
    .awaddr_i       (s_awaddr_i),
    .wvalid_i       (s_wvalid_i),
    .wready_o       (s_wready_o),
    .wdata_i        (s_wdata_i),
    .wstrb_i        (s_wstrb_i),
    .bvalid_o       (s_bvalid_o),
    .bready_i       (s_bready_i),
    .bresp_o        (s_bresp_o),
    .arvalid_i      (s_arvalid_i),
    .arready_o      (s_arready_o),
    .araddr_i       (s_araddr_i),
    .rvalid_o       (s_rvalid_o),
    .rready_i       (s_rready_i),
    .rdata_o        (s_rdata_o),
    .rresp_o        (s_rresp_o),
    .cmd_valid_o    (cmd_valid),
    .cmd_ready_i    (cmd_ready),
    .cmd_o          (cmd),
    .irq_clr_o      (irq_clr),
    .irq_mask_we_o  (irq_mask_we),
    .irq_mask_o     (irq_mask_w),
    .en_i           (en),
    .pid_i          (pid),
    .irq_pending_i  (irq_pending),
    .irq_overflow_i (irq_overflow),
    .irq_mask_i     (irq_mask),
    .deny_ctx_i     (deny_ctx),
    .bad_op_i       (bad_op),
    .seg_valid_i    (seg_valid),
    .n_check_i      (n_check),
    .n_allow_i      (n_allow),
    .n_deny_i       (n_deny),
    .timer_i        (timer)
  );

  noc_firewall #(.N_SEG(N_SEG), .N_PID(N_PID)) u_fw (
    .clk_i          (clk_i),
    .rst_ni         (rst_ni),
    .cmd_valid_i    (cmd_valid),
    .cmd_ready_o    (cmd_ready),
    .cmd_i          (cmd),
    .cmd_done_o     (cmd_done),
    .req_valid_i    (req_valid_i),
    .req_ready_o    (req_ready_o),
    .req_i          (req_i),
    .fwd_valid_o    (fwd_valid_o),
    .fwd_ready_i    (fwd_ready_i),
    .fwd_o          (fwd_o),
    .irq_clr_i      (irq_clr),
    .irq_mask_we_i  (irq_mask_we),
    .irq_mask_i     (irq_mask_w),
    .irq_o          (irq_o),
    .irq_pending_o  (irq_pending),
    .irq_overflow_o (irq_overflow),
    .irq_mask_o     (irq_mask),
    .deny_ctx_o     (deny_ctx),
    .bad_op_o       (bad_op),
    .en_o           (en),
    .pid_o          (pid),
    .seg_valid_o    (seg_valid),
    .n_check_o      (n_check),
    .n_allow_o      (n_allow),
    .n_deny_o       (n_deny),
    .timer_o        (timer)
  );

  // Command completion is not needed by the register interface: commands are
  // executed in order ahead of any later request.
  logic unused_done;
  assign unused_done = cmd_done;

endmodule
