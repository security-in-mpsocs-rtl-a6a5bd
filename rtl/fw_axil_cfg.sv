// fw_axil_cfg: memory-mapped programming interface of the NoC firewall.
//
// An AXI4-Lite slave that lets a CPU driver program and observe the firewall
// through registers, as the FPGA prototype does over its AXI programming port:
// segment registers, rule registers and an interrupt reset register, plus
// status. Register writes that configure the checker become firewall commands
// on the setup port; interrupt clear and mask writes go straight to the
// interrupt unit; reads return status. The document gives only that the
// firewall is a memory-mapped AXI4 device with segment, rule and interrupt reset
// registers; the register map, the single-outstanding handshakes and the error
// responses are this design's choices.
//
// Register map (byte offsets, 32-bit registers):
//   0x000 CTRL       W: bit 0 enables checking (command)   R: bit 0 enabled
//   0x004 PID        W: PID of the running process (command)  R: current PID
//   0x008 IRQ_STATUS R: [2:0] pending, [10:8] overflow      W: 1 clears the cause
//   0x00C IRQ_MASK   RW: [2:0] mask (1 = cause may raise the interrupt)
//   0x010 DENY_ADDR  R: address of the held denied access
//   0x014 DENY_INFO  R: [5:0] PID, [11:8] segment, [23:16] rule,
//                       [24] write, [25] instruction, [26] privileged, [27] secure
//   0x018 BAD_OP     R: opcode of the held invalid command
//   0x01C THRESH     RW: deny-count threshold (command on write)
//   0x020 N_CHECK    R: requests checked    W: clears the monitors (command)
//   0x024 N_ALLOW    R: requests allowed
//   0x028 N_DENY     R: requests denied
//   0x02C TIMER      R: cycles with checking enabled
//   0x030 SEG_VALID  R: segment valid bits  W: deletes all segments (command)
//   0x100 + 8*i      SEG_START[i] RW: first page; held until SEG_END[i] is written
//   0x104 + 8*i      SEG_END[i]   RW: last page; a write adds segment i (command)
//   0x1000 + 4*(16*pid + seg) RULE[pid][seg] W: rule, 0 deletes it (command);
//                    reads as 0
// A write to any other offset is answered with SLVERR and is also passed on as
// an invalid command, so the interrupt unit reports it. A read of an unmapped
// offset returns 0 with SLVERR. Write strobes are ignored (full-word writes),
// and so are write data bits above the widest field (the 20-bit page number).
//
// Timing: one write and one read may be outstanding. A write is accepted when
// both its address and data are valid; a write that becomes a command gets its
// response in the cycle after the firewall accepts the command, other writes in
// the cycle after they are accepted. A read returns its data one cycle after
// the address is accepted.
module fw_axil_cfg
  import fw_pkg::*;
#(
  parameter int unsigned N_SEG = 16,
  parameter int unsigned N_PID = 64,
  parameter int unsigned AXI_AW = 13
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  // AXI4-Lite slave
  input  logic              awvalid_i,
  output logic              awready_o,
  input  logic [AXI_AW-1:0] awaddr_i,
  input  logic              wvalid_i,
  output logic              wready_o,
  input  logic [31:0]       wdata_i,
  input  logic [3:0]        wstrb_i,
  output logic              bvalid_o,
  input  logic              bready_i,
  output logic [1:0]        bresp_o,
  input  logic              arvalid_i,
  output logic              arready_o,
  input  logic [AXI_AW-1:0] araddr_i,
  output logic              rvalid_o,
  input  logic              rready_i,
  output logic [31:0]       rdata_o,
  output logic [1:0]        rresp_o,
  // firewall setup port
  output logic              cmd_valid_o,
  input  logic              cmd_ready_i,
  output fw_cmd_t           cmd_o,
  // interrupt unit setup
  output logic [N_IRQ-1:0]  irq_clr_o,
  output logic              irq_mask_we_o,
  output logic [N_IRQ-1:0]  irq_mask_o,
  // status
  input  logic              en_i,
  input  logic [5:0]        pid_i,
  input  logic [N_IRQ-1:0]  irq_pending_i,
  input  logic [N_IRQ-1:0]  irq_overflow_i,
  input  logic [N_IRQ-1:0]  irq_mask_i,
  input  fw_deny_ctx_t      deny_ctx_i,
  input  logic [3:0]        bad_op_i,
  input  logic [N_SEG-1:0]  seg_valid_i,
  input  logic [CNT_W-1:0]  n_check_i,
  input  logic [CNT_W-1:0]  n_allow_i,
  input  logic [CNT_W-1:0]  n_deny_i,
  input  logic [CNT_W-1:0]  timer_i
);

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;
  localparam int unsigned RULE_BASE  = 'h1000;
  localparam int unsigned SEG_BASE   = 'h100;

  logic [PAGE_W-1:0] seg_start_q [N_SEG];
  logic [PAGE_W-1:0] seg_end_q   [N_SEG];
  logic [7:0]        thresh_q;

  // ---------------------------------------------------------------- writes
  logic take_w;
  assign awready_o = !bvalid_o && !cmd_valid_o && awvalid_i && wvalid_i;
  assign wready_o  = awready_o;
  assign take_w    = awready_o;   // both valid when ready

  // Decode of the write being accepted.
  typedef struct packed {
    logic    is_cmd;
    fw_cmd_t cmd;
    logic    err;
    logic    clr;       // IRQ_STATUS write
    logic    mask;      // IRQ_MASK write
    logic    start;     // SEG_START write
    logic [3:0] seg;
  } wdec_t;
  wdec_t wd;

  always_comb begin
    int unsigned a;
    int unsigned r;
    a = int'(awaddr_i) & ~32'h3;
    r = (a - RULE_BASE) >> 2;
    wd = '0;
    if (a >= RULE_BASE && r < N_SEG * N_PID) begin
      wd.is_cmd   = 1'b1;
      wd.cmd.op   = (wdata_i[7:0] == '0) ? CMD_DEL_RULE : CMD_SET_RULE;
      wd.cmd.seg  = 4'(r % N_SEG);
      wd.cmd.pid  = 6'(r / N_SEG);
      wd.cmd.rule = wdata_i[7:0];
    end else if (a >= SEG_BASE && a < SEG_BASE + 8 * N_SEG) begin
      wd.seg = 4'((a - SEG_BASE) >> 3);
      if (a[2]) begin
        wd.is_cmd    = 1'b1;
        wd.cmd.op    = CMD_ADD_SEG;
        wd.cmd.seg   = wd.seg;
        wd.cmd.start = seg_start_q[wd.seg];
        wd.cmd.last  = wdata_i[PAGE_W-1:0];
      end else begin
        wd.start = 1'b1;
      end
    end else begin
      unique case (a)
        'h000: begin wd.is_cmd = 1'b1; wd.cmd.op = CMD_SET_ENABLE; wd.cmd.rule = {7'b0, wdata_i[0]}; end
        'h004: begin wd.is_cmd = 1'b1; wd.cmd.op = CMD_SET_PID;    wd.cmd.pid  = wdata_i[5:0]; end
        'h008: wd.clr  = 1'b1;
        'h00C: wd.mask = 1'b1;
        'h01C: begin wd.is_cmd = 1'b1; wd.cmd.op = CMD_SET_THRESH; wd.cmd.rule = wdata_i[7:0]; end
        'h020: begin wd.is_cmd = 1'b1; wd.cmd.op = CMD_CLR_MON; end
        'h030: begin wd.is_cmd = 1'b1; wd.cmd.op = CMD_DEL_ALL; end
        default: begin
          // Unmapped: passed on as an invalid command (opcode 0).
          wd.is_cmd = 1'b1; wd.err = 1'b1; wd.cmd.op = 4'h0;
        end
      endcase
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      bvalid_o      <= 1'b0;
      bresp_o       <= RESP_OKAY;
      cmd_valid_o   <= 1'b0;
      cmd_o         <= '0;
      irq_clr_o     <= '0;
      irq_mask_we_o <= 1'b0;
      irq_mask_o    <= '0;
      thresh_q      <= '0;
      for (int i = 0; i < N_SEG; i++) begin
        seg_start_q[i] <= '0;
        seg_end_q[i]   <= '0;
      end
    end else begin
      irq_clr_o     <= '0;
      irq_mask_we_o <= 1'b0;
      if (bvalid_o && bready_i) bvalid_o <= 1'b0;
      if (cmd_valid_o && cmd_ready_i) begin
        cmd_valid_o <= 1'b0;
        bvalid_o    <= 1'b1;
      end
      if (take_w) begin
        bresp_o <= wd.err ? RESP_SLVERR : RESP_OKAY;
        if (wd.is_cmd) begin
          cmd_valid_o <= 1'b1;
          cmd_o       <= wd.cmd;
          if (wd.cmd.op == CMD_ADD_SEG)    seg_end_q[wd.seg] <= wdata_i[PAGE_W-1:0];
          if (wd.cmd.op == CMD_SET_THRESH) thresh_q <= wdata_i[7:0];
        end else begin
          bvalid_o <= 1'b1;
          if (wd.clr) irq_clr_o <= wdata_i[N_IRQ-1:0];
          if (wd.mask) begin
            irq_mask_we_o <= 1'b1;
            irq_mask_o    <= wdata_i[N_IRQ-1:0];
          end
          if (wd.start) seg_start_q[wd.seg] <= wdata_i[PAGE_W-1:0];
        end
      end
    end
  end

  // ----------------------------------------------------------------- reads
  logic [31:0] rd;
  logic        rd_err;

  always_comb begin
    int unsigned a;
    a = int'(araddr_i) & ~32'h3;
    rd     = '0;
    rd_err = 1'b0;
    if (a >= RULE_BASE && ((a - RULE_BASE) >> 2) < N_SEG * N_PID) begin
      rd = '0;   // rule registers are write-only
    end else if (a >= SEG_BASE && a < SEG_BASE + 8 * N_SEG) begin
      rd = a[2] ? 32'(seg_end_q[(a - SEG_BASE) >> 3]) : 32'(seg_start_q[(a - SEG_BASE) >> 3]);
    end else begin
      unique case (a)
        'h000: rd = {31'b0, en_i};
        'h004: rd = {26'b0, pid_i};
        'h008: rd = {21'b0, irq_overflow_i, 5'b0, irq_pending_i};
        'h00C: rd = {29'b0, irq_mask_i};
        'h010: rd = deny_ctx_i.addr;
        'h014: rd = {4'b0, deny_ctx_i.secure, deny_ctx_i.priv, deny_ctx_i.instr,
                     deny_ctx_i.write, deny_ctx_i.rule, 4'b0, deny_ctx_i.seg,
                     2'b0, deny_ctx_i.pid};
        'h018: rd = {28'b0, bad_op_i};
        'h01C: rd = {24'b0, thresh_q};
        'h020: rd = n_check_i;
        'h024: rd = n_allow_i;
        'h028: rd = n_deny_i;
        'h02C: rd = timer_i;
        'h030: rd = 32'(seg_valid_i);
        default: rd_err = 1'b1;
      endcase
    end
  end

  assign arready_o = !rvalid_o;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      rvalid_o <= 1'b0;
      rdata_o  <= '0;
      rresp_o  <= RESP_OKAY;
    end else begin
      if (rvalid_o && rready_i) rvalid_o <= 1'b0;
      if (arvalid_i && arready_o) begin
        rvalid_o <= 1'b1;
        rdata_o  <= rd;
        rresp_o  <= rd_err ? RESP_SLVERR : RESP_OKAY;
      end
    end
  end

  // AXI rule: a response, once valid, is held until taken.
  a_b_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
    bvalid_o && !bready_i |=> bvalid_o && $stable(bresp_o));
  a_r_hold: assert property (@(posedge clk_i) disable iff (!rst_ni)
    rvalid_o && !rready_i |=> rvalid_o && $stable(rdata_o));

endmodule
