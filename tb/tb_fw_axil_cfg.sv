// tb_fw_axil_cfg: self-checking test of the AXI4-Lite programming interface.
//
// Register writes are issued with random address/data skew and random
// back-pressure on the command and response channels; the testbench checks
// the command each configuring write produces (opcode, segment, PID, bounds,
// rule), the direct interrupt clear and mask strobes, the SLVERR response and
// invalid command for an unmapped offset, and every status register read
// against the values it drives on the status inputs.
module tb_fw_axil_cfg;
  import fw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 1;
  logic arvalid = 0, arready, rvalid, rready = 1;
  logic [12:0] awaddr = 0, araddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [1:0] bresp, rresp;
  logic cmd_valid, cmd_ready = 1;
  fw_cmd_t cmd;
  logic [2:0] irq_clr, irq_mask_w;
  logic irq_mask_we;
  logic en = 1;
  logic [5:0] pid = 0;
  logic [2:0] pend = 0, ovf = 0, mask = 0;
  fw_deny_ctx_t dctx = '0;
  logic [3:0] bad_op = 0;
  logic [15:0] segv = 0;
  logic [31:0] nc = 0, na = 0, nd = 0, tm = 0;

  fw_axil_cfg #(.N_SEG(16), .N_PID(64), .AXI_AW(13)) dut (
    .clk_i(clk), .rst_ni(rst_n),
    .awvalid_i(awvalid), .awready_o(awready), .awaddr_i(awaddr),
    .wvalid_i(wvalid), .wready_o(wready), .wdata_i(wdata), .wstrb_i(4'hF),
    .bvalid_o(bvalid), .bready_i(bready), .bresp_o(bresp),
    .arvalid_i(arvalid), .arready_o(arready), .araddr_i(araddr),
    .rvalid_o(rvalid), .rready_i(rready), .rdata_o(rdata), .rresp_o(rresp),
    .cmd_valid_o(cmd_valid), .cmd_ready_i(cmd_ready), .cmd_o(cmd),
    .irq_clr_o(irq_clr), .irq_mask_we_o(irq_mask_we), .irq_mask_o(irq_mask_w),
    .en_i(en), .pid_i(pid), .irq_pending_i(pend), .irq_overflow_i(ovf), .irq_mask_i(mask),
    .deny_ctx_i(dctx), .bad_op_i(bad_op), .seg_valid_i(segv), .n_check_i(nc),
    .n_allow_i(na), .n_deny_i(nd), .timer_i(tm));

  int checks = 0, failures = 0;
  fw_cmd_t got_cmd[$];
  int n_clr = 0, n_mask = 0;
  logic [2:0] last_clr, last_mask;

  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && cmd_ready) got_cmd.push_back(cmd);
    if (|irq_clr) begin n_clr++; last_clr = irq_clr; end
    if (irq_mask_we) begin n_mask++; last_mask = irq_mask_w; end
  end
  always @(negedge clk) begin
    cmd_ready <= ($urandom_range(0, 2) != 0);
    bready    <= ($urandom_range(0, 3) != 0);
    rready    <= ($urandom_range(0, 3) != 0);
  end

  task automatic fail(string s);
    failures++; $display("FAIL: %s", s);
  endtask

  task automatic axi_write(logic [12:0] a, logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    awaddr = a; wdata = d;
    awvalid = 1;
    if ($urandom_range(0, 1)) begin @(negedge clk); end
    wvalid = 1;
    @(posedge clk); while (!(awready && wready)) @(posedge clk);
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!(bvalid && bready)) @(posedge clk);
    resp = bresp;
    @(negedge clk);
  endtask

  task automatic axi_read(logic [12:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    araddr = a; arvalid = 1;
    @(posedge clk); while (!arready) @(posedge clk);
    @(negedge clk); arvalid = 0;
    while (!(rvalid && rready)) @(posedge clk);
    d = rdata; resp = rresp;
    @(negedge clk);
  endtask

  task automatic expect_cmd(logic [3:0] op, int seg, int pid_, logic [19:0] lo, logic [19:0] hi, logic [7:0] rule);
    fw_cmd_t c;
    checks++;
    if (got_cmd.size() != 1) begin fail($sformatf("%0d commands", got_cmd.size())); got_cmd.delete(); return; end
    c = got_cmd.pop_front();
    if (c.op != op) fail($sformatf("op %h expected %h", c.op, op));
    if ((op == CMD_SET_RULE || op == CMD_DEL_RULE || op == CMD_ADD_SEG) && c.seg != 4'(seg)) fail("seg");
    if ((op == CMD_SET_RULE || op == CMD_DEL_RULE || op == CMD_SET_PID) && c.pid != 6'(pid_)) fail("pid");
    if (op == CMD_ADD_SEG && (c.start != lo || c.last != hi)) fail("bounds");
    if ((op == CMD_SET_RULE || op == CMD_SET_THRESH || op == CMD_SET_ENABLE) && c.rule != rule) fail("rule field");
  endtask

  task automatic rd_check(logic [12:0] a, logic [31:0] exp);
    logic [31:0] d; logic [1:0] r;
    axi_read(a, d, r);
    checks++;
    if (d != exp || r != 2'b00) fail($sformatf("read %h = %h expected %h", a, d, exp));
  endtask

  initial begin
    #500000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] r; logic [31:0] d;
    repeat (2) @(negedge clk); rst_n = 1;
    // Segments: start then end; the end write adds the segment.
    for (int k = 0; k < 30; k++) begin
      int s; logic [19:0] lo, hi;
      s = $urandom_range(0, 15); lo = 20'($urandom); hi = 20'($urandom);
      axi_write(13'('h100 + 8 * s), 32'(lo), r);
      checks++; if (r != 0 || got_cmd.size() != 0) fail("start write");
      axi_write(13'('h104 + 8 * s), 32'(hi), r);
      expect_cmd(CMD_ADD_SEG, s, 0, lo, hi, 0);
      rd_check(13'('h100 + 8 * s), 32'(lo));
      rd_check(13'('h104 + 8 * s), 32'(hi));
    end
    // Rules.
    for (int k = 0; k < 60; k++) begin
      int p, s; logic [7:0] rule;
      p = $urandom_range(0, 63); s = $urandom_range(0, 15);
      rule = ($urandom_range(0, 4) == 0) ? 8'h00 : 8'($urandom);
      axi_write(13'('h1000 + 4 * (16 * p + s)), 32'(rule), r);
      expect_cmd(rule == 0 ? CMD_DEL_RULE : CMD_SET_RULE, s, p, 0, 0, rule);
    end
    // Mode and monitor commands.
    axi_write(13'h000, 32'h0, r); expect_cmd(CMD_SET_ENABLE, 0, 0, 0, 0, 8'h00);
    axi_write(13'h004, 32'd37, r); expect_cmd(CMD_SET_PID, 0, 37, 0, 0, 0);
    axi_write(13'h01C, 32'd9, r); expect_cmd(CMD_SET_THRESH, 0, 0, 0, 0, 8'd9);
    rd_check(13'h01C, 32'd9);
    axi_write(13'h020, 32'd0, r); expect_cmd(CMD_CLR_MON, 0, 0, 0, 0, 0);
    axi_write(13'h030, 32'd0, r); expect_cmd(CMD_DEL_ALL, 0, 0, 0, 0, 0);
    // Interrupt clear and mask go straight to the interrupt unit.
    axi_write(13'h008, 32'h5, r);
    checks++; if (n_clr != 1 || last_clr != 3'b101 || got_cmd.size() != 0) fail($sformatf("irq clear n=%0d last=%b q=%0d", n_clr, last_clr, got_cmd.size()));
    axi_write(13'h00C, 32'h6, r);
    checks++; if (n_mask != 1 || last_mask != 3'b110) fail("irq mask");
    // Unmapped write: SLVERR and an invalid command.
    axi_write(13'h040, 32'h1, r);
    checks++; if (r != 2'b10) fail("no SLVERR");
    expect_cmd(4'h0, 0, 0, 0, 0, 0);
    // Status reads.
    for (int k = 0; k < 20; k++) begin
      en = 1'($urandom); pid = 6'($urandom); pend = 3'($urandom); ovf = 3'($urandom);
      mask = 3'($urandom); dctx = fw_deny_ctx_t'({$urandom, $urandom, $urandom});
      bad_op = 4'($urandom); segv = 16'($urandom);
      nc = $urandom; na = $urandom; nd = $urandom; tm = $urandom;
      rd_check(13'h000, {31'b0, en});
      rd_check(13'h004, {26'b0, pid});
      rd_check(13'h008, {21'b0, ovf, 5'b0, pend});
      rd_check(13'h00C, {29'b0, mask});
      rd_check(13'h010, dctx.addr);
      rd_check(13'h014, {4'b0, dctx.secure, dctx.priv, dctx.instr, dctx.write, dctx.rule,
                         4'b0, dctx.seg, 2'b0, dctx.pid});
      rd_check(13'h018, {28'b0, bad_op});
      rd_check(13'h020, nc); rd_check(13'h024, na); rd_check(13'h028, nd); rd_check(13'h02C, tm);
      rd_check(13'h030, {16'b0, segv});
    end
    axi_read(13'h044, d, r);
    checks++; if (r != 2'b10) fail("no read SLVERR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
