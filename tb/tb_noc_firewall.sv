// tb_noc_firewall: end-to-end test of the NoC firewall at its default size
// (16 segments, 64 PIDs, 1024 x 8-bit rules).
//
// A CPU model programs the firewall through the setup port, switches the PID
// of the running process, issues read/write, data/instruction, privileged and
// secure requests, and services interrupts; a memory model takes allowed
// requests with random back-pressure. A reference model of segments, rules and
// mode predicts, for every request, forward or drop and the latency (2 cycles
// without a segment hit or with checking disabled, 5 with a hit) and, for every
// command, the 3-cycle completion. Each mechanism of the design is counted and
// must occur at least once: allowed miss, allowed hit, denied access with its
// interrupt and context, invalid command, threshold interrupt, interrupt
// overflow, masking, disabled checking, memory back-pressure, command ahead of
// a simultaneous request, rule delete and segment clear-all.
module tb_noc_firewall;
  import fw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, cmd_done, req_valid = 0, req_ready;
  fw_cmd_t cmd = '0;
  fw_req_t req = '0, fwd;
  logic fwd_valid, fwd_ready = 1;
  logic [2:0] irq_clr = 0, irq_mask_in = 3'b111, pend, ovf, mask;
  logic irq_mask_we = 0, irq, en;
  fw_deny_ctx_t dctx;
  logic [3:0] bad_op;
  logic [5:0] pid;
  logic [15:0] segv;
  logic [31:0] nc, na, nd, tm;

  noc_firewall dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_i(cmd), .cmd_done_o(cmd_done),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_i(req),
    .fwd_valid_o(fwd_valid), .fwd_ready_i(fwd_ready), .fwd_o(fwd),
    .irq_clr_i(irq_clr), .irq_mask_we_i(irq_mask_we), .irq_mask_i(irq_mask_in),
    .irq_o(irq), .irq_pending_o(pend), .irq_overflow_o(ovf), .irq_mask_o(mask),
    .deny_ctx_o(dctx), .bad_op_o(bad_op), .en_o(en), .pid_o(pid), .seg_valid_o(segv),
    .n_check_o(nc), .n_allow_o(na), .n_deny_o(nd), .timer_o(tm));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Mechanism counters.
  int c_miss = 0, c_hit_allow = 0, c_deny = 0, c_badcmd = 0, c_thresh = 0, c_ovf = 0;
  int c_mask = 0, c_disabled = 0, c_stall = 0, c_prio = 0, c_delrule = 0, c_delall = 0;

  // Reference model.
  logic [19:0] s_lo [16], s_hi [16];
  bit s_v [16];
  logic [7:0] rules [64][16];
  logic [5:0] m_pid = 0;
  bit m_en = 1;

  function automatic bit ref_deny(logic [7:0] r, fw_req_t q);
    logic [7:0] need;
    need = 8'(1 << (q.write ? 1 : 0)) | 8'(1 << (q.instr ? 3 : 2)) |
           8'(1 << (q.priv ? 4 : 5)) | 8'(1 << (q.secure ? 6 : 7));
    return (r & need) == need;
  endfunction

  task automatic fail(string msg);
    failures++; $display("FAIL @%0d: %s", cyc, msg);
  endtask

  task automatic send_cmd(logic [3:0] op, int seg, int pid_, logic [19:0] lo, logic [19:0] hi,
                          logic [7:0] rule, bit expect_bad = 0);
    int t0;
    @(negedge clk);
    cmd = '0; cmd.op = op; cmd.seg = 4'(seg); cmd.pid = 6'(pid_); cmd.start = lo;
    cmd.last = hi; cmd.rule = rule; cmd_valid = 1;
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    t0 = cyc + 1;
    @(negedge clk); cmd_valid = 0;
    if (expect_bad) begin
      @(negedge clk);
      checks++;
      if (!pend[IRQ_BADCMD] || bad_op != op) fail("invalid command not reported");
      else c_badcmd++;
      repeat (4) begin
        checks++; if (cmd_done) fail("invalid command completed");
        @(negedge clk);
      end
      return;
    end
    while (!cmd_done && cyc - t0 < 20) @(negedge clk);
    checks++; if (cyc - t0 != 3) fail($sformatf("command latency %0d", cyc - t0));
    case (op)
      CMD_ADD_SEG:    begin s_lo[seg] = lo; s_hi[seg] = hi; s_v[seg] = 1; end
      CMD_DEL_ALL:    begin for (int i = 0; i < 16; i++) s_v[i] = 0; c_delall++; end
      CMD_SET_RULE:   rules[pid_][seg] = rule;
      CMD_DEL_RULE:   begin rules[pid_][seg] = 0; c_delrule++; end
      CMD_SET_PID:    m_pid = 6'(pid_);
      CMD_SET_ENABLE: m_en = rule[0];
      default: ;
    endcase
  endtask

  // Expected outcome of a request under the current model.
  task automatic predict(fw_req_t q, output bit hit, output bit dn, output int hs);
    hit = 0; hs = 0;
    for (int i = 15; i >= 0; i--)
      if (s_v[i] && q.addr[31:12] >= s_lo[i] && q.addr[31:12] <= s_hi[i]) begin hit = 1; hs = i; end
    hit = hit && m_en;
    dn = hit && ref_deny(rules[m_pid][hs], q);
  endtask

  // Wait for the outcome of an accepted request and check it.
  task automatic outcome(fw_req_t q, int t0, bit hit, bit dn, int hs, int nd0, int stall,
                         bit check_lat = 1);
    int lat;
    while (!fwd_valid && nd == 32'(nd0) && cyc - t0 < 20) @(negedge clk);
    lat = cyc - t0;
    if (check_lat) begin
      checks++; if (lat != (hit ? 5 : 2)) fail($sformatf("latency %0d hit %0d", lat, hit));
    end
    checks++;
    if (dn) begin
      if (fwd_valid || nd != 32'(nd0 + 1)) fail("expected a deny");
      else c_deny++;
      // The interrupt follows one cycle later, a threshold interrupt two.
      repeat (2) @(negedge clk);
    end else begin
      if (!fwd_valid || fwd != q) fail("expected a forward");
      else if (hit) c_hit_allow++;
      else c_miss++;
      if (!m_en) c_disabled++;
      if (stall > 0) begin
        fwd_ready = 0; c_stall++;
        repeat (stall) begin
          @(negedge clk);
          checks++; if (!fwd_valid || fwd != q) fail("forward not held");
        end
        fwd_ready = 1;
      end
      @(negedge clk);
      checks++; if (fwd_valid) fail("forward not taken");
    end
  endtask

  task automatic send_req(fw_req_t q, int stall = 0);
    int t0, hs, nd0; bit hit, dn;
    predict(q, hit, dn, hs);
    nd0 = int'(nd);
    @(negedge clk); req = q; req_valid = 1; fwd_ready = (stall == 0);
    @(posedge clk); while (!req_ready) @(posedge clk);
    t0 = cyc + 1;
    @(negedge clk); req_valid = 0;
    outcome(q, t0, hit, dn, hs, nd0, stall);
    fwd_ready = 1;
  endtask

  function automatic fw_req_t mk_req(logic [31:0] a, bit w, bit x, bit p, bit s);
    fw_req_t q;
    q.addr = a; q.write = w; q.instr = x; q.priv = p; q.secure = s; q.data = $urandom;
    return q;
  endfunction

  function automatic fw_req_t rand_req();
    return mk_req({20'($urandom_range('h0f, 'h18)), 12'($urandom)}, 1'($urandom),
                  1'($urandom), 1'($urandom), 1'($urandom));
  endfunction

  task automatic service_irq(bit expect_deny);
    int nd0;
    checks++;
    if (expect_deny) begin
      if (!irq || !pend[IRQ_DENY]) fail("no deny interrupt");
    end
    irq_clr = 3'b111;
    @(negedge clk); irq_clr = 0;
    checks++; if (irq || pend != 0) fail("interrupt not cleared");
  endtask

  initial begin
    #5000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 64; p++) for (int s = 0; s < 16; s++) rules[p][s] = 0;
    for (int s = 0; s < 16; s++) s_v[s] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (!en || pid != 0 || segv != 0 || irq) fail("reset state");

    // 1. Empty table: allow by default.
    for (int k = 0; k < 5; k++) send_req(rand_req());

    // 2. Protect the five heap pages 0x11000-0x15fff of the safe process
    //    (PID 1). Malicious processes (PIDs 2, 3) get deny rules for any write
    //    and any instruction fetch, in every world and mode: five commands each.
    for (int s = 0; s < 5; s++) send_cmd(CMD_ADD_SEG, s, 0, 20'h11 + 20'(s), 20'h11 + 20'(s), 0);
    for (int p = 2; p <= 3; p++)
      for (int s = 0; s < 5; s++) send_cmd(CMD_SET_RULE, s, p, 0, 0, 8'b1111_1110);
    // PID 4 may not read secure data in segment 2 (secure world only).
    send_cmd(CMD_SET_RULE, 2, 4, 0, 0, 8'b0111_0101);
    send_cmd(CMD_SET_THRESH, 0, 0, 0, 0, 8'd6);
    checks++; if (segv != 16'h001f) fail("segment valid bits");

    // 3. Safe process: all allowed (hits, 5 cycles).
    send_cmd(CMD_SET_PID, 0, 1, 0, 0, 0);
    for (int k = 0; k < 10; k++) send_req(rand_req());
    // 4. Malicious process: writes denied, with interrupt and context.
    send_cmd(CMD_SET_PID, 0, 2, 0, 0, 0);
    send_req(mk_req(32'h0001_3abc, 1, 0, 0, 0));
    checks++;
    if (!irq || dctx.addr != 32'h0001_3abc || dctx.pid != 2 || dctx.seg != 2 || !dctx.write)
      fail("deny context");
    // A second deny while pending: overflow, context of the first kept.
    send_req(mk_req(32'h0001_1004, 1, 1, 1, 1));
    checks++;
    if (ovf[IRQ_DENY] && dctx.addr == 32'h0001_3abc) c_ovf++; else fail("overflow");
    // Masking hides the pending cause.
    irq_mask_we = 1; irq_mask_in = 3'b110; @(negedge clk); irq_mask_we = 0;
    checks++; if (irq || !pend[IRQ_DENY]) fail("mask"); else c_mask++;
    irq_mask_we = 1; irq_mask_in = 3'b111; @(negedge clk); irq_mask_we = 0;
    service_irq(1);
    // Reads of the malicious process are allowed (rule has no read bit).
    send_req(mk_req(32'h0001_2000, 0, 0, 0, 0));
    // 5. Random mix of PIDs 1..4 with interrupt service.
    for (int k = 0; k < 300; k++) begin
      if ($urandom_range(0, 3) == 0) send_cmd(CMD_SET_PID, 0, $urandom_range(1, 4), 0, 0, 0);
      send_req(rand_req(), $urandom_range(0, 4) == 0 ? $urandom_range(1, 3) : 0);
      if (pend[IRQ_THRESH]) c_thresh++;
      if (irq) service_irq(0);
    end
    // 6. Invalid commands: unknown opcode, start above end.
    send_cmd(4'hF, 0, 0, 0, 0, 0, 1);
    service_irq(0);
    send_cmd(CMD_ADD_SEG, 3, 0, 20'h50, 20'h40, 0, 1);
    service_irq(0);
    // 7. Command and request offered together: the PID change goes first.
    @(negedge clk);
    cmd = '0; cmd.op = CMD_SET_PID; cmd.pid = 6'd1; cmd_valid = 1;
    req = mk_req(32'h0001_1000, 1, 0, 0, 0); req_valid = 1;
    #1; checks++; if (req_ready) fail("request not behind command");
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    @(negedge clk); cmd_valid = 0; m_pid = 1;
    begin
      int t0, nd0; bit hit, dn; int hs;
      predict(req, hit, dn, hs); nd0 = int'(nd);
      @(posedge clk); while (!req_ready) @(posedge clk);
      t0 = cyc + 1;
      @(negedge clk); req_valid = 0;
      outcome(req, t0, hit, dn, hs, nd0, 0, 0);  // waits behind the command
      checks++; if (!dn) c_prio++; else fail("priority");
    end
    // 8. Disabled checking: the malicious write passes in 2 cycles.
    send_cmd(CMD_SET_PID, 0, 3, 0, 0, 0);
    send_cmd(CMD_SET_ENABLE, 0, 0, 0, 0, 8'h00);
    for (int k = 0; k < 5; k++) send_req(mk_req({20'h12, 12'($urandom)}, 1, 0, 0, 0));
    send_cmd(CMD_SET_ENABLE, 0, 0, 0, 0, 8'h01);
    // 9. Delete the rules of PID 3 in segment 1, then all segments.
    send_cmd(CMD_DEL_RULE, 1, 3, 0, 0, 0);
    send_req(mk_req(32'h0001_2010, 1, 0, 0, 0));   // now allowed
    send_req(mk_req(32'h0001_3010, 1, 0, 0, 0));   // still denied
    send_cmd(CMD_DEL_ALL, 0, 0, 0, 0, 0);
    checks++; if (segv != 0) fail("clear all");
    for (int k = 0; k < 5; k++) send_req(rand_req());
    if (irq) service_irq(0);
    @(negedge clk);
    checks++; if (nd != 32'(c_deny)) fail("deny counter");

    $display("miss %0d hit_allow %0d deny %0d badcmd %0d thresh %0d ovf %0d mask %0d",
             c_miss, c_hit_allow, c_deny, c_badcmd, c_thresh, c_ovf, c_mask);
    $display("disabled %0d stall %0d prio %0d delrule %0d delall %0d",
             c_disabled, c_stall, c_prio, c_delrule, c_delall);
    if (c_miss == 0)      fail("mechanism never seen: allowed miss");
    if (c_hit_allow == 0) fail("mechanism never seen: allowed hit");
    if (c_deny == 0)      fail("mechanism never seen: deny");
    if (c_badcmd == 0)    fail("mechanism never seen: invalid command");
    if (c_thresh == 0)    fail("mechanism never seen: threshold interrupt");
    if (c_ovf == 0)       fail("mechanism never seen: overflow");
    if (c_mask == 0)      fail("mechanism never seen: mask");
    if (c_disabled == 0)  fail("mechanism never seen: disabled");
    if (c_stall == 0)     fail("mechanism never seen: back-pressure");
    if (c_prio == 0)      fail("mechanism never seen: command priority");
    if (c_delrule == 0)   fail("mechanism never seen: rule delete");
    if (c_delall == 0)    fail("mechanism never seen: clear all");
    checks += 12;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
