// tb_fw_scenarios: the safe/malicious process scenarios (xSyM) run through
// the firewall at its default size.
//
// For each of the nine mixes 8S1M, 4S1M, 3S1M, 2S1M, 1S1M, 1S2M, 1S3M, 1S4M and
// 1S8M (x safe and y malicious processes on one CPU) the firewall is reset and
// set up as in the evaluation: five 4 KB segments cover the safe process heap
// (pages 0x11 to 0x15) and every malicious process gets one deny rule per
// segment, i.e. 5*y setup commands. Requests are then issued by randomly chosen
// processes, each a "write" or a "write-execute" to a random address in the
// five segments, with the OS writing the PID of the process before each of its
// requests. With the firewall on, every malicious request must be dropped and
// every safe one forwarded; each mix is run a second time with checking
// disabled (rules still programmed), where every request must be released.
// The test also measures the firewall's service rate on a burst of
// back-to-back safe requests and checks it against the 0.1 packets per cycle
// per CPU injection rate used in the evaluation, and times the initialization
// of all 16 segments with back-to-back commands (3 cycles per command).
module tb_fw_scenarios;
  import fw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, cmd_done, req_valid = 0, req_ready;
  fw_cmd_t cmd = '0;
  fw_req_t req = '0, fwd;
  logic fwd_valid;
  logic [2:0] pend, ovf, mask;
  logic irq, en;
  fw_deny_ctx_t dctx;
  logic [3:0] bad_op;
  logic [5:0] pid;
  logic [15:0] segv;
  logic [31:0] nc, na, nd, tm;

  noc_firewall dut (
    .clk_i(clk), .rst_ni(rst_n),
    .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready), .cmd_i(cmd), .cmd_done_o(cmd_done),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_i(req),
    .fwd_valid_o(fwd_valid), .fwd_ready_i(1'b1), .fwd_o(fwd),
    .irq_clr_i(3'b111), .irq_mask_we_i(1'b0), .irq_mask_i(3'b111),
    .irq_o(irq), .irq_pending_o(pend), .irq_overflow_o(ovf), .irq_mask_o(mask),
    .deny_ctx_o(dctx), .bad_op_o(bad_op), .en_o(en), .pid_o(pid), .seg_valid_o(segv),
    .n_check_o(nc), .n_allow_o(na), .n_deny_o(nd), .timer_o(tm));

  int checks = 0, failures = 0;
  int n_fwd = 0;
  always @(posedge clk) if (rst_n && fwd_valid) n_fwd++;
  int n_done = 0;
  always @(posedge clk) if (rst_n && cmd_done) n_done++;

  task automatic send_cmd(fw_op_e op, int seg, int pid_, logic [19:0] lo, logic [19:0] hi, logic [7:0] rule);
    @(negedge clk);
    cmd = '0; cmd.op = op; cmd.seg = 4'(seg); cmd.pid = 6'(pid_); cmd.start = lo;
    cmd.last = hi; cmd.rule = rule; cmd_valid = 1;
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    @(negedge clk); cmd_valid = 0;
  endtask

  task automatic send_req(bit wx);
    @(negedge clk);
    req = '0;
    req.addr = {20'h11 + 20'($urandom_range(0, 4)), 12'($urandom)};
    req.write = 1; req.instr = wx; req.data = $urandom;
    req_valid = 1;
    @(posedge clk); while (!req_ready) @(posedge clk);
    @(negedge clk); req_valid = 0;
  endtask

  task automatic run(int x, int y, int n_req, bit off);
    int n_safe, n_mal, setup_cmds, f0;
    n_safe = 0; n_mal = 0; setup_cmds = 0;
    rst_n = 0; repeat (2) @(negedge clk); rst_n = 1;
    f0 = n_fwd;
    for (int s = 0; s < 5; s++) send_cmd(CMD_ADD_SEG, s, 0, 20'h11 + 20'(s), 20'h11 + 20'(s), 0);
    // PIDs 1..x are safe, x+1..x+y malicious: deny write and write-execute.
    for (int m = 0; m < y; m++)
      for (int s = 0; s < 5; s++) begin
        send_cmd(CMD_SET_RULE, s, x + 1 + m, 0, 0, 8'b1111_1110);
        setup_cmds++;
      end
    checks++; if (setup_cmds != 5 * y) failures++;
    // Firewall off: the rules stay programmed but every request is released.
    if (off) send_cmd(CMD_SET_ENABLE, 0, 0, 0, 0, 8'h00);
    for (int k = 0; k < n_req; k++) begin
      int p;
      p = $urandom_range(1, x + y);
      send_cmd(CMD_SET_PID, 0, p, 0, 0, 0);
      send_req(1'($urandom));
      if (p <= x) n_safe++; else n_mal++;
    end
    repeat (12) @(negedge clk);
    checks++;
    if (off ? (n_fwd - f0 != n_req || nd != 0 || na != 32'(n_req))
            : (n_fwd - f0 != n_safe || nd != 32'(n_mal) || na != 32'(n_safe))) begin
      failures++;
      $display("FAIL %0dS%0dM: forwarded %0d denied %0d", x, y, n_fwd - f0, nd);
    end
    $display("%0dS%0dM firewall %s: %0d requests, %0d released to the NoC, %0d dropped (%0d%% malicious), %0d deny rules",
             x, y, off ? "off" : "on ", n_req, n_fwd - f0, nd, (100 * n_mal) / n_req, setup_cmds);
  endtask

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs[9] = '{8, 4, 3, 2, 1, 1, 1, 1, 1};
    int ys[9] = '{1, 1, 1, 1, 1, 2, 3, 4, 8};
    int t0, f0;
    for (int i = 0; i < 9; i++) for (int off = 0; off < 2; off++) run(xs[i], ys[i], 300, 1'(off));
    // Service rate: 100 back-to-back safe requests that hit a segment.
    send_cmd(CMD_SET_ENABLE, 0, 0, 0, 0, 8'h01);
    send_cmd(CMD_SET_PID, 0, 1, 0, 0, 0);
    repeat (5) @(negedge clk);
    f0 = n_fwd;
    t0 = $time;
    for (int k = 0; k < 100; k++) send_req(0);
    while (n_fwd - f0 < 100) @(negedge clk);
    begin
      real rate;
      rate = 100.0 / ((($time - t0) / 10.0));
      $display("service rate for segment hits: %0.3f requests per cycle", rate);
      checks++; if (rate < 0.1) begin failures++; $display("FAIL service rate below 0.1"); end
    end
    // Initialization of all 16 segments, commands issued back to back: three
    // cycles each in the firewall, against about 160 cycles for the whole
    // driver-level initialization.
    begin
      int d0, c0, cycles;
      repeat (10) @(negedge clk);
      d0 = n_done; t0 = $time;
      @(negedge clk); cmd = '0; cmd.op = CMD_ADD_SEG; cmd_valid = 1;
      for (int s = 0; s < 16; s++) begin
        cmd.seg = 4'(s); cmd.start = 20'h100 + 20'(16 * s); cmd.last = 20'h10F + 20'(16 * s);
        @(posedge clk); while (!cmd_ready) @(posedge clk);
        @(negedge clk);
      end
      cmd_valid = 0;
      c0 = 0;
      while (n_done - d0 < 16 && c0 < 200) begin @(negedge clk); c0++; end
      cycles = int'(($time - t0) / 10);
      $display("initialization of 16 segments: %0d cycles", cycles);
      checks++; if (segv != 16'hFFFF) begin failures++; $display("FAIL not all segments valid"); end
      checks++; if (cycles > 16 * 3 + 3) begin failures++; $display("FAIL initialization took %0d cycles", cycles); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
