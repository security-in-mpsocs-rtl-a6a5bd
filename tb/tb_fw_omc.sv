// tb_fw_omc: self-checking test of the operating mode controller.
//
// A random stream of valid and invalid commands and of requests is offered to
// the OMC while the dispatch side applies random back-pressure. The testbench
// keeps its own model of the mode (PID, enable) and of which commands are
// valid, and checks that every valid item is dispatched once, in order, tagged
// with the right PID and enable flag, that invalid commands are reported with
// their opcode and never dispatched, and that a command offered in the same
// cycle as a request is dispatched first.
module tb_fw_omc;
  import fw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cmd_valid = 0, cmd_ready, req_valid = 0, req_ready;
  fw_cmd_t cmd = '0;
  fw_req_t req = '0;
  logic d_valid, d_ready = 0;
  fw_disp_t d;
  logic bad, en;
  logic [3:0] bad_op;
  logic [5:0] pid;

  fw_omc #(.N_SEG(16), .N_PID(64)) dut (
    .clk_i(clk), .rst_ni(rst_n), .cmd_valid_i(cmd_valid), .cmd_ready_o(cmd_ready),
    .cmd_i(cmd), .req_valid_i(req_valid), .req_ready_o(req_ready), .req_i(req),
    .d_valid_o(d_valid), .d_ready_i(d_ready), .d_o(d), .bad_o(bad),
    .bad_op_o(bad_op), .en_o(en), .pid_o(pid));

  int checks = 0, failures = 0;
  fw_disp_t exp_q[$];
  int exp_bad[$];
  logic [5:0] m_pid = 0;
  logic m_en = 1;
  int n_bad = 0, n_disp = 0;
  bit rand_ready = 1;

  function automatic bit ref_valid(fw_cmd_t c);
    case (c.op)
      4'h1: return c.start <= c.last;
      4'h2, 4'h3, 4'h4, 4'h5, 4'h6, 4'h7, 4'h8: return 1;
      default: return 0;
    endcase
  endfunction

  function automatic fw_cmd_t rand_cmd();
    fw_cmd_t c;
    c.op = 4'($urandom_range(0, 15));
    c.seg = 4'($urandom); c.pid = 6'($urandom);
    c.start = 20'($urandom_range(0, 100)); c.last = 20'($urandom_range(0, 100));
    c.rule = 8'($urandom);
    return c;
  endfunction

  function automatic fw_req_t rand_req();
    fw_req_t r;
    r.addr = $urandom; r.write = 1'($urandom); r.instr = 1'($urandom);
    r.priv = 1'($urandom); r.secure = 1'($urandom); r.data = $urandom;
    return r;
  endfunction

  // Expected effect of an accepted item, in acceptance order.
  task automatic accept_cmd(fw_cmd_t c);
    fw_disp_t e;
    if (ref_valid(c)) begin
      e.is_cmd = 1; e.cmd = c; e.req = '0; e.pid = m_pid; e.en = m_en;
      exp_q.push_back(e);
      if (c.op == 4'h5) m_pid = c.pid;
      if (c.op == 4'h6) m_en = c.rule[0];
    end else exp_bad.push_back(int'(c.op));
  endtask

  task automatic accept_req(fw_req_t r);
    fw_disp_t e;
    e.is_cmd = 0; e.cmd = '0; e.req = r; e.pid = m_pid; e.en = m_en;
    exp_q.push_back(e);
  endtask

  // Dispatch sink and checker.
  always @(posedge clk) if (rst_n) begin
    if (d_valid && d_ready) begin
      checks++; n_disp++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected dispatch"); end
      else begin
        fw_disp_t e;
        e = exp_q.pop_front();
        if (d !== e) begin failures++; $display("FAIL dispatch %h expected %h", d, e); end
      end
    end
    if (bad) begin
      checks++; n_bad++;
      if (exp_bad.size() == 0) begin failures++; $display("FAIL unexpected bad"); end
      else begin
        int o;
        o = exp_bad.pop_front();
        if (int'(bad_op) != o) begin failures++; $display("FAIL bad op %0d expected %0d", bad_op, o); end
      end
    end
  end
  always @(negedge clk) d_ready <= rand_ready ? 1'($urandom_range(0, 2) != 0) : 1'b1;

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (en !== 1 || pid !== 0) begin failures++; $display("FAIL reset mode"); end
    // Random stream.
    for (int k = 0; k < 600; k++) begin
      if ($urandom_range(0, 1)) begin
        cmd = rand_cmd(); cmd_valid = 1;
        @(posedge clk); while (!cmd_ready) @(posedge clk);
        accept_cmd(cmd);
        @(negedge clk); cmd_valid = 0;
      end else begin
        req = rand_req(); req_valid = 1;
        @(posedge clk); while (!req_ready) @(posedge clk);
        accept_req(req);
        @(negedge clk); req_valid = 0;
      end
    end
    // Simultaneous command and request: the command (a PID change) goes first
    // and the request carries the new PID.
    repeat (10) @(negedge clk);
    cmd = '0; cmd.op = 4'h5; cmd.pid = 6'd42;
    req = rand_req();
    cmd_valid = 1; req_valid = 1;
    #1; checks++; if (req_ready) begin failures++; $display("FAIL request not held behind command"); end
    @(posedge clk); while (!cmd_ready) @(posedge clk);
    accept_cmd(cmd);
    @(negedge clk); cmd_valid = 0;
    @(posedge clk); while (!req_ready) @(posedge clk);
    accept_req(req);
    @(negedge clk); req_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || exp_bad.size() != 0) begin
      failures++; $display("FAIL %0d items not dispatched", exp_q.size());
    end
    checks++; if (pid != 6'd42) begin failures++; $display("FAIL pid %0d", pid); end
    checks++; if (n_bad == 0) begin failures++; $display("FAIL no invalid command seen"); end
    $display("dispatched %0d, invalid %0d", n_disp, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
