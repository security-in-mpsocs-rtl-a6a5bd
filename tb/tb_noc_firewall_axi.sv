// tb_noc_firewall_axi: end-to-end test of the memory-mapped NoC firewall at
// its default size (16 segments, 64 PIDs, 1024 rules).
//
// The testbench acts as the CPU and its driver: it programs segments and deny
// rules through the AXI4-Lite registers, writes the PID of the running process
// at each context switch, issues requests on the data/instruction side and
// runs an interrupt service routine that reads the interrupt status and the
// context of the denied access and clears the interrupt. A memory model takes
// allowed requests with random back-pressure. A reference model predicts the
// fate of every request (forward or drop); the firewall's own monitor counters,
// read over the bus, must agree with the testbench's counts. Each mechanism is
// counted and must occur: allowed miss, allowed hit, denied access served by
// the interrupt routine with the right context, interrupt overflow, threshold
// interrupt, masking, unmapped register write (SLVERR and invalid-command
// interrupt), checking disabled, memory back-pressure, rule deletion and
// deletion of all segments.
module tb_noc_firewall_axi;
  import fw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic awvalid = 0, awready, wvalid = 0, wready, bvalid, bready = 1;
  logic arvalid = 0, arready, rvalid, rready = 1;
  logic [12:0] awaddr = 0, araddr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [1:0] bresp, rresp;
  logic req_valid = 0, req_ready, fwd_valid, fwd_ready = 1, irq;
  fw_req_t req = '0, fwd;

  noc_firewall_axi dut (
    .clk_i(clk), .rst_ni(rst_n),
    .s_awvalid_i(awvalid), .s_awready_o(awready), .s_awaddr_i(awaddr),
    .s_wvalid_i(wvalid), .s_wready_o(wready), .s_wdata_i(wdata), .s_wstrb_i(4'hF),
    .s_bvalid_o(bvalid), .s_bready_i(bready), .s_bresp_o(bresp),
    .s_arvalid_i(arvalid), .s_arready_o(arready), .s_araddr_i(araddr),
    .s_rvalid_o(rvalid), .s_rready_i(rready), .s_rdata_o(rdata), .s_rresp_o(rresp),
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_i(req),
    .fwd_valid_o(fwd_valid), .fwd_ready_i(fwd_ready), .fwd_o(fwd), .irq_o(irq));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int c_miss = 0, c_hit = 0, c_deny = 0, c_isr = 0, c_ovf = 0, c_thresh = 0, c_mask = 0;
  int c_bad = 0, c_disabled = 0, c_stall = 0, c_delrule = 0, c_delall = 0;
  int n_req = 0, n_allow = 0;

  logic [19:0] s_lo [16], s_hi [16];
  bit s_v [16];
  logic [7:0] rules [64][16];
  logic [5:0] m_pid = 0;
  bit m_en = 1;
  fw_req_t exp_fwd[$];

  task automatic fail(string s);
    failures++; $display("FAIL @%0d: %s", cyc, s);
  endtask

  // Memory side: random back-pressure, checks forwarded requests in order.
  always @(negedge clk) fwd_ready <= ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n) begin
    if (fwd_valid && !fwd_ready) c_stall++;
    if (fwd_valid && fwd_ready) begin
      checks++;
      if (exp_fwd.size() == 0) fail("unexpected forward");
      else begin
        fw_req_t e;
        e = exp_fwd.pop_front();
        if (fwd != e) fail("forwarded request differs");
      end
    end
  end

  task automatic wr(logic [12:0] a, logic [31:0] d, output logic [1:0] resp);
    @(negedge clk);
    awaddr = a; wdata = d; awvalid = 1; wvalid = 1;
    @(posedge clk); while (!(awready && wready)) @(posedge clk);
    @(negedge clk); awvalid = 0; wvalid = 0;
    while (!(bvalid && bready)) @(posedge clk);
    resp = bresp;
    @(negedge clk);
  endtask

  task automatic wr_ok(logic [12:0] a, logic [31:0] d);
    logic [1:0] r;
    wr(a, d, r);
    checks++; if (r != 2'b00) fail($sformatf("write %h response %0d", a, r));
  endtask

  task automatic rd(logic [12:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1;
    @(posedge clk); while (!arready) @(posedge clk);
    @(negedge clk); arvalid = 0;
    while (!(rvalid && rready)) @(posedge clk);
    d = rdata;
    @(negedge clk);
  endtask

  // Driver-level operations with the reference model.
  task automatic add_seg(int s, logic [19:0] lo, logic [19:0] hi);
    wr_ok(13'('h100 + 8 * s), 32'(lo));
    wr_ok(13'('h104 + 8 * s), 32'(hi));
    s_lo[s] = lo; s_hi[s] = hi; s_v[s] = 1;
  endtask

  task automatic set_rule(int p, int s, logic [7:0] r);
    wr_ok(13'('h1000 + 4 * (16 * p + s)), 32'(r));
    rules[p][s] = r;
  endtask

  task automatic set_pid(int p);
    wr_ok(13'h004, 32'(p)); m_pid = 6'(p);
  endtask

  function automatic bit ref_deny(logic [7:0] r, fw_req_t q);
    logic [7:0] need;
    need = 8'(1 << (q.write ? 1 : 0)) | 8'(1 << (q.instr ? 3 : 2)) |
           8'(1 << (q.priv ? 4 : 5)) | 8'(1 << (q.secure ? 6 : 7));
    return (r & need) == need;
  endfunction

  // Issue one request; returns whether it should be denied.
  task automatic request(fw_req_t q, output bit dn);
    bit hit; int hs;
    hit = 0; hs = 0;
    for (int i = 15; i >= 0; i--)
      if (s_v[i] && q.addr[31:12] >= s_lo[i] && q.addr[31:12] <= s_hi[i]) begin hit = 1; hs = i; end
    hit = hit && m_en;
    dn = hit && ref_deny(rules[m_pid][hs], q);
    if (!dn) begin
      exp_fwd.push_back(q); n_allow++;
      if (hit) c_hit++; else c_miss++;
      if (!m_en) c_disabled++;
    end else c_deny++;
    n_req++;
    @(negedge clk); req = q; req_valid = 1;
    @(posedge clk); while (!req_ready) @(posedge clk);
    @(negedge clk); req_valid = 0;
    // Let the check finish before anything else is issued.
    repeat (8) @(negedge clk);
  endtask

  // Interrupt service routine: read status and context, clear.
  task automatic isr(bit exp_deny, fw_req_t q);
    logic [31:0] st, a, info;
    rd(13'h008, st);
    if (st[IRQ_DENY]) begin
      rd(13'h010, a); rd(13'h014, info);
      if (exp_deny) begin
        checks++;
        if (a != q.addr || info[5:0] != m_pid || info[24] != q.write || info[25] != q.instr)
          fail("deny context");
        else c_isr++;
      end
    end
    if (st[8 + IRQ_DENY]) c_ovf++;
    if (st[IRQ_THRESH]) c_thresh++;
    if (st[IRQ_BADCMD]) c_bad++;
    wr_ok(13'h008, 32'h7);
    checks++; if (irq) fail("interrupt still high after clear");
  endtask

  function automatic fw_req_t rand_req();
    fw_req_t q;
    q.addr = {20'($urandom_range('h10, 'h17)), 12'($urandom)};
    q.write = 1'($urandom); q.instr = 1'($urandom); q.priv = 1'($urandom);
    q.secure = 1'($urandom); q.data = $urandom;
    return q;
  endfunction

  initial begin
    #5000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit dn; fw_req_t q; logic [31:0] d; logic [1:0] r;
    for (int p = 0; p < 64; p++) for (int s = 0; s < 16; s++) rules[p][s] = 0;
    for (int s = 0; s < 16; s++) s_v[s] = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // Driver initialisation: five heap segments, deny rules for PIDs 5 and 6.
    for (int s = 0; s < 5; s++) add_seg(s, 20'h11 + 20'(s), 20'h11 + 20'(s));
    add_seg(9, 20'h16, 20'h16);
    for (int p = 5; p <= 6; p++) for (int s = 0; s < 5; s++) set_rule(p, s, 8'hFE);
    set_rule(7, 9, 8'b0101_0101);         // PID 7: no secure data reads in page 0x16
    wr_ok(13'h01C, 32'd20);               // threshold interrupt after 20 denies
    rd(13'h030, d);
    checks++; if (d != 32'h0000_021f) fail("segment valid bits");
    // Traffic with context switches and interrupt service.
    for (int k = 0; k < 400; k++) begin
      if ($urandom_range(0, 2) == 0) set_pid($urandom_range(4, 8));
      q = rand_req();
      request(q, dn);
      checks++; if (irq !== (dn || irq)) fail("irq");
      if (dn) begin
        checks++; if (!irq) fail("no interrupt for a denied access");
        // Now and then let a second deny arrive before the service routine.
        if ($urandom_range(0, 9) == 0) begin
          fw_req_t q2; bit dn2;
          q2 = q; q2.data = $urandom;
          request(q2, dn2);
        end
        if ($urandom_range(0, 9) == 0) begin
          wr_ok(13'h00C, 32'h0);
          checks++; if (irq) fail("masked interrupt visible"); else c_mask++;
          wr_ok(13'h00C, 32'h7);
        end
        isr(1, q);
      end
    end
    // Unmapped register write.
    wr(13'h044, 32'h1, r);
    checks++; if (r != 2'b10) fail("no SLVERR");
    repeat (4) @(negedge clk);
    checks++; if (!irq) fail("no interrupt for the invalid command");
    isr(0, q);
    // Disabled checking: a malicious write passes.
    set_pid(5);
    wr_ok(13'h000, 32'h0); m_en = 0;
    request('{addr: 32'h0001_2345, write: 1, instr: 0, priv: 0, secure: 0, data: 32'hdead}, dn);
    wr_ok(13'h000, 32'h1); m_en = 1;
    // Delete one rule (write 0), then all segments.
    set_rule(5, 1, 8'h00); c_delrule++;
    request('{addr: 32'h0001_2345, write: 1, instr: 0, priv: 0, secure: 0, data: 32'hbeef}, dn);
    checks++; if (dn) fail("deleted rule still denies");
    wr_ok(13'h030, 32'h0); for (int s = 0; s < 16; s++) s_v[s] = 0; c_delall++;
    request('{addr: 32'h0001_1000, write: 1, instr: 1, priv: 0, secure: 0, data: 32'h1}, dn);
    if (irq) isr(0, q);
    repeat (10) @(negedge clk);
    // Monitor counters over the bus.
    rd(13'h020, d); checks++; if (d != 32'(n_req)) fail($sformatf("N_CHECK %0d expected %0d", d, n_req));
    rd(13'h024, d); checks++; if (d != 32'(n_allow)) fail("N_ALLOW");
    rd(13'h028, d); checks++; if (d != 32'(c_deny)) fail("N_DENY");
    wr_ok(13'h020, 32'h0);
    rd(13'h028, d); checks++; if (d != 0) fail("monitor clear");
    checks++; if (exp_fwd.size() != 0) fail("requests not forwarded");

    $display("miss %0d hit %0d deny %0d isr %0d ovf %0d thresh %0d mask %0d bad %0d",
             c_miss, c_hit, c_deny, c_isr, c_ovf, c_thresh, c_mask, c_bad);
    $display("disabled %0d stall %0d delrule %0d delall %0d", c_disabled, c_stall, c_delrule, c_delall);
    if (c_miss == 0)     fail("never: allowed miss");
    if (c_hit == 0)      fail("never: allowed hit");
    if (c_isr == 0)      fail("never: denied access serviced");
    if (c_ovf == 0)      fail("never: overflow");
    if (c_thresh == 0)   fail("never: threshold interrupt");
    if (c_mask == 0)     fail("never: mask");
    if (c_bad == 0)      fail("never: invalid command");
    if (c_disabled == 0) fail("never: disabled");
    if (c_stall == 0)    fail("never: back-pressure");
    checks += 9;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
