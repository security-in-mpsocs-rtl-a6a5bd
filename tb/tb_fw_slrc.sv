// tb_fw_slrc: self-checking test of the segment-level rule checking unit.
//
// The testbench plays the OMC: it dispatches commands (segment writes, rule
// writes and deletes, clear-all, threshold) and requests directly into the
// SLRC and keeps its own model of segments and rules. For every request it
// predicts forward or deny, and the latency in cycles after the SLRC took the
// item: 1 for an access that hits no segment (or with checking disabled), 4 for
// one that hits a segment; 2 for a command's done pulse. With the OMC's own
// cycle these are the firewall's 2, 5 and 3 cycles. It also checks the denied
// context and, at the end, the monitor counters and the threshold interrupt.
module tb_fw_slrc;
  import fw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic d_valid = 0, d_ready, fwd_valid, fwd_ready = 1, done, deny, thresh;
  fw_disp_t d = '0;
  fw_req_t fwd;
  fw_deny_ctx_t dctx;
  logic [15:0] segv;
  logic [31:0] nc, na, nd, tm;

  fw_slrc #(.N_SEG(16), .N_PID(64)) dut (
    .clk_i(clk), .rst_ni(rst_n), .mode_en_i(1'b1), .d_valid_i(d_valid), .d_ready_o(d_ready),
    .d_i(d), .fwd_valid_o(fwd_valid), .fwd_ready_i(fwd_ready), .fwd_o(fwd),
    .done_o(done), .deny_o(deny), .deny_ctx_o(dctx), .thresh_o(thresh),
    .seg_valid_o(segv), .n_check_o(nc), .n_allow_o(na), .n_deny_o(nd), .timer_o(tm));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic [19:0] s_lo [16], s_hi [16];
  bit s_v [16];
  logic [7:0] rules [64][16];
  int r_chk = 0, r_allow = 0, r_deny = 0, n_thr = 0, n_hit_allow = 0, n_miss = 0;
  always @(posedge clk) if (rst_n && thresh) n_thr++;

  // Reference decision: the set of rule bits an access needs, all present.
  function automatic bit ref_deny(logic [7:0] r, fw_req_t q);
    logic [7:0] need;
    need = 8'(1 << (q.write ? 1 : 0)) | 8'(1 << (q.instr ? 3 : 2)) |
           8'(1 << (q.priv ? 4 : 5)) | 8'(1 << (q.secure ? 6 : 7));
    return (r & need) == need;
  endfunction

  task automatic send(fw_disp_t it, output int t0);
    @(negedge clk); d = it; d_valid = 1;
    @(posedge clk); while (!d_ready) @(posedge clk);
    t0 = cyc + 1;  // value of cyc after this edge
    @(negedge clk); d_valid = 0;
  endtask

  task automatic do_cmd(logic [3:0] op, int seg, int pid, logic [19:0] lo, logic [19:0] hi, logic [7:0] rule);
    fw_disp_t it; int t0, lat;
    it = '0; it.is_cmd = 1; it.cmd.op = op; it.cmd.seg = 4'(seg); it.cmd.pid = 6'(pid);
    it.cmd.start = lo; it.cmd.last = hi; it.cmd.rule = rule; it.en = 1;
    send(it, t0);
    while (!done) @(negedge clk);
    lat = cyc - t0;
    checks++; if (lat != 2) begin failures++; $display("FAIL command latency %0d", lat); end
    case (op)
      4'h1: begin s_lo[seg] = lo; s_hi[seg] = hi; s_v[seg] = 1; end
      4'h2: for (int i = 0; i < 16; i++) s_v[i] = 0;
      4'h3: rules[pid][seg] = rule;
      4'h4: rules[pid][seg] = 0;
      default: ;
    endcase
  endtask

  task automatic do_req(fw_req_t q, int pid, bit en);
    fw_disp_t it; int t0, lat, hs; bit hit, dn;
    int exp_lat;
    hit = 0; hs = 0;
    for (int i = 15; i >= 0; i--)
      if (s_v[i] && q.addr[31:12] >= s_lo[i] && q.addr[31:12] <= s_hi[i]) begin hit = 1; hs = i; end
    hit = hit && en;
    dn = hit && ref_deny(rules[pid][hs], q);
    exp_lat = hit ? 4 : 1;
    it = '0; it.req = q; it.pid = 6'(pid); it.en = en;
    send(it, t0);
    r_chk++;
    while (!(fwd_valid || deny)) @(negedge clk);
    lat = cyc - t0;
    checks++; if (lat != exp_lat) begin failures++; $display("FAIL request latency %0d expected %0d", lat, exp_lat); end
    checks++;
    if (dn) begin
      r_deny++;
      if (!deny || dctx.addr != q.addr || dctx.pid != 6'(pid) || dctx.seg != 4'(hs) ||
          dctx.write != q.write) begin
        failures++; $display("FAIL expected deny of %h pid %0d", q.addr, pid);
      end
    end else begin
      r_allow++;
      if (hit) n_hit_allow++; else n_miss++;
      if (!fwd_valid || fwd != q) begin failures++; $display("FAIL expected forward of %h pid %0d", q.addr, pid); end
      // Random back-pressure from memory.
      repeat ($urandom_range(0, 2)) begin fwd_ready = 0; @(negedge clk); end
      fwd_ready = 1;
      @(negedge clk);
    end
  endtask

  function automatic fw_req_t rand_req();
    fw_req_t q;
    q.addr = {20'($urandom_range('h10, 'h40)), 12'($urandom)};
    q.write = 1'($urandom); q.instr = 1'($urandom); q.priv = 1'($urandom);
    q.secure = 1'($urandom); q.data = $urandom;
    return q;
  endfunction

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 64; p++) for (int s = 0; s < 16; s++) rules[p][s] = 0;
    for (int s = 0; s < 16; s++) s_v[s] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    do_cmd(4'h7, 0, 0, 0, 0, 8'd10);   // threshold of 10 denies
    // Empty table: everything allowed in 2 cycles.
    for (int k = 0; k < 20; k++) do_req(rand_req(), $urandom_range(0, 63), 1);
    // Five 4 KB segments for the safe process's heap, plus two wider ones.
    for (int s = 0; s < 5; s++) do_cmd(4'h1, s, 0, 20'h11 + 20'(s), 20'h11 + 20'(s), 0);
    do_cmd(4'h1, 7, 0, 20'h20, 20'h2f, 0);
    do_cmd(4'h1, 12, 0, 20'h28, 20'h3f, 0);
    // Deny writes of PIDs 1..8 in every segment; random rules elsewhere.
    for (int p = 1; p <= 8; p++)
      for (int s = 0; s < 16; s++) do_cmd(4'h3, s, p, 0, 0, 8'hFE);
    for (int k = 0; k < 40; k++) do_cmd(4'h3, $urandom_range(0, 15), $urandom_range(9, 63), 0, 0, 8'($urandom));
    for (int k = 0; k < 400; k++) do_req(rand_req(), $urandom_range(0, 12), $urandom_range(0, 7) != 0);
    // Delete some rules and all segments.
    for (int s = 0; s < 16; s++) do_cmd(4'h4, s, 1, 0, 0, 0);
    for (int k = 0; k < 50; k++) do_req(rand_req(), $urandom_range(0, 3), 1);
    do_cmd(4'h2, 0, 0, 0, 0, 0);
    checks++; if (segv != 0) begin failures++; $display("FAIL segments valid after clear"); end
    for (int k = 0; k < 20; k++) do_req(rand_req(), $urandom_range(0, 12), 1);
    @(negedge clk);
    checks++;
    if (nc != 32'(r_chk) || na != 32'(r_allow) || nd != 32'(r_deny)) begin
      failures++; $display("FAIL monitor %0d %0d %0d expected %0d %0d %0d", nc, na, nd, r_chk, r_allow, r_deny);
    end
    checks++; if (n_thr != (r_deny >= 10 ? 1 : 0)) begin failures++; $display("FAIL threshold pulses %0d", n_thr); end
    checks++; if (r_deny == 0 || n_hit_allow == 0 || n_miss == 0) begin failures++; $display("FAIL coverage"); end
    $display("allowed %0d (hit %0d), denied %0d", r_allow, n_hit_allow, r_deny);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
