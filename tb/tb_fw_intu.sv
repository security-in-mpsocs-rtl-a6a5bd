// tb_fw_intu: self-checking test of the interrupt unit.
//
// Random deny, invalid-command and threshold events, random clears and mask
// changes are applied every cycle; a cycle-by-cycle reference model in the
// testbench predicts pending and overflow bits, the interrupt line and the
// captured context (first event of a cause until it is cleared). Directed
// steps check that the line rises one cycle after an event, that masking hides
// a pending cause and that clearing drops the line.
module tb_fw_intu;
  import fw_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic deny = 0, bad = 0, thr = 0, mask_we = 0;
  fw_deny_ctx_t ctx_in = '0, ctx_out;
  logic [3:0] bad_op_in = '0, bad_op_out;
  logic [2:0] clr = '0, mask_in = '0, pend, ovf, mask;
  logic irq;

  fw_intu dut (
    .clk_i(clk), .rst_ni(rst_n), .deny_i(deny), .deny_ctx_i(ctx_in), .bad_i(bad),
    .bad_op_i(bad_op_in), .thresh_i(thr), .clr_i(clr), .mask_we_i(mask_we),
    .mask_i(mask_in), .irq_o(irq), .pending_o(pend), .overflow_o(ovf),
    .mask_o(mask), .deny_ctx_o(ctx_out), .bad_op_o(bad_op_out));

  int checks = 0, failures = 0;
  logic [2:0] m_p = 0, m_o = 0, m_m = 3'b111;
  fw_deny_ctx_t m_ctx = '0;
  logic [3:0] m_bop = 0;
  int n_irq_cycles = 0, n_ovf = 0;

  task automatic compare(string where);
    checks++;
    if (pend !== m_p || ovf !== m_o || mask !== m_m || irq !== |(m_p & m_m) ||
        ctx_out !== m_ctx || bad_op_out !== m_bop) begin
      failures++;
      $display("FAIL %s: pend %b/%b ovf %b/%b mask %b/%b irq %b", where, pend, m_p, ovf, m_o, mask, m_m, irq);
    end
  endtask

  // Reference update for the inputs applied in the current cycle.
  task automatic model_edge;
    logic [2:0] ev;
    ev = {thr, bad, deny};
    if (deny && (!m_p[0] || clr[0])) m_ctx = ctx_in;
    if (bad && (!m_p[1] || clr[1])) m_bop = bad_op_in;
    for (int i = 0; i < 3; i++) begin
      if (ev[i]) begin
        m_o[i] = m_p[i] && !clr[i];
        m_p[i] = 1;
      end else if (clr[i]) begin
        m_p[i] = 0; m_o[i] = 0;
      end
    end
    if (mask_we) m_m = mask_in;
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk); compare("reset");
    // Directed: one deny raises the line one cycle later.
    ctx_in = fw_deny_ctx_t'({$urandom, $urandom, $urandom});
    deny = 1; #1;
    checks++; if (irq) begin failures++; $display("FAIL irq combinational from event"); end
    model_edge(); @(negedge clk); deny = 0;
    checks++; if (!irq) begin failures++; $display("FAIL irq did not rise"); end
    compare("deny");
    // Masking hides it, clearing removes it.
    mask_we = 1; mask_in = 3'b110; model_edge(); @(negedge clk); mask_we = 0;
    checks++; if (irq) begin failures++; $display("FAIL masked irq"); end
    compare("mask");
    mask_we = 1; mask_in = 3'b111; model_edge(); @(negedge clk); mask_we = 0;
    clr = 3'b001; model_edge(); @(negedge clk); clr = 0;
    checks++; if (irq) begin failures++; $display("FAIL irq after clear"); end
    compare("clear");
    // Random.
    for (int k = 0; k < 2000; k++) begin
      deny = ($urandom_range(0, 5) == 0);
      bad = ($urandom_range(0, 9) == 0);
      thr = ($urandom_range(0, 19) == 0);
      ctx_in = fw_deny_ctx_t'({$urandom, $urandom, $urandom});
      bad_op_in = 4'($urandom);
      clr = ($urandom_range(0, 3) == 0) ? 3'($urandom) : 3'b000;
      mask_we = ($urandom_range(0, 15) == 0);
      mask_in = 3'($urandom);
      model_edge();
      @(negedge clk);
      compare("random");
      if (irq) n_irq_cycles++;
      if (|ovf) n_ovf++;
    end
    checks++; if (n_irq_cycles == 0 || n_ovf == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
