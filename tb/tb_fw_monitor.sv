// tb_fw_monitor: self-checking test of the SLRC monitors.
//
// Drives random event pulses with the timer enabled or not, compares the three
// counters and the timer with reference counts, checks that the threshold
// pulse comes exactly once, in the cycle after the deny that reaches the
// threshold, and that clear zeroes everything.
module tb_fw_monitor;
  localparam int W = 32;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en = 0, clr = 0, ec = 0, ea = 0, ed = 0;
  logic [W-1:0] thr = '0;
  logic [W-1:0] nc, na, nd, tm;
  logic th;

  fw_monitor #(.W(W)) dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .clr_i(clr), .ev_check_i(ec),
    .ev_allow_i(ea), .ev_deny_i(ed), .thresh_i(thr), .n_check_o(nc),
    .n_allow_o(na), .n_deny_o(nd), .timer_o(tm), .thresh_o(th));

  int checks = 0, failures = 0;
  int rc = 0, ra = 0, rd = 0, rt = 0, nth = 0, exp_th = 0;

  task automatic cmp;
    checks++;
    if (nc != W'(rc) || na != W'(ra) || nd != W'(rd) || tm != W'(rt)) begin
      failures++;
      $display("FAIL counters %0d %0d %0d %0d expected %0d %0d %0d %0d", nc, na, nd, tm, rc, ra, rd, rt);
    end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    thr = 32'd7;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      // Threshold pulse from the previous edge.
      checks++;
      if (th !== (exp_th == 1)) begin failures++; $display("FAIL thresh pulse at step %0d", k); end
      if (th) nth++;
      cmp();
      en = ($urandom_range(0, 3) != 0);
      ec = $urandom_range(0, 1);
      ed = ec && $urandom_range(0, 3) == 0;
      ea = ec && !ed;
      // Reference update at the coming edge.
      exp_th = (ed && (rd + 1 == 7)) ? 1 : 0;
      if (en) rt++;
      if (ec) rc++;
      if (ea) ra++;
      if (ed) rd++;
    end
    @(negedge clk); en = 0; ec = 0; ea = 0; ed = 0;
    checks++; if (nth != 1) begin failures++; $display("FAIL %0d threshold pulses", nth); end
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    rc = 0; ra = 0; rd = 0; rt = 0;
    cmp();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
