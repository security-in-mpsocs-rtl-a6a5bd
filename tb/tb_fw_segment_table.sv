// tb_fw_segment_table: self-checking test of the segment range search.
//
// Programs random segments (including overlapping ones and single-page ones),
// searches random pages and pages right at and beside the segment bounds, and
// compares hit and index with a reference search kept in the testbench (lowest
// matching index wins, bounds inclusive). Also checks that clear-all
// invalidates every segment and that reset leaves no segment valid.
module tb_fw_segment_table;
  import fw_pkg::*;
  localparam int N = 16;
  localparam int IW = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [PAGE_W-1:0] page;
  logic hit;
  logic [IW-1:0] idx;
  logic wr = 0, clr = 0;
  logic [IW-1:0] wr_idx = '0;
  logic [PAGE_W-1:0] wr_start = '0, wr_last = '0;
  logic [N-1:0] valid;

  fw_segment_table #(.N_SEG(N)) dut (
    .clk_i(clk), .rst_ni(rst_n), .page_i(page), .hit_o(hit), .idx_o(idx),
    .wr_i(wr), .wr_idx_i(wr_idx), .wr_start_i(wr_start), .wr_last_i(wr_last),
    .clr_all_i(clr), .valid_o(valid));

  int checks = 0, failures = 0;
  logic [PAGE_W-1:0] m_s [N], m_e [N];
  bit m_v [N];

  task automatic check_page(input logic [PAGE_W-1:0] p);
    bit eh; int ei;
    eh = 0; ei = 0;
    for (int i = 0; i < N; i++)
      if (!eh && m_v[i] && p >= m_s[i] && p <= m_e[i]) begin eh = 1; ei = i; end
    page = p; #1;
    checks++;
    if (hit !== eh || (eh && idx != IW'(ei))) begin
      failures++;
      $display("FAIL page %h: hit %0d idx %0d, expected %0d %0d", p, hit, idx, eh, ei);
    end
  endtask

  task automatic prog_seg(input int i, input logic [PAGE_W-1:0] s, input logic [PAGE_W-1:0] e);
    @(negedge clk); wr = 1; wr_idx = IW'(i); wr_start = s; wr_last = e;
    @(negedge clk); wr = 0;
    m_s[i] = s; m_e[i] = e; m_v[i] = 1;
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) m_v[i] = 0;
    page = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    @(negedge clk);
    checks++; if (valid != '0) begin failures++; $display("FAIL valid after reset"); end
    check_page(20'h00011);
    // The five 4 KB heap pages of the safe process, one segment each.
    for (int i = 0; i < 5; i++) prog_seg(i, 20'h00011 + 20'(i), 20'h00011 + 20'(i));
    for (int p = 'h0f; p < 'h18; p++) check_page(20'(p));
    // Random segments, some overlapping.
    for (int i = 5; i < N; i++) begin
      logic [PAGE_W-1:0] s, l;
      s = 20'($urandom_range(0, 'h400));
      l = s + 20'($urandom_range(0, 'h80));
      prog_seg(i, s, l);
      check_page(s); check_page(l); check_page(l + 1);
      if (s != 0) check_page(s - 1);
    end
    checks++; if (valid != '1) begin failures++; $display("FAIL valid bits %h", valid); end
    // Overwrite a segment with a range that overlaps segment 0 from a higher index.
    prog_seg(9, 20'h00010, 20'h00020);
    for (int k = 0; k < 300; k++) check_page(20'($urandom_range(0, 'h500)));
    // Clear all.
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int i = 0; i < N; i++) m_v[i] = 0;
    checks++; if (valid != '0) begin failures++; $display("FAIL valid after clear"); end
    for (int k = 0; k < 50; k++) check_page(20'($urandom_range(0, 'h500)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
