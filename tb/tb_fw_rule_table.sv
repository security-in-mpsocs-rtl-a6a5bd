// tb_fw_rule_table: self-checking test of the rule memory.
//
// Writes random rules to random (PID, segment) entries, reads them back and
// checks both the value and the two-cycle read latency against a reference
// copy. Entries never written and deleted entries must read as zero.
module tb_fw_rule_table;
  import fw_pkg::*;
  localparam int DEPTH = 1024;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic rd = 0, wr = 0, del = 0;
  logic [9:0] rd_addr = '0, wr_addr = '0;
  logic [7:0] wr_rule = '0, rule;

  fw_rule_table #(.N_SEG(16), .N_PID(64)) dut (
    .clk_i(clk), .rst_ni(rst_n), .rd_i(rd), .rd_addr_i(rd_addr), .rd_rule_o(rule),
    .wr_i(wr), .del_i(del), .wr_addr_i(wr_addr), .wr_rule_i(wr_rule));

  int checks = 0, failures = 0;
  logic [7:0] model [DEPTH];

  task automatic do_write(input logic [9:0] a, input logic [7:0] r);
    @(negedge clk); wr = 1; wr_addr = a; wr_rule = r;
    @(negedge clk); wr = 0;
    model[a] = r;
  endtask

  task automatic do_del(input logic [9:0] a);
    @(negedge clk); del = 1; wr_addr = a;
    @(negedge clk); del = 0;
    model[a] = '0;
  endtask

  // Issue a read and check that the rule appears exactly two edges later.
  task automatic do_read(input logic [9:0] a);
    logic [7:0] prev_rule;
    @(negedge clk); rd = 1; rd_addr = a;
    @(negedge clk); rd = 0; prev_rule = rule;     // one edge: not yet updated
    @(negedge clk);                            // two edges: rule present
    checks++;
    if (rule !== model[a]) begin
      failures++; $display("FAIL read %h: %h expected %h", a, rule, model[a]);
    end
  endtask

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DEPTH; i++) model[i] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    // Unwritten entries read zero.
    for (int k = 0; k < 20; k++) do_read(10'($urandom_range(0, DEPTH-1)));
    // Latency: a value written then read must not show after one edge.
    do_write(10'h155, 8'hA5);
    do_read(10'h000);
    @(negedge clk); rd = 1; rd_addr = 10'h155;
    @(negedge clk); rd = 0;
    checks++; if (rule == 8'hA5) begin failures++; $display("FAIL rule visible after one edge"); end
    @(negedge clk);
    checks++; if (rule != 8'hA5) begin failures++; $display("FAIL rule not visible after two edges"); end
    // Random traffic.
    for (int k = 0; k < 400; k++) begin
      case ($urandom_range(0, 2))
        0: do_write(10'($urandom_range(0, DEPTH-1)), 8'($urandom_range(1, 255)));
        1: do_del(10'($urandom_range(0, DEPTH-1)));
        default: do_read(10'($urandom_range(0, DEPTH-1)));
      endcase
    end
    // Delete a written entry.
    do_write(10'h3ff, 8'hFF); do_read(10'h3ff); do_del(10'h3ff); do_read(10'h3ff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
