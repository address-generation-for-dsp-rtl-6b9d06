// tb_agu_me: self-checking testbench for agu_me.
//
// Checks the macroblock fetch for the two slices of the paper's
// simulation trace (4x4 block, slice widths 16 and 32: offsets
// 0,1,2,3,16,..,51 and 0,1,2,3,32,..,99) and for other block shapes.
// Every clock the offset is compared with the closed-form reference in
// agu_ref_pkg, and the done flag with where the sequence says it must
// be. The enable is dropped at random clocks to check that the generator
// holds its address while stalled. Each configuration runs for one block and a few addresses more.
module tb_agu_me;
  import agu_ref_pkg::*;
  localparam int unsigned W = 8;

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, en = 1'b0;
  logic [W-1:0] mb_wd, mb_ht, sl_wd;
  logic [W-1:0] off;
  logic         flag;
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  agu_me #(.ADDR_W(W)) dut (
    .clk, .rst_n, .init, .en,
    .mb_wd, .mb_ht, .sl_wd, .off, .done(flag)
  );

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic run(input int unsigned wd, input int unsigned ht, input int unsigned sl, input int unsigned count);
    int unsigned k = 0;
    int unsigned expect_a;
    bit expect_f;
    mb_wd = W'(wd);
    mb_ht = W'(ht);
    sl_wd = W'(sl);
    @(negedge clk) init = 1'b1;
    @(negedge clk) init = 1'b0;
    while (k < count) begin
      expect_a = ref_me(wd, ht, sl, k);
      expect_f = (k % ((wd + 1) * (ht + 1))) == (wd + 1) * (ht + 1) - 1;
      check(off == W'(expect_a), $sformatf("k=%0d addr %0d expected %0d", k, off, W'(expect_a)));
      check(flag == expect_f, $sformatf("k=%0d done %0b expected %0b", k, flag, expect_f));
      en = ($urandom_range(0, 4) != 0);
      if (!en) stalls++;
      @(negedge clk);
      if (en) k++;
    end
    en = 1'b0;
  endtask

  // Address sequences printed in the published simulation trace
  // (macroblock width and height 3, slice widths 16 and 32).
  localparam int unsigned TRACE_NEW [16] = '{0, 1, 2, 3, 16, 17, 18, 19, 32, 33, 34, 35, 48, 49, 50, 51};
  localparam int unsigned TRACE_REF [16] = '{0, 1, 2, 3, 32, 33, 34, 35, 64, 65, 66, 67, 96, 97, 98, 99};

  task automatic run_trace(input int unsigned sl, input int unsigned exp_a [16]);
    mb_wd = W'(3); mb_ht = W'(3); sl_wd = W'(sl);
    @(negedge clk) init = 1'b1;
    @(negedge clk) init = 1'b0;
    en = 1'b1;
    for (int i = 0; i < 16; i++) begin
      check(off == W'(exp_a[i]), $sformatf("trace sl=%0d i=%0d addr %0d expected %0d", sl, i, off, exp_a[i]));
      check(flag == (i == 15), $sformatf("trace sl=%0d i=%0d done %0b", sl, i, flag));
      @(negedge clk);
    end
    en = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_trace(16, TRACE_NEW);
    run_trace(32, TRACE_REF);
    run(3, 3, 16, 20);
    run(3, 3, 32, 20);
    run(7, 1, 20, 20);
    run(0, 4, 9, 12);
    check(stalls > 0, "no stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
