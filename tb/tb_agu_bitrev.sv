// tb_agu_bitrev: self-checking testbench for agu_bitrev.
//
// Checks the bit-reversed sequence for N = 2, 8, 64 and 256 (the full
// 8-bit range), each run past its end to see the restart.
// Every clock the offset is compared with the closed-form reference in
// agu_ref_pkg, and the last flag with where the sequence says it must
// be. The enable is dropped at random clocks to check that the generator
// holds its address while stalled. Each configuration runs for one sequence and a few addresses more.
module tb_agu_bitrev;
  import agu_ref_pkg::*;
  localparam int unsigned W = 8;

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, en = 1'b0;
  logic [W-1:0] log2n;
  logic [W-1:0] off;
  logic         flag;
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  agu_bitrev #(.ADDR_W(W)) dut (
    .clk, .rst_n, .init, .en,
    .log2n, .off, .last(flag)
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

  task automatic run(input int unsigned l2, input int unsigned count);
    int unsigned k = 0;
    int unsigned expect_a;
    bit expect_f;
    log2n = W'(l2);
    @(negedge clk) init = 1'b1;
    @(negedge clk) init = 1'b0;
    while (k < count) begin
      expect_a = ref_bitrev(l2, k);
      expect_f = (k % (1 << l2)) == (1 << l2) - 1;
      check(off == W'(expect_a), $sformatf("k=%0d addr %0d expected %0d", k, off, W'(expect_a)));
      check(flag == expect_f, $sformatf("k=%0d last %0b expected %0b", k, flag, expect_f));
      en = ($urandom_range(0, 4) != 0);
      if (!en) stalls++;
      @(negedge clk);
      if (en) k++;
    end
    en = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1, 6);
    run(3, 20);
    run(6, 70);
    run(8, 300);
    check(stalls > 0, "no stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
