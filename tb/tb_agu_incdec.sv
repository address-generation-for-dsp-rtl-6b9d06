// tb_agu_incdec: self-checking testbench for agu_incdec.
//
// Runs increment and decrement with several modifiers (including 0 and a
// step that wraps the 8-bit range), comparing the offset with +/- k*step
// every clock, with random stalls of the enable.
module tb_agu_incdec;
  localparam int unsigned W = 8;

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, en = 1'b0, sub;
  logic [W-1:0] step, off;
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  agu_incdec #(.ADDR_W(W)) dut (.clk, .rst_n, .init, .en, .step, .sub, .off);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
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

  task automatic run(input int unsigned st, input bit sb, input int unsigned count);
    int unsigned k = 0;
    int expect_a;
    step = W'(st);
    sub  = sb;
    @(negedge clk) init = 1'b1;
    @(negedge clk) init = 1'b0;
    while (k < count) begin
      expect_a = sb ? -int'(k * st) : int'(k * st);
      check(off == W'(expect_a), $sformatf("k=%0d off %0d expected %0d", k, off, W'(expect_a)));
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
    run(1, 1'b0, 40);
    run(1, 1'b1, 40);
    run(3, 1'b0, 120);
    run(5, 1'b1, 120);
    run(0, 1'b0, 10);
    run(200, 1'b0, 20);
    check(stalls > 0, "no stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
