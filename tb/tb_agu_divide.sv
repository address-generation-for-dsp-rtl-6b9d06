// tb_agu_divide: self-checking testbench for agu_divide.
//
// Checks that the address is k div M (linear) or (k div M) mod LEN
// (circular) and that the write strobe is high on every M-th clock, for
// several M, with random stalls.
module tb_agu_divide;
  import agu_ref_pkg::*;
  localparam int unsigned W = 8;

  logic clk = 1'b0, rst_n = 1'b0, init = 1'b0, en = 1'b0, circ, wr;
  logic [W-1:0] m, len, off;
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  agu_divide #(.ADDR_W(W)) dut (.clk, .rst_n, .init, .en, .m, .len, .circ, .off, .wr);

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

  task automatic run(input int unsigned mm, input int unsigned ll, input bit cc,
                     input int unsigned count);
    int unsigned k = 0;
    m = W'(mm); len = W'(ll); circ = cc;
    @(negedge clk) init = 1'b1;
    @(negedge clk) init = 1'b0;
    while (k < count) begin
      check(off == W'(ref_divide(mm, ll, cc, k)),
            $sformatf("m=%0d k=%0d off %0d expected %0d", mm, k, off, ref_divide(mm, ll, cc, k)));
      check(wr == ((k % mm) == mm - 1), $sformatf("m=%0d k=%0d wr %0b", mm, k, wr));
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
    run(1, 5, 1'b0, 20);
    run(4, 5, 1'b0, 60);
    run(3, 4, 1'b1, 60);
    run(6, 3, 1'b1, 80);
    run(1, 7, 1'b1, 30);
    check(stalls > 0, "no stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
