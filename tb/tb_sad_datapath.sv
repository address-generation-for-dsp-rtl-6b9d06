// tb_sad_datapath: self-checking testbench for sad_datapath.
//
// First it feeds fifteen pixel pairs from a published motion-estimation
// trace. The larger and smaller pixel and their difference are checked
// against the values printed in that trace. The pair order alternates, so
// the swap multiplexers are used both ways. Then random pairs are fed with
// random enable gaps and random clr_acc pulses. After each clock the
// accumulator is compared with a running sum kept by the testbench.
module tb_sad_datapath;
  localparam int unsigned DW = 8, AW = 16;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, clr_acc = 1'b0;
  logic [DW-1:0] c = '0, r = '0, larger, smaller, absdiff;
  logic [AW-1:0] acc;
  int checks = 0, failures = 0;
  int unsigned model = 0;

  // Pixel pairs (larger, smaller, |difference|) of the reference trace.
  localparam int unsigned NP = 15;
  localparam int unsigned TR_L [NP] = '{67, 115, 33, 107, 32, 116, 111, 100, 32, 112, 114, 111, 119, 115, 100};
  localparam int unsigned TR_S [NP] = '{65, 114, 32, 105, 32, 109, 104,  97, 32, 109, 111, 100, 115, 101,  32};
  localparam int unsigned TR_D [NP] = '{ 2,   1,  1,   2,  0,   7,   7,   3,  0,   3,   3,  11,   4,  14,  68};

  always #5 clk = ~clk;

  sad_datapath #(.DATA_W(DW), .ACC_W(AW)) dut (
    .clk, .rst_n, .en, .clr_acc, .c, .r, .larger, .smaller, .absdiff, .acc);

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

  // Apply one pair at a negedge, check the combinational outputs, clock it.
  task automatic feed(input int unsigned cc, input int unsigned rr, input bit e, input bit clr);
    int unsigned d = (cc > rr) ? cc - rr : rr - cc;
    c = DW'(cc); r = DW'(rr); en = e; clr_acc = clr;
    #1;
    check(absdiff == DW'(d), $sformatf("c=%0d r=%0d absdiff %0d", cc, rr, absdiff));
    check(larger == DW'((cc > rr) ? cc : rr) && smaller == DW'((cc > rr) ? rr : cc),
          $sformatf("c=%0d r=%0d larger/smaller %0d/%0d", cc, rr, larger, smaller));
    if (e) model = (clr ? 0 : model) + d;
    @(negedge clk);
    check(acc == AW'(model), $sformatf("acc %0d expected %0d", acc, AW'(model)));
  endtask

  initial begin
    int unsigned trace_sum;
    trace_sum = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NP; i++) begin
      if (i % 2 == 0) feed(TR_L[i], TR_S[i], 1'b1, i == 0);
      else            feed(TR_S[i], TR_L[i], 1'b1, 1'b0);
      check(absdiff == DW'(TR_D[i]), $sformatf("trace pair %0d difference %0d", i, absdiff));
      trace_sum += TR_D[i];
    end
    check(acc == AW'(trace_sum), $sformatf("trace SAD %0d expected %0d", acc, trace_sum));
    for (int i = 0; i < 2000; i++)
      feed($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 3) != 0,
           $urandom_range(0, 15) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
