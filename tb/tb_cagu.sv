// tb_cagu: self-checking testbench for the comprehensive address generator.
//
// For every addressing mode it writes the configuration words through the
// register port, pulses start, and checks addr = BASE + reference offset
// every clock, with random stalls of the enable. It also checks the mode's
// strobe (mark) and, where the sequence is finite, seq_end. Switching
// modes between runs checks that the register bank really selects the
// generator. It counts how often each mode ran and fails if one never did.
module tb_cagu;
  import agu_pkg::*;
  import agu_ref_pkg::*;
  localparam int unsigned W = 8;

  logic clk = 1'b0, rst_n = 1'b0, cfg_we = 1'b0, start = 1'b0, en = 1'b0;
  agu_reg_e     cfg_sel = REG_MODE;
  logic [W-1:0] cfg_wdata = '0, addr;
  logic         mark, seq_end;
  int checks = 0, failures = 0, stalls = 0;
  int mode_runs [12];

  always #5 clk = ~clk;

  cagu #(.ADDR_W(W)) dut (.clk, .rst_n, .cfg_we, .cfg_sel, .cfg_wdata, .start, .en,
                          .addr, .mark, .seq_end);

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

  task automatic wr(input agu_reg_e sel, input int unsigned v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_sel = sel; cfg_wdata = W'(v);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  // Configuration used by the reference models.
  int unsigned c_n, c_m, c_len, c_step, c_wd, c_ht, c_sl, c_l2, c_base;
  bit c_circ;

  task automatic run(input agu_mode_e md, input int unsigned count);
    int unsigned k = 0;
    bit [1:0] fl;
    ref_cfg_t rc;
    rc = '{mode: md, n: c_n, m: c_m, len: c_len, step: c_step, wd: c_wd, ht: c_ht,
           sl: c_sl, l2: c_l2, base: c_base, circ: c_circ};
    wr(REG_MODE, 32'(md));
    wr(REG_N, c_n);      wr(REG_M, c_m);       wr(REG_LEN, c_len);
    wr(REG_STEP, c_step); wr(REG_MBWD, c_wd);   wr(REG_MBHT, c_ht);
    wr(REG_SLWD, c_sl);  wr(REG_LOG2N, c_l2);  wr(REG_BASE, c_base);
    wr(REG_FLAGS, 32'(c_circ));
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    mode_runs[md]++;
    while (k < count) begin
      fl = ref_flags(rc, k);
      check(addr == W'(c_base + ref_off(rc, k)),
            $sformatf("%s k=%0d addr %0d expected %0d", md.name(), k, addr, W'(c_base + ref_off(rc, k))));
      check({mark, seq_end} == fl, $sformatf("%s k=%0d flags %b expected %b", md.name(), k, {mark, seq_end}, fl));
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
    c_n = 6; c_m = 4; c_len = 5; c_step = 3; c_wd = 3; c_ht = 3; c_sl = 16; c_l2 = 3;
    c_base = 40; c_circ = 1'b1;
    run(MODE_INC, 30);
    run(MODE_DEC, 30);
    run(MODE_BITREV, 20);
    run(MODE_FFT_DATA, 30);
    run(MODE_FFT_TW, 30);
    run(MODE_CONV_STORED, 40);
    run(MODE_CONV_STREAM, 50);
    run(MODE_MODULO, 30);
    run(MODE_DIVIDE, 40);
    run(MODE_LPFIR, 50);
    run(MODE_ME, 20);
    run(MODE_ZIGZAG, 40);
    // A second set of sizes: 8x8 zigzag, 32-point FFT, linear divide.
    c_n = 8; c_m = 3; c_len = 9; c_step = 1; c_wd = 2; c_ht = 4; c_sl = 32; c_l2 = 5;
    c_base = 200; c_circ = 1'b0;
    run(MODE_ZIGZAG, 70);
    run(MODE_FFT_DATA, 170);
    run(MODE_FFT_TW, 170);
    run(MODE_DIVIDE, 40);
    run(MODE_ME, 20);
    run(MODE_CONV_STORED, 40);
    run(MODE_LPFIR, 20);
    for (int i = 0; i < 12; i++) check(mode_runs[i] > 0, $sformatf("mode %0d never ran", i));
    check(stalls > 0, "no stall exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
