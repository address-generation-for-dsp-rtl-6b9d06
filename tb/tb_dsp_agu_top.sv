// tb_dsp_agu_top: end-to-end testbench for dsp_agu_top at its default
// parameters (8-bit addresses, 8-bit pixels, 16-bit sums).
//
// Two 256-byte memories with one clock of read latency answer the read
// ports; they hold random bytes. Each kernel below programs the three
// generators (A, B, R) through the configuration port, starts, and checks:
//   - every read address of A and B and every R address against the
//     closed-form reference of its mode, clock by clock;
//   - every result write (address and sum of |A - B| over the window that
//     R's strobe closes) against sums computed here from the memories;
//   - that done arrives count + 2 clocks after start (N x M + 2 for SAD).
// Kernels: motion estimation on 4x4 blocks in 16- and 32-pixel-wide
// slices (the sizes of the published trace), convolution on streaming
// and on stored data, a symmetric FIR, 16- and 256-point FFTs (operands,
// twiddles, bit-reversed store), a zigzag scan and increment/decrement.
// It counts how often each addressing mode ran, each swap direction of the
// SAD datapath, result writes, window restarts and sequence ends, and
// fails for any that never happened.
module tb_dsp_agu_top;
  import agu_pkg::*;
  import agu_ref_pkg::*;
  localparam int unsigned AW = 8, DW = 8, ACCW = 16, CW = 16;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [2:0]      cfg_we = '0;
  agu_reg_e        cfg_sel = REG_MODE;
  logic [AW-1:0]   cfg_wdata = '0;
  logic [CW-1:0]   count = '0;
  logic            busy, done, rd_en, res_we;
  logic [AW-1:0]   rd_a_addr, rd_b_addr, r_addr, res_addr;
  logic [DW-1:0]   rd_a_data = '0, rd_b_data = '0, sad_larger, sad_smaller, sad_absdiff;
  logic [2:0]      gen_mark, gen_seq_end;
  logic [ACCW-1:0] res_data;

  logic [DW-1:0] mem_a [256];
  logic [DW-1:0] mem_b [256];

  int checks = 0, failures = 0;
  int mode_used [12];
  int n_swap_lt = 0, n_swap_ge = 0, n_writes = 0, n_seq_end = 0, n_restart = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  dsp_agu_top dut (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_wdata, .start, .count, .busy, .done,
    .rd_en, .rd_a_addr, .rd_b_addr, .rd_a_data, .rd_b_data, .gen_mark, .gen_seq_end,
    .r_addr, .res_we, .res_addr, .res_data, .sad_larger, .sad_smaller, .sad_absdiff);

  // Synchronous-read memories, one clock of latency.
  always @(posedge clk) if (rd_en) begin
    rd_a_data <= mem_a[rd_a_addr];
    rd_b_data <= mem_b[rd_b_addr];
  end

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

  task automatic program_gen(input int g, input ref_cfg_t c);
    int unsigned v [NUM_CFG_REGS];
    v[REG_MODE] = 32'(c.mode); v[REG_N] = c.n; v[REG_M] = c.m; v[REG_LEN] = c.len;
    v[REG_STEP] = c.step; v[REG_MBWD] = c.wd; v[REG_MBHT] = c.ht; v[REG_SLWD] = c.sl;
    v[REG_LOG2N] = c.l2; v[REG_BASE] = c.base; v[REG_FLAGS] = 32'(c.circ);
    for (int i = 0; i < NUM_CFG_REGS; i++) begin
      @(negedge clk);
      cfg_we = 3'(1 << g); cfg_sel = agu_reg_e'(i); cfg_wdata = AW'(v[i]);
    end
    @(negedge clk) cfg_we = '0;
  endtask

  // Expected result writes of the running kernel.
  int unsigned exp_addr [$];
  int unsigned exp_data [$];
  int          t_start, t_done;
  bit          running = 1'b0;

  // Result and completion monitor.
  always @(negedge clk) if (rst_n && running) begin
    if (sad_larger != sad_smaller) begin
      if (rd_a_data < rd_b_data) n_swap_lt++; else n_swap_ge++;
    end
    if (res_we) begin
      n_writes++;
      if (exp_addr.size() == 0) check(1'b0, "unexpected result write");
      else begin
        int unsigned ea, ed;
        ea = exp_addr.pop_front();
        ed = exp_data.pop_front();
        check(res_addr == AW'(ea) && res_data == ACCW'(ed),
              $sformatf("result write @%0d = %0d, expected @%0d = %0d", res_addr, res_data, AW'(ea), ed));
      end
    end
    if (done) t_done = cyc;
  end

  task automatic kernel(input string name, input ref_cfg_t ca, input ref_cfg_t cb,
                        input ref_cfg_t cr, input int unsigned k_total);
    int unsigned acc = 0, d, a, b;
    bit fresh = 1'b1;
    bit [1:0] fa, fb, fr;
    program_gen(0, ca); program_gen(1, cb); program_gen(2, cr);
    mode_used[ca.mode]++; mode_used[cb.mode]++; mode_used[cr.mode]++;
    // Expected writes, from the reference address sequences and memories.
    exp_addr.delete(); exp_data.delete();
    for (int unsigned k = 0; k < k_total; k++) begin
      a = (ca.base + ref_off(ca, k)) % 256;
      b = (cb.base + ref_off(cb, k)) % 256;
      d = (mem_a[a] > mem_b[b]) ? 32'(mem_a[a]) - 32'(mem_b[b]) : 32'(mem_b[b]) - 32'(mem_a[a]);
      acc = (fresh ? 0 : acc) + d;
      fr = ref_flags(cr, k);
      fresh = fr[1];
      if (fr[1]) begin
        exp_addr.push_back((cr.base + ref_off(cr, k)) % 256);
        exp_data.push_back(acc % (1 << ACCW));
      end
    end
    t_done = -1;
    running = 1'b1;
    @(negedge clk);
    start = 1'b1; count = CW'(k_total); t_start = cyc;
    @(negedge clk);
    start = 1'b0;
    for (int unsigned k = 0; k < k_total; k++) begin
      fa = ref_flags(ca, k); fb = ref_flags(cb, k); fr = ref_flags(cr, k);
      check(busy && rd_en, $sformatf("%s k=%0d not busy", name, k));
      check(rd_a_addr == AW'(ca.base + ref_off(ca, k)),
            $sformatf("%s k=%0d A addr %0d expected %0d", name, k, rd_a_addr, AW'(ca.base + ref_off(ca, k))));
      check(rd_b_addr == AW'(cb.base + ref_off(cb, k)),
            $sformatf("%s k=%0d B addr %0d expected %0d", name, k, rd_b_addr, AW'(cb.base + ref_off(cb, k))));
      check(r_addr == AW'(cr.base + ref_off(cr, k)),
            $sformatf("%s k=%0d R addr %0d expected %0d", name, k, r_addr, AW'(cr.base + ref_off(cr, k))));
      check(gen_mark == {fr[1], fb[1], fa[1]} && gen_seq_end == {fr[0], fb[0], fa[0]},
            $sformatf("%s k=%0d strobes %b/%b", name, k, gen_mark, gen_seq_end));
      n_seq_end += $countones(gen_seq_end);
      if (k > 0 && (fa[0] || fb[0])) n_restart++;
      @(negedge clk);
    end
    check(!busy, $sformatf("%s still busy after %0d clocks", name, k_total));
    repeat (3) @(negedge clk);
    check(t_done - t_start == int'(k_total) + 2,
          $sformatf("%s done after %0d clocks, expected %0d", name, t_done - t_start, k_total + 2));
    check(exp_addr.size() == 0, $sformatf("%s %0d result writes missing", name, exp_addr.size()));
    running = 1'b0;
    $display("%s: %0d iterations, done after %0d clocks", name, k_total, t_done - t_start);
  endtask

  function automatic ref_cfg_t cfg(agu_mode_e md);
    ref_cfg_t c = '{mode: md, n: 1, m: 1, len: 1, step: 1, wd: 0, ht: 0, sl: 1, l2: 1,
                    base: 0, circ: 1'b0};
    return c;
  endfunction

  initial begin
    ref_cfg_t a, b, r;
    for (int i = 0; i < 256; i++) begin
      mem_a[i] = DW'($urandom);
      mem_b[i] = DW'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Motion estimation: 4x4 block (last index 3), slices 16 and 32 wide,
    // two blocks in a row (the generators restart), one SAD per block.
    a = cfg(MODE_ME); a.wd = 3; a.ht = 3; a.sl = 16;
    b = cfg(MODE_ME); b.wd = 3; b.ht = 3; b.sl = 32;
    r = cfg(MODE_DIVIDE); r.m = 16;
    kernel("SAD 4x4", a, b, r, 32);
    a.base = 5; a.wd = 7; a.ht = 7; b.base = 100; b.wd = 7; b.ht = 7; r.m = 64; r.base = 10;
    kernel("SAD 8x8", a, b, r, 64);

    // Convolution on streaming data: 5-word circular buffer, modulo-5
    // coefficients, circular result store of 7 words.
    a = cfg(MODE_CONV_STREAM); a.n = 5; a.base = 32;
    b = cfg(MODE_MODULO); b.m = 5; b.base = 200;
    r = cfg(MODE_DIVIDE); r.m = 5; r.len = 7; r.circ = 1'b1; r.base = 64;
    kernel("convolution, streaming", a, b, r, 60);

    // Convolution on stored, zero-padded data: N = 5, M = 3.
    a = cfg(MODE_CONV_STORED); a.n = 5; a.m = 3; a.base = 16;
    b = cfg(MODE_MODULO); b.m = 3; b.base = 128;
    r = cfg(MODE_DIVIDE); r.m = 3; r.base = 80;
    kernel("convolution, stored", a, b, r, (5 + 3 - 1) * 3);

    // Symmetric FIR with 6 taps: each coefficient serves two samples.
    a = cfg(MODE_LPFIR); a.n = 6; a.base = 48;
    b = cfg(MODE_DIVIDE); b.m = 2; b.len = 3; b.circ = 1'b1; b.base = 220;
    r = cfg(MODE_DIVIDE); r.m = 6; r.len = 4; r.circ = 1'b1; r.base = 90;
    kernel("linear-phase FIR", a, b, r, 6 * 8);

    // 16-point FFT: operand pairs, twiddles, bit-reversed store.
    a = cfg(MODE_FFT_DATA); a.l2 = 4;
    b = cfg(MODE_FFT_TW); b.l2 = 4; b.base = 240;
    r = cfg(MODE_BITREV); r.l2 = 4; r.base = 128;
    kernel("FFT 16", a, b, r, 16 * 4);

    // 256-point FFT, the largest the 8-bit address space holds.
    a = cfg(MODE_FFT_DATA); a.l2 = 8;
    b = cfg(MODE_FFT_TW); b.l2 = 8;
    r = cfg(MODE_BITREV); r.l2 = 8;
    kernel("FFT 256", a, b, r, 256 * 8);

    // Zigzag scan of an 8x8 block, increment/decrement.
    a = cfg(MODE_ZIGZAG); a.n = 8; a.base = 64;
    b = cfg(MODE_DEC); b.step = 3; b.base = 255;
    r = cfg(MODE_INC); r.step = 2;
    kernel("zigzag", a, b, r, 64);
    r = cfg(MODE_DIVIDE); r.m = 64;
    kernel("zigzag with SAD", a, b, r, 64);

    for (int i = 0; i < 12; i++)
      check(mode_used[i] > 0, $sformatf("addressing mode %0d never used", i));
    check(n_swap_lt > 0 && n_swap_ge > 0, "SAD swap not exercised both ways");
    check(n_writes > 0, "no result written");
    check(n_seq_end > 0, "no sequence end seen");
    check(n_restart > 0, "no generator restart seen");
    $display("coverage: swaps %0d/%0d, writes %0d, sequence ends %0d, restarts %0d",
             n_swap_lt, n_swap_ge, n_writes, n_seq_end, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
