// dsp_agu_top: three comprehensive address generators and the
// sum-of-absolute-differences datapath, sequenced so that the innermost
// loop of a DSP kernel runs at one iteration per clock.
//
// A kernel needs up to three addresses per clock: two operand reads
// (data sample and coefficient, or current and reference pixel) and one
// result write. Generator A drives read port A, generator B read port B and
// generator R the result write. Each is programmed through its own
// configuration bank (cfg_we[0..2] for A, B, R; cfg_sel; cfg_wdata).
//
// Sequencing: a start pulse clears all three generators and loads the
// iteration count. For that many clocks rd_en is high and all three
// advance together, one address each per clock. The memories answer one
// clock later (rd_a_data, rd_b_data). The SAD datapath then accumulates
// |A - B| one clock after that. R's strobe (mark) marks the last iteration
// of each result. A new sum starts on the iteration after a strobe. R's
// address and strobe are delayed by the same two clocks, so res_we,
// res_addr and res_data (the finished sum) come out together. done pulses
// with the final result. From the clock in which start is high to the
// clock in which done is high takes count + 2 clocks. That matches the
// paper's SAD timing of N x M clocks plus two clocks of overhead.
//
// Kernels whose arithmetic is a multiply-accumulate (convolution, FIR, FFT)
// use this block for their addresses and strobes only. The datapath that
// multiplies sits outside it, and so do the memories. Generator marks and
// sequence ends are brought out for that datapath.
// The three-generator arrangement and the SAD datapath follow the
// paper. The sequencer, the strobe alignment and the port set are this
// design's own.
module dsp_agu_top
  import agu_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 16,
  parameter int unsigned CNT_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration of the three generators
  input  logic [2:0]        cfg_we,
  input  agu_reg_e          cfg_sel,
  input  logic [ADDR_W-1:0] cfg_wdata,
  // kernel control
  input  logic              start,
  input  logic [CNT_W-1:0]  count,     // iterations (addresses per generator), >= 1
  output logic              busy,
  output logic              done,
  // operand reads
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_a_addr,
  output logic [ADDR_W-1:0] rd_b_addr,
  input  logic [DATA_W-1:0] rd_a_data,
  input  logic [DATA_W-1:0] rd_b_data,
  // generator strobes for an external datapath, aligned with the addresses
  output logic [2:0]        gen_mark,
  output logic [2:0]        gen_seq_end,
  // result address from generator R, aligned with the addresses
  output logic [ADDR_W-1:0] r_addr,
  // result write, aligned with the finished sum
  output logic              res_we,
  output logic [ADDR_W-1:0] res_addr,
  output logic [ACC_W-1:0]  res_data,
  // SAD datapath observation
  output logic [DATA_W-1:0] sad_larger,
  output logic [DATA_W-1:0] sad_smaller,
  output logic [DATA_W-1:0] sad_absdiff
);
  logic [CNT_W-1:0]  remaining;
  logic              new_win;
  logic [ADDR_W-1:0] gen_addr [3];

  for (genvar g = 0; g < 3; g++) begin : g_gen
    cagu #(.ADDR_W(ADDR_W)) u_cagu (
      .clk, .rst_n,
      .cfg_we(cfg_we[g]), .cfg_sel, .cfg_wdata,
      .start, .en(busy),
      .addr(gen_addr[g]), .mark(gen_mark[g]), .seq_end(gen_seq_end[g]));
  end

  assign rd_en     = busy;
  assign rd_a_addr = gen_addr[0];
  assign rd_b_addr = gen_addr[1];
  assign r_addr    = gen_addr[2];

  // Iteration counter.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      remaining <= '0;
      new_win   <= 1'b0;
    end else if (start) begin
      busy      <= (count != '0);
      remaining <= count;
      new_win   <= 1'b1;
    end else if (busy) begin
      remaining <= remaining - CNT_W'(1);
      busy      <= (remaining != CNT_W'(1));
      new_win   <= gen_mark[2];
    end
  end

  // Stage 1: memory read data arrives.
  logic              v1, clr1, w1, last1;
  logic [ADDR_W-1:0] ra1;
  // Stage 2: accumulator holds the sum.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; clr1 <= 1'b0; w1 <= 1'b0; last1 <= 1'b0; ra1 <= '0;
      res_we <= 1'b0; res_addr <= '0; done <= 1'b0;
    end else begin
      v1       <= busy && !start;
      clr1     <= busy && !start && new_win;
      w1       <= busy && !start && gen_mark[2];
      last1    <= busy && !start && (remaining == CNT_W'(1));
      ra1      <= gen_addr[2];
      res_we   <= v1 && w1;
      res_addr <= ra1;
      done     <= last1;
    end
  end

  sad_datapath #(.DATA_W(DATA_W), .ACC_W(ACC_W)) u_sad (
    .clk, .rst_n, .en(v1), .clr_acc(clr1),
    .c(rd_a_data), .r(rd_b_data),
    .larger(sad_larger), .smaller(sad_smaller), .absdiff(sad_absdiff),
    .acc(res_data));

  // Configuration must not change while a kernel runs, and start must not
  // interrupt one.
  always_ff @(posedge clk) begin
    if (busy) begin
      a_cfg_stable: assert (cfg_we == '0) else $error("configuration written while busy");
      a_start_idle: assert (!start) else $error("start while busy");
    end
  end
endmodule
