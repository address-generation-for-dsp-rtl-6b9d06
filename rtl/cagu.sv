// cagu: comprehensive address generator unit. One configurable unit that
// produces one address per clock in any of the addressing modes of
// agu_pkg::agu_mode_e.
//
// Before a kernel runs, the host writes the configuration words
// (cfg_we, cfg_sel, cfg_wdata; see agu_pkg::agu_reg_e). start clears
// every generator to the beginning of its sequence. Then each clock with
// en high advances the generator of the selected mode by one address. The
// kernel thus runs from start to end with no further intervention.
//   addr    = BASE + offset of the selected generator (mod 2**ADDR_W),
//             valid in the clock after start and after each enabled edge.
//   mark    = the mode's per-window strobe: end of an output window
//             (convolution, FIR), wrap (modulo), result write (divide), or
//             end of sequence (bit-reverse, FFT, motion estimation,
//             zigzag).
//   seq_end = the last address of a finite sequence (bit-reverse, FFT data,
//             FFT twiddle, stored convolution, motion estimation, zigzag).
// The paper builds its unit by sharing counters, shifters, an
// accumulator and comparators among the modes, but gives no schematic of
// the merged unit. This design keeps one small generator per mode, each
// with its own offset register, and selects among them. That is simpler,
// and it behaves the same at the ports. The configuration register bank,
// the base register and the enable gating are this design's own. Default
// width 8 bits, the size the paper implemented.
module cagu
  import agu_pkg::*;
#(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cfg_we,
  input  agu_reg_e          cfg_sel,
  input  logic [ADDR_W-1:0] cfg_wdata,
  input  logic              start,
  input  logic              en,
  output logic [ADDR_W-1:0] addr,
  output logic              mark,
  output logic              seq_end
);
  agu_mode_e mode;
  logic [ADDR_W-1:0] cfg [NUM_CFG_REGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_CFG_REGS; i++) cfg[i] <= '0;
    end else if (cfg_we) begin
      cfg[cfg_sel] <= cfg_wdata;
    end
  end

  assign mode = agu_mode_e'(cfg[REG_MODE][3:0]);

  function automatic logic sel(input agu_mode_e cur, input agu_mode_e want);
    return cur == want;
  endfunction

  logic [ADDR_W-1:0] off_inc, off_brv, off_fd, off_ft, off_cs, off_cm,
                     off_mo, off_dv, off_lp, off_me, off_zz;
  logic last_brv, last_fd, last_ft, win_cs, last_cs, win_cm, wrap_mo,
        wr_dv, win_lp, done_me, last_zz;

  agu_incdec #(.ADDR_W(ADDR_W)) u_incdec (
    .clk, .rst_n, .init(start),
    .en(en && (sel(mode, MODE_INC) || sel(mode, MODE_DEC))),
    .step(cfg[REG_STEP]), .sub(sel(mode, MODE_DEC)), .off(off_inc));

  agu_bitrev #(.ADDR_W(ADDR_W)) u_bitrev (
    .clk, .rst_n, .init(start), .en(en && sel(mode, MODE_BITREV)),
    .log2n(cfg[REG_LOG2N]), .off(off_brv), .last(last_brv));

  agu_fft_data #(.ADDR_W(ADDR_W)) u_fft_data (
    .clk, .rst_n, .init(start), .en(en && sel(mode, MODE_FFT_DATA)),
    .log2n(cfg[REG_LOG2N]), .off(off_fd), .last(last_fd));

  agu_fft_twiddle #(.ADDR_W(ADDR_W)) u_fft_tw (
    .clk, .rst_n, .init(start), .en(en && sel(mode, MODE_FFT_TW)),
    .log2n(cfg[REG_LOG2N]), .off(off_ft), .last(last_ft));

  agu_conv_stored #(.ADDR_W(ADDR_W)) u_conv_stored (
    .clk, .rst_n, .init(start), .en(en && sel(mode, MODE_CONV_STORED)),
    .n(cfg[REG_N]), .m(cfg[REG_M]), .off(off_cs), .win_end(win_cs), .last(last_cs));

  agu_conv_stream #(.ADDR_W(ADDR_W)) u_conv_stream (
    .clk, .rst_n, .init(start), .en(en && sel(mode, MODE_CONV_STREAM)),
    .n(cfg[REG_N]), .off(off_cm), .win_end(win_cm));

  agu_modulo #(.ADDR_W(ADDR_W)) u_modulo (
    .clk, .rst_n, .init(start), .en(en && sel(mode, MODE_MODULO)),
    .m(cfg[REG_M]), .step(cfg[REG_STEP]), .off(off_mo), .wrap(wrap_mo));

  agu_divide #(.ADDR_W(ADDR_W)) u_divide (
    .clk, .rst_n, .init(start), .en(en && sel(mode, MODE_DIVIDE)),
    .m(cfg[REG_M]), .len(cfg[REG_LEN]), .circ(cfg[REG_FLAGS][FLAG_CIRC]),
    .off(off_dv), .wr(wr_dv));

  agu_lpfir #(.ADDR_W(ADDR_W)) u_lpfir (
    .clk, .rst_n, .init(start), .en(en && sel(mode, MODE_LPFIR)),
    .n(cfg[REG_N]), .off(off_lp), .win_end(win_lp));

  agu_me #(.ADDR_W(ADDR_W)) u_me (
    .clk, .rst_n, .init(start), .en(en && sel(mode, MODE_ME)),
    .mb_wd(cfg[REG_MBWD]), .mb_ht(cfg[REG_MBHT]), .sl_wd(cfg[REG_SLWD]),
    .off(off_me), .done(done_me));

  agu_zigzag #(.ADDR_W(ADDR_W)) u_zigzag (
    .clk, .rst_n, .init(start), .en(en && sel(mode, MODE_ZIGZAG)),
    .n(cfg[REG_N]), .off(off_zz), .last(last_zz));

  logic [ADDR_W-1:0] off;

  always_comb begin
    off     = '0;
    mark    = 1'b0;
    seq_end = 1'b0;
    unique case (mode)
      MODE_INC, MODE_DEC: off = off_inc;
      MODE_BITREV:      begin off = off_brv; mark = last_brv; seq_end = last_brv; end
      MODE_FFT_DATA:    begin off = off_fd;  mark = last_fd;  seq_end = last_fd;  end
      MODE_FFT_TW:      begin off = off_ft;  mark = last_ft;  seq_end = last_ft;  end
      MODE_CONV_STORED: begin off = off_cs;  mark = win_cs;   seq_end = last_cs;  end
      MODE_CONV_STREAM: begin off = off_cm;  mark = win_cm;   end
      MODE_MODULO:      begin off = off_mo;  mark = wrap_mo;  end
      MODE_DIVIDE:      begin off = off_dv;  mark = wr_dv;    end
      MODE_LPFIR:       begin off = off_lp;  mark = win_lp;   end
      MODE_ME:          begin off = off_me;  mark = done_me;  seq_end = done_me;  end
      MODE_ZIGZAG:      begin off = off_zz;  mark = last_zz;  seq_end = last_zz;  end
      default:          off = '0;
    endcase
  end

  assign addr = cfg[REG_BASE] + off;
endmodule
