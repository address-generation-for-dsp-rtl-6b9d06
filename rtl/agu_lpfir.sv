// agu_lpfir: data fetch addresses for a linear-phase FIR filter with an
// even number N of symmetric coefficients, on streaming data.
//
// With symmetric coefficients, y_n = sum over k < N/2 of
// (x_{n-k} + x_{n-N+1+k}) h_k. So the two samples that share a
// coefficient are fetched back to back. The samples sit in a circular
// buffer of N words. This unit implements the paper's algorithm
// (counter, s = N-1-counter, t, u, v as in its schematic) in one
// combinational path:
//   s = (N-1) - counter
//   t = counter odd ? (offset - s) mod N : offset + s
//   u = offset >= N/2 ? offset - (N/2 - 1) : offset + (N/2 + 1)
//   v = counter == N-1 ? u : t
//   next offset = v mod N   (comparator, 0/N correction, shared subtractor)
// The counter runs 0..N-1. Starting from offset 0 the addresses are
//   j + (0, N-1, 1, N-2, 2, N-3, ..) mod N   for output j = 0, 1, 2, ..
// that is, the oldest sample of the window, the newest, the second oldest,
// the second newest, and so on. One address per clock. win_end is high on
// the last address of each output window.
// The algorithm follows the paper. The counter value used is the one
// before the clock edge; that reading yields the pairs of equation (3).
module agu_lpfir #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              en,
  input  logic [ADDR_W-1:0] n,      // number of taps N, even, >= 2
  output logic [ADDR_W-1:0] off,
  output logic              win_end
);
  localparam int unsigned EW = ADDR_W + 1;

  logic [ADDR_W-1:0] cnt, s, half;
  logic [EW-1:0]     diff, t, u, v;
  logic [ADDR_W-1:0] nx, correction;

  assign win_end = (cnt == n - ADDR_W'(1));

  always_comb begin
    half = n >> 1;
    s    = (n - ADDR_W'(1)) - cnt;
    diff = {1'b0, off} - {1'b0, s};
    if (cnt[0]) t = diff + (diff[EW-1] ? {1'b0, n} : '0);
    else        t = {1'b0, off} + {1'b0, s};
    if (off >= half) u = {1'b0, off} - {1'b0, half - ADDR_W'(1)};
    else             u = {1'b0, off} + {1'b0, half + ADDR_W'(1)};
    v          = win_end ? u : t;
    correction = (v >= {1'b0, n}) ? n : '0;
  end

  // v < 2N, so the low ADDR_W bits of v - correction are the exact result.
  bf_br_add_sub #(.W(ADDR_W)) u_mod (
    .a(v[ADDR_W-1:0]), .b(correction), .bf_br_bar(1'b1), .add_bar_sub(1'b1), .y(nx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    cnt <= '0;
    else if (init) cnt <= '0;
    else if (en)   cnt <= win_end ? '0 : cnt + ADDR_W'(1);
  end

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk(clk), .rst_n(rst_n), .init(init), .en(en), .d(nx), .q(off)
  );
endmodule
