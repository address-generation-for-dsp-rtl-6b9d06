// agu_conv_stream: data fetch addresses for convolution on streaming data.
//
// The samples live in a circular buffer of N words. Counter1 counts the
// taps of one output, 0..N-1. Counter2 counts outputs and steps when
// Counter1 wraps; it wraps at N. The address offset is
// (Counter1 + Counter2) mod N, formed by an adder, a comparator
// (sum >= N) that selects a correction of 0 or N, and a subtractor.
// These are the algorithm and schematic of the paper. So output j reads
// the buffer from position j round to j-1, one word per clock.
// win_end is high on the last address of each output window.
//
// Own choices: the offset register loads the value that belongs to the
// counters' next state. So the first address after init is 0 and no
// address repeats. Counter2 wraps from N-1 straight to 0 instead of
// passing through N for one clock.
module agu_conv_stream #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              en,
  input  logic [ADDR_W-1:0] n,      // circular buffer length N (>= 1)
  output logic [ADDR_W-1:0] off,
  output logic              win_end
);
  logic [ADDR_W-1:0] cnt1, cnt2, cnt1_nx, cnt2_nx, correction, nxt;
  logic [ADDR_W:0]   sum;

  assign win_end = (cnt1 == n - ADDR_W'(1));

  always_comb begin
    cnt1_nx = win_end ? '0 : cnt1 + ADDR_W'(1);
    cnt2_nx = cnt2;
    if (win_end) cnt2_nx = (cnt2 == n - ADDR_W'(1)) ? '0 : cnt2 + ADDR_W'(1);
    sum        = {1'b0, cnt1_nx} + {1'b0, cnt2_nx};
    correction = (sum >= {1'b0, n}) ? n : '0;
  end

  bf_br_add_sub #(.W(ADDR_W)) u_sub (
    .a(sum[ADDR_W-1:0]), .b(correction), .bf_br_bar(1'b1), .add_bar_sub(1'b1), .y(nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt1 <= '0;
      cnt2 <= '0;
    end else if (init) begin
      cnt1 <= '0;
      cnt2 <= '0;
    end else if (en) begin
      cnt1 <= cnt1_nx;
      cnt2 <= cnt2_nx;
    end
  end

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk(clk), .rst_n(rst_n), .init(init), .en(en), .d(nxt), .q(off)
  );
endmodule
