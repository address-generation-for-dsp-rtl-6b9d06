// agu_bitrev: bit-reversed address sequence for loading or storing the data
// of an N-point FFT (N = 2**log2n).
//
// The offset register starts at 0 and each enabled clock adds N/2 with
// reverse carry (bf_br_add_sub with bf_br_bar = 0), which yields
// 0, N/2, N/4, 3N/4, ... : the bit reversal of 0, 1, 2, 3, ... in log2n
// bits. One address per clock; last is high while the last address
// (N-1) is out. After it the sequence starts again at 0.
// The paper names the bit-reversed mode; the reverse-carry adder is this
// design's way of producing it with the shared adder.
module agu_bitrev #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              en,
  input  logic [ADDR_W-1:0] log2n,  // 1 .. ADDR_W
  output logic [ADDR_W-1:0] off,
  output logic              last
);
  logic [ADDR_W-1:0] half, nmask, nxt;

  always_comb begin
    half  = ADDR_W'(1) << (log2n - 1);
    nmask = (half << 1) - ADDR_W'(1);
  end

  bf_br_add_sub #(.W(ADDR_W)) u_add (
    .a(off), .b(half), .bf_br_bar(1'b0), .add_bar_sub(1'b0), .y(nxt)
  );

  assign last = (off == nmask);

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk(clk), .rst_n(rst_n), .init(init), .en(en), .d(nxt & nmask), .q(off)
  );
endmodule
