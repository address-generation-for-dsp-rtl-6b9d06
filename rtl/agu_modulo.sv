// agu_modulo: modulo-M (circular) addressing, used to fetch the impulse
// response coefficients of a convolution, streaming or stored.
//
// Each enabled clock the offset becomes (offset + step) mod M. The sum is
// compared with M and M is subtracted when it is not smaller, so step must
// be below M. With step = 1 this gives 0, 1, .., M-1, 0, 1, .. . wrap is
// high on the clock whose update wraps past M.
// The paper names the mode and its use. The compare-and-correct circuit
// is this design's own, patterned on the paper's streaming-data
// generator.
module agu_modulo #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              en,
  input  logic [ADDR_W-1:0] m,      // modulus M (>= 1)
  input  logic [ADDR_W-1:0] step,   // modifier, step < M
  output logic [ADDR_W-1:0] off,
  output logic              wrap
);
  logic [ADDR_W:0]   sum;
  logic [ADDR_W-1:0] nxt;

  assign sum  = {1'b0, off} + {1'b0, step};
  assign wrap = (sum >= {1'b0, m});

  bf_br_add_sub #(.W(ADDR_W)) u_sub (
    .a(sum[ADDR_W-1:0]), .b(wrap ? m : '0), .bf_br_bar(1'b1), .add_bar_sub(1'b1), .y(nxt)
  );

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk(clk), .rst_n(rst_n), .init(init), .en(en), .d(nxt), .q(off)
  );
endmodule
