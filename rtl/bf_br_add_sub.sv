// bf_br_add_sub: the adder/subtractor that updates every offset register.
//
// With bf_br_bar = 1 it is an ordinary adder (add_bar_sub = 0) or
// subtractor (add_bar_sub = 1): y = a + b or y = a - b, modulo 2**W.
// With bf_br_bar = 0 the carry runs the other way, from the most
// significant bit towards bit 0 (reverse-carry arithmetic). Adding N/2 this
// way steps an index through 0..N-1 in bit-reversed order.
//
// The unit's name and its two control inputs are those of the schematics of
// the address generators in the paper, where both controls are tied for
// ordinary arithmetic. Reading "Bf_Br_bar = 0" as reverse-carry operation is
// this design's interpretation. Purely combinational, ripple-carry, as the
// paper chose for area.
module bf_br_add_sub #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         bf_br_bar,   // 1: normal carry, 0: reverse carry
  input  logic         add_bar_sub, // 0: add, 1: subtract
  output logic [W-1:0] y
);
  logic [W-1:0] bx;
  logic [W:0]   c;

  assign bx = add_bar_sub ? ~b : b;

  always_comb begin
    c = '0;
    y = '0;
    if (bf_br_bar) begin
      c[0] = add_bar_sub;
      for (int i = 0; i < W; i++) begin
        y[i]   = a[i] ^ bx[i] ^ c[i];
        c[i+1] = (a[i] & bx[i]) | (a[i] & c[i]) | (bx[i] & c[i]);
      end
    end else begin
      // c[i+1] is the carry into bit i; it enters at the top, bit W-1.
      c[W] = add_bar_sub;
      for (int i = W - 1; i >= 0; i--) begin
        y[i] = a[i] ^ bx[i] ^ c[i+1];
        c[i] = (a[i] & bx[i]) | (a[i] & c[i+1]) | (bx[i] & c[i+1]);
      end
    end
  end
endmodule
