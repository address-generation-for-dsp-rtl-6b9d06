// agu_incdec: the basic address generation scheme (linear increment or
// decrement).
//
// The offset register is updated every enabled clock with
// offset +/- modifier, one address per clock. This is the scheme the
// paper draws as a modifier, an adder/subtractor and an offset register
// in a loop. The step input is the modifier; sub selects decrement.
// Addresses wrap modulo 2**ADDR_W. init clears the offset to zero; the
// first address is therefore 0 and the k-th is +/- k*step.
module agu_incdec #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              en,
  input  logic [ADDR_W-1:0] step,
  input  logic              sub,
  output logic [ADDR_W-1:0] off
);
  logic [ADDR_W-1:0] nxt;

  bf_br_add_sub #(.W(ADDR_W)) u_add (
    .a(off), .b(step), .bf_br_bar(1'b1), .add_bar_sub(sub), .y(nxt)
  );

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk(clk), .rst_n(rst_n), .init(init), .en(en), .d(nxt), .q(off)
  );
endmodule
