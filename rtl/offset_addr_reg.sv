// offset_addr_reg: the offset register that holds the current address of an
// address generator (Offset_Addr_Reg in the paper's schematics).
//
// Asynchronous active-low reset and a synchronous clear (init) both set it
// to zero. Otherwise it loads d on a clock edge where en (Addr_Gen_En) is
// high. The schematics gate the clock with Addr_Gen_En; this design uses a
// clock enable instead, which behaves the same at the register output.
module offset_addr_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         init,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= '0;
    else if (init) q <= '0;
    else if (en)   q <= d;
  end
endmodule
