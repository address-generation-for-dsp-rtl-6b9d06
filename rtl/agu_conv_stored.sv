// agu_conv_stored: data fetch addresses for the convolution of a stored
// input x of length N with an impulse response of length M.
//
// Following the paper, the stored input is padded with M-1 zeros at
// both ends and the impulse response is stored in reverse order. Output n
// (n = 0 .. N+M-2) is then the dot product of padded samples n .. n+M-1
// with the reversed coefficients. The offset register therefore steps by +1
// inside a window. At the end of a window it steps back by M-2, to the
// start of the next window. A tap counter (0..M-1) and an output counter
// (0..N+M-2) drive this. One address per clock, (N+M-1)*M addresses in
// all. win_end is high on the last address of each window (a result is
// complete). last is high on the very last address; after it the
// sequence restarts.
// The counter/offset structure is this design's own; the paper gives
// the padding, the reversed coefficients and the access pattern.
module agu_conv_stored #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              en,
  input  logic [ADDR_W-1:0] n,      // input length N
  input  logic [ADDR_W-1:0] m,      // impulse response length M (>= 1)
  output logic [ADDR_W-1:0] off,
  output logic              win_end,
  output logic              last
);
  logic [ADDR_W-1:0] tap, outn, modifier, nxt;
  logic              back;

  assign win_end  = (tap == m - ADDR_W'(1));
  assign last     = win_end && (outn == n + m - ADDR_W'(2));
  // Inside a window add 1; at its end subtract M-2 (that is, add 2-M).
  assign back     = win_end && (m > ADDR_W'(1));
  assign modifier = back ? (m - ADDR_W'(2)) : ADDR_W'(1);

  bf_br_add_sub #(.W(ADDR_W)) u_add (
    .a(off), .b(modifier), .bf_br_bar(1'b1), .add_bar_sub(back), .y(nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tap  <= '0;
      outn <= '0;
      off  <= '0;
    end else if (init) begin
      tap  <= '0;
      outn <= '0;
      off  <= '0;
    end else if (en) begin
      if (last) begin
        tap  <= '0;
        outn <= '0;
        off  <= '0;
      end else if (win_end) begin
        tap  <= '0;
        outn <= outn + ADDR_W'(1);
        off  <= nxt;
      end else begin
        tap  <= tap + ADDR_W'(1);
        off  <= nxt;
      end
    end
  end
endmodule
