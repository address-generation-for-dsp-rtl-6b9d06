// agu_zigzag: zigzag scan addresses of an N x N block stored row by row,
// as entropy coding reads quantized transform coefficients (JPEG order).
//
// Row and column counters track the position and a direction bit tells
// whether the scan moves up-right or down-left. The offset register
// (row*N + col) is updated by the shared adder/subtractor with one of
// three modifiers:
//   +1      step right (at the top or bottom edge),
//   +N      step down (at the left or right edge),
//   -(N-1)  move up-right, or +(N-1) move down-left, inside the block.
// The direction flips at every edge step. One address per clock, N*N in
// all, starting at 0. last is high on the final address (N*N-1); after it
// the scan restarts.
// The paper gives only the function, for any even N. The counters, the
// direction bit and the modifiers are this design's own; no multiplier is
// needed.
module agu_zigzag #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              en,
  input  logic [ADDR_W-1:0] n,      // block side N (>= 2)
  output logic [ADDR_W-1:0] off,
  output logic              last
);
  logic [ADDR_W-1:0] row, col, modifier, nxt, nm1;
  logic              down_left, sub, edge_step;

  assign nm1  = n - ADDR_W'(1);
  assign last = (row == nm1) && (col == nm1);

  always_comb begin
    edge_step = 1'b1;
    sub       = 1'b0;
    modifier  = ADDR_W'(1);
    if (!down_left) begin
      if (col == nm1)     modifier = n;
      else if (row == '0) modifier = ADDR_W'(1);
      else begin
        edge_step = 1'b0;
        sub       = 1'b1;
        modifier  = nm1;
      end
    end else begin
      if (row == nm1)     modifier = ADDR_W'(1);
      else if (col == '0) modifier = n;
      else begin
        edge_step = 1'b0;
        modifier  = nm1;
      end
    end
  end

  bf_br_add_sub #(.W(ADDR_W)) u_add (
    .a(off), .b(modifier), .bf_br_bar(1'b1), .add_bar_sub(sub), .y(nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row       <= '0;
      col       <= '0;
      down_left <= 1'b0;
    end else if (init || (en && last)) begin
      row       <= '0;
      col       <= '0;
      down_left <= 1'b0;
    end else if (en) begin
      if (edge_step) down_left <= ~down_left;
      if (modifier == n && edge_step) row <= row + ADDR_W'(1);
      else if (edge_step)             col <= col + ADDR_W'(1);
      else if (!down_left) begin
        row <= row - ADDR_W'(1);
        col <= col + ADDR_W'(1);
      end else begin
        row <= row + ADDR_W'(1);
        col <= col - ADDR_W'(1);
      end
    end
  end

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk(clk), .rst_n(rst_n), .init(init || (en && last)), .en(en), .d(nxt), .q(off)
  );
endmodule
