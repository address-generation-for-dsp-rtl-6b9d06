// agu_divide: divide-by-M addressing, used to store the results of a
// convolution or FIR kernel.
//
// The kernel produces one result every M clocks. A sub-counter counts
// 0..M-1, and the offset register advances by one each time the sub-counter
// wraps. So the address at clock k is k div M. The strobe wr is high on the
// clock where the sub-counter is at M-1: the clock in which the result for
// the current address is complete. With circ = 0 (stored data) the address
// grows linearly. With circ = 1 (streaming data) it wraps at LEN, making
// the result store a circular buffer.
// The paper names the mode and says it is linear for stored data and
// circular for streaming data. The counter structure is this design's own.
module agu_divide #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              en,
  input  logic [ADDR_W-1:0] m,      // divisor M (>= 1)
  input  logic [ADDR_W-1:0] len,    // circular buffer length (circ = 1)
  input  logic              circ,
  output logic [ADDR_W-1:0] off,
  output logic              wr
);
  logic [ADDR_W-1:0] sub_cnt, nxt;

  assign wr  = (sub_cnt == m - ADDR_W'(1));
  assign nxt = (circ && off == len - ADDR_W'(1)) ? '0 : off + ADDR_W'(1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    sub_cnt <= '0;
    else if (init) sub_cnt <= '0;
    else if (en)   sub_cnt <= wr ? '0 : sub_cnt + ADDR_W'(1);
  end

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk(clk), .rst_n(rst_n), .init(init), .en(en && wr), .d(nxt), .q(off)
  );
endmodule
