// agu_me: pixel addresses for one macroblock in a slice stored row by row,
// for motion estimation by block matching (sum of absolute differences).
//
// X_Counter counts columns 0..mb_wd and Y_Counter counts rows 0..mb_ht.
// mb_wd and mb_ht are the last column and row index, so a block is
// (mb_wd+1) x (mb_ht+1) pixels. Inside a row the offset grows by 1. At the
// end of a row X_Counter clears, Y_Counter steps, and the offset grows by
// sl_wd - mb_wd to reach the first pixel of the next row. done is high on
// the last pixel (both comparators true). After it the counters and the
// offset restart at 0. One address per clock.
// The counters, comparators, correction mux and adder follow the
// paper's schematic and algorithm. Its simulation trace, with
// macroblock width 3 and slice width 16, shows offsets 0,1,2,3,16,..,51,
// which fixes mb_wd as the last index. The restart after done is this
// design's own choice.
module agu_me #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              en,
  input  logic [ADDR_W-1:0] mb_wd,  // macroblock width - 1
  input  logic [ADDR_W-1:0] mb_ht,  // macroblock height - 1
  input  logic [ADDR_W-1:0] sl_wd,  // slice width (row pitch)
  output logic [ADDR_W-1:0] off,
  output logic              done
);
  logic [ADDR_W-1:0] xcnt, ycnt, correction, nxt;
  logic              row_end;

  assign row_end    = (xcnt == mb_wd);
  assign done       = row_end && (ycnt == mb_ht);
  assign correction = row_end ? (sl_wd - mb_wd) : ADDR_W'(1);

  bf_br_add_sub #(.W(ADDR_W)) u_add (
    .a(off), .b(correction), .bf_br_bar(1'b1), .add_bar_sub(1'b0), .y(nxt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xcnt <= '0;
      ycnt <= '0;
    end else if (init || (en && done)) begin
      xcnt <= '0;
      ycnt <= '0;
    end else if (en) begin
      if (row_end) begin
        xcnt <= '0;
        ycnt <= ycnt + ADDR_W'(1);
      end else begin
        xcnt <= xcnt + ADDR_W'(1);
      end
    end
  end

  offset_addr_reg #(.W(ADDR_W)) u_off (
    .clk(clk), .rst_n(rst_n), .init(init || (en && done)), .en(en), .d(nxt), .q(off)
  );
endmodule
