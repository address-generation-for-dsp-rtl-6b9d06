// sad_datapath: sum of absolute differences of two pixel streams, one
// pixel pair per clock (the cost function of block-matching motion
// estimation).
//
// A comparator (c < r) steers two swap multiplexers so that the
// subtractor always takes the larger minus the smaller pixel. The
// difference goes to an adder whose other input is the accumulator, or
// zero while clr_acc is high. So clr_acc starts a new sum with the current
// pair rather than wiping it. The accumulator loads on clocks with en
// high. larger, smaller and absdiff are the combinational values of the
// current pair; acc is registered (one clock of latency).
// Structure from the paper's SAD datapath figure. The accumulator
// width and the enable are this design's own choices.
module sad_datapath #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned ACC_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic              clr_acc,
  input  logic [DATA_W-1:0] c,        // current-frame pixel C_ij
  input  logic [DATA_W-1:0] r,        // reference-frame pixel R_ij
  output logic [DATA_W-1:0] larger,
  output logic [DATA_W-1:0] smaller,
  output logic [DATA_W-1:0] absdiff,
  output logic [ACC_W-1:0]  acc
);
  logic              c_lt_r;
  logic [ACC_W-1:0]  acc_in;

  assign c_lt_r  = (c < r);
  assign larger  = c_lt_r ? r : c;
  assign smaller = c_lt_r ? c : r;
  assign absdiff = larger - smaller;
  assign acc_in  = clr_acc ? '0 : acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= acc_in + ACC_W'(absdiff);
  end
endmodule
