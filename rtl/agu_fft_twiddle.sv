// agu_fft_twiddle: twiddle factor index for every butterfly of an in-place
// radix-2 N-point FFT (N = 2**log2n), in step with agu_fft_data.
//
// In stage s the twiddle index of butterfly b is (b * N/2**(s+1)) mod N/2.
// A step register starts at N/2 and shifts right by one each stage. An
// accumulator adds the step once per butterfly, masked to N/2 - 1. A
// butterfly counter marks the end of a stage (N/2 butterflies). Each index
// is held for two clocks, matching the two operand addresses that
// agu_fft_data puts out per butterfly. So both units run from the same
// enable and take N*log2(N) clocks in all. last is high during the final
// clock; afterwards the sequence restarts.
// The paper says only that such a generator exists for any N. The
// accumulator and shifter used here are this design's own, built from the
// kinds of parts the paper lists for its comprehensive unit: counters,
// shifters, an accumulator and comparators.
module agu_fft_twiddle #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init,
  input  logic              en,
  input  logic [ADDR_W-1:0] log2n,   // 1 .. ADDR_W
  output logic [ADDR_W-1:0] off,
  output logic              last
);
  logic [ADDR_W-1:0] half, step, bcnt, sum;
  logic              phase, stage_end, fft_end;

  assign half      = ADDR_W'(1) << (log2n - 1);
  assign stage_end = (bcnt == half - ADDR_W'(1));
  assign fft_end   = (step == ADDR_W'(1));
  assign last      = phase && stage_end && fft_end;

  bf_br_add_sub #(.W(ADDR_W)) u_add (
    .a(off), .b(step), .bf_br_bar(1'b1), .add_bar_sub(1'b0), .y(sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step  <= '0;
      off   <= '0;
      bcnt  <= '0;
      phase <= 1'b0;
    end else if (init) begin
      step  <= half;
      off   <= '0;
      bcnt  <= '0;
      phase <= 1'b0;
    end else if (en) begin
      phase <= ~phase;
      if (phase) begin
        if (stage_end) begin
          bcnt <= '0;
          off  <= '0;
          step <= fft_end ? half : (step >> 1);
        end else begin
          bcnt <= bcnt + ADDR_W'(1);
          off  <= sum & (half - ADDR_W'(1));
        end
      end
    end
  end
endmodule
