// agu_fft_data: operand addresses for all butterflies of an in-place
// radix-2 N-point FFT (N = 2**log2n), one address per clock.
//
// Stage s (s = 0 .. log2n-1) pairs addresses that differ only in bit s.
// Two shift registers hold the stage pattern, as in the paper:
//   span   = 00..00100..00  (a single one at bit s)
//   himask = 11..1100..00   (ones above bit s)
// Both shift left by one after each stage, so only two bits of each change.
// The offset register holds the upper operand address, which has bit s = 0.
// Each butterfly puts out the upper address and then upper | span. The
// next upper address is ((upper | span) + 1) & ~span: an increment that
// skips bit s. A stage ends when every address bit but bit s is one. The
// whole FFT ends when himask has no ones left inside the N-bit range.
// The FFT takes N*log2(N) addresses. last is high with the final address.
// After it the generator starts over at stage 0.
//
// The two shift registers and the N*log2(N) count come from the paper.
// It does not spell out how the addresses are built from the registers.
// The skip-increment used here is this design's own.
// Addresses suit a decimation-in-time FFT whose input was loaded in
// bit-reversed order (see agu_bitrev).
module agu_fft_data #(
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
  logic [ADDR_W-1:0] span, himask, upper, nmask, inc;
  logic              phase;          // 0: upper operand out, 1: lower operand out
  logic              stage_end, fft_end;

  assign nmask = (ADDR_W'(1) << (log2n - 1) << 1) - ADDR_W'(1);

  bf_br_add_sub #(.W(ADDR_W)) u_add (
    .a(upper | span), .b(ADDR_W'(1)), .bf_br_bar(1'b1), .add_bar_sub(1'b0), .y(inc)
  );

  assign stage_end = ((upper | span | ~nmask) == '1);
  assign fft_end   = ((himask & nmask) == '0);
  assign off       = phase ? (upper | span) : upper;
  assign last      = phase && stage_end && fft_end;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      span   <= ADDR_W'(1);
      himask <= ~ADDR_W'(1);
      upper  <= '0;
      phase  <= 1'b0;
    end else if (init) begin
      span   <= ADDR_W'(1);
      himask <= ~ADDR_W'(1);
      upper  <= '0;
      phase  <= 1'b0;
    end else if (en) begin
      phase <= ~phase;
      if (phase) begin
        if (stage_end) begin
          upper <= '0;
          if (fft_end) begin
            span   <= ADDR_W'(1);
            himask <= ~ADDR_W'(1);
          end else begin
            span   <= span << 1;
            himask <= himask << 1;
          end
        end else begin
          upper <= inc & ~span;
        end
      end
    end
  end
endmodule
