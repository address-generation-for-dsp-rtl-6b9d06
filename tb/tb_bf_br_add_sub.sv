// tb_bf_br_add_sub: self-checking testbench for bf_br_add_sub.
//
// Normal-carry add and subtract are compared with a + b and a - b for
// random operands and the edge cases. Reverse-carry add and subtract are
// compared with bit-reverse(rev(a) +/- rev(b)), computed independently.
// A final check walks 0, N/2, .. with reverse-carry adds for N = 16 and
// compares it with the bit-reversed count.
module tb_bf_br_add_sub;
  localparam int unsigned W = 8;

  logic [W-1:0] a, b, y;
  logic         bf_br_bar, add_bar_sub;
  int checks = 0, failures = 0;

  bf_br_add_sub #(.W(W)) dut (.a, .b, .bf_br_bar, .add_bar_sub, .y);

  function automatic logic [W-1:0] rev(input logic [W-1:0] x);
    for (int i = 0; i < W; i++) rev[i] = x[W-1-i];
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic one(input logic [W-1:0] aa, input logic [W-1:0] bb, input bit br, input bit sb);
    logic [W-1:0] expect_y;
    a = aa; b = bb; bf_br_bar = br; add_bar_sub = sb;
    #1;
    if (br) expect_y = sb ? aa - bb : aa + bb;
    else    expect_y = rev(sb ? rev(aa) - rev(bb) : rev(aa) + rev(bb));
    check(y == expect_y, $sformatf("a=%0h b=%0h br=%0b sub=%0b y=%0h expected %0h",
                                   aa, bb, br, sb, y, expect_y));
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] x;
    for (int br = 0; br < 2; br++)
      for (int sb = 0; sb < 2; sb++) begin
        one('0, '0, br[0], sb[0]);
        one('1, 8'h01, br[0], sb[0]);
        one(8'h80, 8'h80, br[0], sb[0]);
        one(8'h01, 8'h01, br[0], sb[0]);
        for (int i = 0; i < 300; i++) one(W'($urandom), W'($urandom), br[0], sb[0]);
      end
    // Bit-reversed walk for N = 16: step N/2 = 8, 4-bit field.
    x = '0;
    for (int k = 0; k < 16; k++) begin
      check(x == W'({k[0], k[1], k[2], k[3]}), $sformatf("walk k=%0d got %0d", k, x));
      a = x; b = 8'd8; bf_br_bar = 1'b0; add_bar_sub = 1'b0;
      #1 x = y & 8'h0f;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
