// End-to-end testbench for vedic_mul32_top at its default size (32x32).
//
// Applies the operand pair of the original simulation waveform
// (0000000F * 0000000F = 00000000_000000E1), corner cases and random pairs,
// and checks both products, c1 (Kogge-Stone multiplier) and c2 (ripple carry
// multiplier), against the integer product a*b worked out here.
//
// The mechanisms of the 32-bit level are counted from the operands alone:
// the carry out of adder 1 (AL*BH + AH*BL >= 2^32), the carry out of adder 2
// (adder 1 did not carry but adding PLL[31:16] does), and products whose
// upper half is all ones. Each must happen at least once. The random part
// is biased towards operands with long runs of ones so the carries occur
// often.
module tb_vedic_mul32_top;

  localparam int unsigned N = 32;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] c1, c2;

  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0, n_high_ones = 0;

  vedic_mul32_top dut (.a(a), .b(b), .c1(c1), .c2(c2));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] expected;
    logic [33:0] mid;
    a = x;
    b = y;
    #1;
    expected = 64'(x) * 64'(y);
    mid = 34'(64'(x[15:0]) * 64'(y[31:16])) + 34'(64'(x[31:16]) * 64'(y[15:0]));
    if (mid[32]) n_ca1++;
    else if (mid + 34'((64'(x[15:0]) * 64'(y[15:0])) >> 16) >= 34'h1_0000_0000) n_ca2++;
    if (expected[63:32] == 32'hFFFF_FFFE || expected[63:48] == 16'hFFFF) n_high_ones++;
    checks++;
    if (c1 !== expected) begin
      failures++;
      if (failures < 20) $display("FAIL multiplier-1 %h*%h: got %h expected %h", x, y, c1, expected);
    end
    checks++;
    if (c2 !== expected) begin
      failures++;
      if (failures < 20) $display("FAIL multiplier-2 %h*%h: got %h expected %h", x, y, c2, expected);
    end
  endtask

  // random word with runs of ones: OR of a random word with a random mask
  function automatic logic [31:0] dense();
    return $urandom | ($urandom & $urandom) | {16'hFFFF, 16'h0} >> ($urandom % 17);
  endfunction

  initial begin
    check(32'h0000_000F, 32'h0000_000F);
    if (c1 != 64'h0000_0000_0000_00E1) begin
      failures++;
      $display("FAIL waveform example: got %h", c1);
    end
    checks++;
    check(32'h0000_0000, 32'h0000_0000);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check(32'hFFFF_FFFF, 32'h0002_FFFF);
    check(32'h0002_FFFF, 32'hFFFF_FFFF);
    check(32'hFFFF_FFFF, 32'h0000_0001);
    check(32'h8000_0000, 32'h0000_0002);
    check(32'h1234_5678, 32'h9ABC_DEF0);
    for (int k = 0; k < 50000; k++) check($urandom, $urandom);
    for (int k = 0; k < 50000; k++) check(dense(), dense());

    $display("adder-1 carry %0d, adder-2 carry %0d, near-full products %0d",
             n_ca1, n_ca2, n_high_ones);
    if (n_ca1 == 0) begin failures++; $display("FAIL adder-1 carry never exercised"); end
    if (n_ca2 == 0) begin failures++; $display("FAIL adder-2 carry never exercised"); end
    if (n_high_ones == 0) begin failures++; $display("FAIL no near-full product"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
