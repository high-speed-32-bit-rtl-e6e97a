// Self-checking testbench for the recursive Vedic multiplier (vedic_mul).
//
// Both adder variants (Kogge-Stone and ripple carry) are instantiated at
// N = 4 and N = 8, checked exhaustively, at N = 16, and at the default
// N = 32. The 16- and 32-bit instances get corner cases and random operand
// pairs. Every product is compared with the integer product a*b worked out in
// the testbench.
//
// The directed pair A = {H ones, H ones}, B = {0...010, H ones} makes
// AL*BH + AH*BL = 2^N - 1 exactly, so the carry of adder 1 is 0 and adding
// PLL[N-1:H] to it makes adder 2 carry out: the case that needs adder 2's
// carry in adder 3. The testbench counts, from the operands alone, how
// often each of the two middle carries occurs at the 32-bit level and fails
// if either never did.
module tb_vedic_mul
  import vedic_pkg::*;
;

  logic [3:0]  a4,  b4;
  logic [7:0]  a8,  b8;
  logic [15:0] a16, b16;
  logic [31:0] a32, b32;
  logic [7:0]  s4k,  s4r;
  logic [15:0] s8k,  s8r;
  logic [31:0] s16k, s16r;
  logic [63:0] s32k, s32r;

  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0;

  vedic_mul #(.N(4),  .ADDER(ADDER_KSA)) dut4k  (.a(a4),  .b(b4),  .s(s4k));
  vedic_mul #(.N(4),  .ADDER(ADDER_RCA)) dut4r  (.a(a4),  .b(b4),  .s(s4r));
  vedic_mul #(.N(8),  .ADDER(ADDER_KSA)) dut8k  (.a(a8),  .b(b8),  .s(s8k));
  vedic_mul #(.N(8),  .ADDER(ADDER_RCA)) dut8r  (.a(a8),  .b(b8),  .s(s8r));
  vedic_mul #(.N(16), .ADDER(ADDER_KSA)) dut16k (.a(a16), .b(b16), .s(s16k));
  vedic_mul #(.N(16), .ADDER(ADDER_RCA)) dut16r (.a(a16), .b(b16), .s(s16r));
  vedic_mul                              dut32k (.a(a32), .b(b32), .s(s32k));
  vedic_mul #(.N(32), .ADDER(ADDER_RCA)) dut32r (.a(a32), .b(b32), .s(s32r));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void compare(input string what, input logic [63:0] got,
                                  input logic [63:0] expected);
    checks++;
    if (got !== expected) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, expected);
    end
  endfunction

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    logic [63:0] expected;
    a16 = x;
    b16 = y;
    #1;
    expected = 64'(x) * 64'(y);
    compare($sformatf("16 KSA %h*%h", x, y), 64'(s16k), expected);
    compare($sformatf("16 RCA %h*%h", x, y), 64'(s16r), expected);
  endtask

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] expected;
    logic [33:0] mid;
    a32 = x;
    b32 = y;
    #1;
    expected = 64'(x) * 64'(y);
    // middle carries of the 32-bit level, from the operands alone
    mid = 34'(64'(x[15:0]) * 64'(y[31:16])) + 34'(64'(x[31:16]) * 64'(y[15:0]));
    if (mid[32]) n_ca1++;
    else if (mid + 34'((64'(x[15:0]) * 64'(y[15:0])) >> 16) >= 34'h1_0000_0000) n_ca2++;
    compare($sformatf("32 KSA %h*%h", x, y), s32k, expected);
    compare($sformatf("32 RCA %h*%h", x, y), s32r, expected);
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      compare($sformatf("4 KSA %0d*%0d", a4, b4), 64'(s4k), 64'(a4) * 64'(b4));
      compare($sformatf("4 RCA %0d*%0d", a4, b4), 64'(s4r), 64'(a4) * 64'(b4));
    end
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      compare($sformatf("8 KSA %0d*%0d", a8, b8), 64'(s8k), 64'(a8) * 64'(b8));
      compare($sformatf("8 RCA %0d*%0d", a8, b8), 64'(s8r), 64'(a8) * 64'(b8));
    end

    check16(16'hFFFF, 16'hFFFF);
    check16(16'hFFFF, 16'h02FF);
    check16(16'h0000, 16'hFFFF);
    for (int k = 0; k < 5000; k++) check16(16'($urandom), 16'($urandom));

    check32(32'h0000_000F, 32'h0000_000F);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check32(32'hFFFF_FFFF, 32'h0002_FFFF);
    check32(32'h0002_FFFF, 32'hFFFF_FFFF);
    check32(32'h0000_0000, 32'hFFFF_FFFF);
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'h0001_0000, 32'h0001_0000);
    for (int k = 0; k < 20000; k++) check32($urandom, $urandom);

    $display("32-bit level: adder-1 carry %0d times, adder-2 carry %0d times", n_ca1, n_ca2);
    if (n_ca1 == 0 || n_ca2 == 0) begin
      failures++;
      $display("FAIL a middle carry of the 32-bit level was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
