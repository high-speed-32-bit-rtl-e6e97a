// Self-checking testbench for the ripple carry adder (rca_adder).
//
// An 8-bit instance (the size of the original example figure) is checked
// exhaustively, all 65536 operand pairs. A 32-bit instance (the default, the
// size used in the multiplier) gets corner cases, including the full-length
// carry chain FFFFFFFF + 1, and random pairs. Every result is compared with
// the integer sum {cout, sum} = a + b worked out in the testbench.
module tb_rca_adder;

  logic [7:0]  a8, b8, s8;
  logic        c8;
  logic [31:0] a32, b32, s32;
  logic        c32;
  int checks = 0, failures = 0;
  int carries = 0;

  rca_adder #(.W(8)) dut8 (.a(a8), .b(b8), .sum(s8), .cout(c8));
  rca_adder          dut32 (.a(a32), .b(b32), .sum(s32), .cout(c32));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    logic [32:0] expected;
    a32 = x;
    b32 = y;
    #1;
    expected = 33'(x) + 33'(y);
    checks++;
    if (c32) carries++;
    if ({c32, s32} != expected) begin
      failures++;
      $display("FAIL W=32 %h + %h -> %b_%h, expected %h", x, y, c32, s32, expected);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if ({c8, s8} != 9'(i + j)) begin
          failures++;
          if (failures < 10) $display("FAIL W=8 %0d + %0d -> %0d", i, j, {c8, s8});
        end
      end
    end

    check32(32'h0000_0000, 32'h0000_0000);
    check32(32'hFFFF_FFFF, 32'h0000_0001);
    check32(32'h0000_0001, 32'hFFFF_FFFF);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    check32(32'h8000_0000, 32'h8000_0000);
    check32(32'h7FFF_FFFF, 32'h0000_0001);
    check32(32'h5555_5555, 32'hAAAA_AAAA);
    check32(32'h5555_5555, 32'hAAAA_AAAB);
    for (int k = 0; k < 20000; k++) check32($urandom, $urandom);

    if (carries == 0) begin
      failures++;
      $display("FAIL no 32-bit carry out was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
