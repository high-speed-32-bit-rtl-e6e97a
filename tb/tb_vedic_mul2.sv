// Self-checking testbench for the 2x2 Vedic cell: all 16 operand pairs,
// compared with the integer product.
module tb_vedic_mul2;

  logic [1:0] a, b;
  logic [3:0] s;
  int checks = 0, failures = 0;

  vedic_mul2 dut (.a(a), .b(b), .s(s));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (s != 4'(a) * 4'(b)) begin
        failures++;
        $display("FAIL %0d*%0d -> %0d", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
