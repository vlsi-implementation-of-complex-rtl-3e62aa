// tb_vedic_mul8: exhaustive self-check of the 8x8 Vedic multiplier.
// Every operand pair is applied and the product is compared with the
// integer product computed in the testbench.
module tb_vedic_mul8;
  logic [7:0] a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;

  vedic_mul8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        checks++;
        if (p != 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
