// tb_cs_subtractor: self-check of the subtractor at its default width (32).
// Random and corner operands; d is compared with (x - y) mod 2^32 and neg
// with x < y. Negative and non-negative results must both occur.
module tb_cs_subtractor;
  logic [31:0] x, y, d;
  logic        neg;
  int checks = 0, failures = 0, negs = 0, poss = 0;

  cs_subtractor dut (.x(x), .y(y), .d(d), .neg(neg));

  task automatic check(input logic [31:0] xv, input logic [31:0] yv);
    logic [31:0] exp;
    x = xv; y = yv;
    #1;
    exp = xv - yv;
    checks++;
    if (d !== exp || neg !== (xv < yv)) begin
      failures++;
      $display("FAIL %0d - %0d: got d=%0d neg=%0d exp %0d", xv, yv, d, neg, exp);
    end
    if (xv < yv) negs++; else poss++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'd0, 32'd0);
    check(32'd0, 32'd1);
    check(32'hFFFF_FFFF, 32'h0000_0000);
    check(32'h0000_0000, 32'hFFFF_FFFF);
    check(32'd769510386, 32'd763840350);
    check(32'd1234, 32'd1234);
    for (int k = 0; k < 20000; k++)
      check($urandom, $urandom);
    checks++;
    if (negs == 0 || poss == 0) begin
      failures++;
      $display("FAIL sign cases not all exercised: neg=%0d pos=%0d", negs, poss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
