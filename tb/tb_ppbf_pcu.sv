// tb_ppbf_pcu -- exhaustive check of the probability controlling unit: for all
// 16 combinations of the four R^t taps, p1 must be the AND of taps 0 and 1, p2
// tap 2 and p3 the inverse of tap 3.
module tb_ppbf_pcu;
  logic [3:0] r;
  logic [3:1] p;
  int checks = 0, failures = 0;

  ppbf_pcu dut (.r(r), .p(p));

  initial begin
    for (int i = 0; i < 16; i++) begin
      logic [3:1] exp;
      r = 4'(i);
      #1;
      exp[1] = (i & 3) == 3;
      exp[2] = ((i >> 2) & 1) == 1;
      exp[3] = ((i >> 3) & 1) == 0;
      checks++;
      if (p !== exp) begin
        failures++;
        $display("FAIL r=%b p=%b expected %b", r, p, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
