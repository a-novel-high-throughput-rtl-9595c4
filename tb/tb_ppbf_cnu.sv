// tb_ppbf_cnu -- exhaustive check of a 5-input and a 6-input check node unit
// against a parity computed by counting ones.
module tb_ppbf_cnu;
  logic [4:0] v5;
  logic [5:0] v6;
  logic       c5, c6;
  int checks = 0, failures = 0;

  ppbf_cnu #(.DC(5)) dut5 (.v(v5), .c(c5));
  ppbf_cnu #(.DC(6)) dut6 (.v(v6), .c(c6));

  initial begin
    for (int i = 0; i < 64; i++) begin
      int ones;
      v6 = 6'(i);
      v5 = 5'(i);
      #1;
      ones = 0;
      for (int b = 0; b < 6; b++) ones += (i >> b) & 1;
      checks++;
      if (c6 !== 1'(ones % 2)) begin failures++; $display("FAIL dc6 v=%b c=%b", v6, c6); end
      if (i < 32) begin
        checks++;
        if (c5 !== 1'(ones % 2)) begin failures++; $display("FAIL dc5 v=%b c=%b", v5, c5); end
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
