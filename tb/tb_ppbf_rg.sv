// tb_ppbf_rg -- checks the probabilistic signal generator: after every
// rotation of R^t, each PCU output must equal the gate function of the R^t
// bits that the cross-bar table names; the two AND taps of a PCU must be
// distinct positions; over S rotations the frequency of p1, p2 and p3 must be
// close to 0.01, 0.1 and 0.9; rt_load must reach the outputs.
module tb_ppbf_rg;
  import ppbf_pkg::*;
  localparam int N = 155;
  localparam int S = 155;
  logic              clk = 0, rst_n = 0, shift = 0, rt_load = 0;
  logic [S-1:0]      rt_data = '0, rt;
  logic [N-1:0][3:1] p;
  int checks = 0, failures = 0, cycles = 0;
  int cnt1 = 0, cnt2 = 0, cnt3 = 0;

  ppbf_rg #(.N(N), .S(S)) dut (.clk(clk), .rst_n(rst_n), .shift(shift), .rt_load(rt_load),
                               .rt_data(rt_data), .rt(rt), .p(p));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check_outputs(bit count);
    for (int n = 0; n < N; n++) begin
      logic [3:1] exp;
      exp[1] = rt[xbar_tap(S, n, 0)] & rt[xbar_tap(S, n, 1)];
      exp[2] = rt[xbar_tap(S, n, 2)];
      exp[3] = ~rt[xbar_tap(S, n, 3)];
      checks++;
      if (p[n] !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d p=%b expected %b", n, p[n], exp);
      end
      if (count) begin
        cnt1 += int'(p[n][1]);
        cnt2 += int'(p[n][2]);
        cnt3 += int'(p[n][3]);
      end
    end
  endtask

  initial begin
    real f1, f2, f3;
    for (int n = 0; n < N; n++) begin
      checks++;
      if (xbar_tap(S, n, 0) == xbar_tap(S, n, 1)) begin
        failures++;
        $display("FAIL PCU %0d AND taps coincide", n);
      end
    end
    #12 rst_n = 1;
    for (int i = 0; i < S; i++) begin
      #1 check_outputs(1);
      @(negedge clk) shift = 1;
      @(posedge clk);
    end
    @(negedge clk) shift = 0;
    f1 = real'(cnt1) / (N * S);
    f2 = real'(cnt2) / (N * S);
    f3 = real'(cnt3) / (N * S);
    $display("observed p1=%f p2=%f p3=%f", f1, f2, f3);
    checks += 3;
    if (f1 < 0.002 || f1 > 0.03) begin failures++; $display("FAIL p1 frequency %f", f1); end
    if (f2 < 0.05 || f2 > 0.16)  begin failures++; $display("FAIL p2 frequency %f", f2); end
    if (f3 < 0.84 || f3 > 0.95)  begin failures++; $display("FAIL p3 frequency %f", f3); end
    // run-time load of a new sequence
    @(negedge clk) begin
      rt_load = 1;
      for (int w = 0; w < S; w++) rt_data[w] = 1'($urandom_range(9) == 0);
    end
    @(posedge clk) #1;
    checks++;
    if (rt !== rt_data) begin failures++; $display("FAIL load"); end
    check_outputs(0);
    @(negedge clk) rt_load = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
