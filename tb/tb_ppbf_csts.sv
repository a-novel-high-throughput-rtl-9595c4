// tb_ppbf_csts -- checks the truncated random ring R^t: the reset content has
// a density of ones near 0.1, each shift rotates the ring by one position
// (bit i moves to i+1, the last bit wraps to 0), S shifts restore the content,
// hold keeps it, and load replaces it (load beats shift).
module tb_ppbf_csts;
  localparam int S = 155;
  logic         clk = 0, rst_n = 0, load = 0, shift = 0;
  logic [S-1:0] load_data = '0, rt, ref_q, init_q;
  int checks = 0, failures = 0, cycles = 0;

  ppbf_csts #(.S(S)) dut (.clk(clk), .rst_n(rst_n), .load(load), .load_data(load_data),
                          .shift(shift), .rt(rt));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic check(string what);
    checks++;
    if (rt !== ref_q) begin
      failures++;
      $display("FAIL %s: rt=%h expected %h", what, rt, ref_q);
    end
  endtask

  initial begin
    int ones;
    #12 rst_n = 1;
    init_q = rt;
    ones = $countones(rt);
    checks++;
    if (ones < S / 20 || ones > S / 5) begin
      failures++;
      $display("FAIL reset content has %0d ones of %0d", ones, S);
    end
    ref_q = init_q;
    // rotate S times, checking every step
    for (int i = 0; i < S; i++) begin
      @(negedge clk) shift = 1;
      @(posedge clk) #1;
      ref_q = {ref_q[S-2:0], ref_q[S-1]};
      check("shift");
    end
    checks++;
    if (rt !== init_q) begin failures++; $display("FAIL S shifts did not restore"); end
    // hold
    @(negedge clk) shift = 0;
    repeat (3) @(posedge clk);
    #1 check("hold");
    // load beats shift
    @(negedge clk) begin
      load = 1; shift = 1;
      for (int w = 0; w < S; w++) load_data[w] = 1'($urandom);
    end
    @(posedge clk) #1;
    ref_q = load_data;
    check("load");
    @(negedge clk) load = 0;
    @(posedge clk) #1;
    ref_q = {ref_q[S-2:0], ref_q[S-1]};
    check("shift after load");
    // reset restores the built-in content
    @(negedge clk) rst_n = 0;
    #1 ref_q = init_q;
    check("reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
