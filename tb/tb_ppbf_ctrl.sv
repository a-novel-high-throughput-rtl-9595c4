// tb_ppbf_ctrl -- checks the iteration controller with a scripted syndrome:
// a frame whose syndrome is zero at once ends after zero iterations, a frame
// whose syndrome clears after j iterations ends after exactly j, a frame that
// never clears ends after K iterations with success = 0, start is ignored
// while busy, and done arrives exactly iterations + 1 cycles after the start
// edge (one iteration per clock).
module tb_ppbf_ctrl;
  localparam int M = 8, K = 12, KW = $clog2(K + 1);
  logic          clk = 0, rst_n = 0, start = 0;
  logic [M-1:0]  syndrome = '0;
  logic          ready, load, iterate, done, success;
  logic [KW-1:0] iterations;
  int checks = 0, failures = 0, cycles = 0;
  int iter_seen;

  ppbf_ctrl #(.M(M), .K(K)) dut (.clk(clk), .rst_n(rst_n), .start(start), .syndrome(syndrome),
    .ready(ready), .load(load), .iterate(iterate), .done(done), .success(success),
    .iterations(iterations));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // clear_after < 0: syndrome never clears
  task automatic run_frame(int clear_after, bit restart_while_busy);
    int n_cyc, exp_k;
    bit exp_ok;
    iter_seen = 0;
    @(negedge clk);
    checks++;
    if (!ready) begin failures++; $display("FAIL not ready before frame"); end
    start = 1;
    syndrome = (clear_after == 0) ? '0 : M'(8'h24);
    @(posedge clk);
    @(negedge clk) start = restart_while_busy;
    n_cyc = 0;
    while (!done) begin
      if (iterate) iter_seen++;
      if (load) begin failures++; $display("FAIL load while busy"); end
      @(posedge clk);
      n_cyc++;
      #1;
      if (clear_after > 0 && iter_seen == clear_after) syndrome = '0;
      #1;
      if (n_cyc > 3 * K) break;
    end
    start = 0;
    exp_k  = (clear_after < 0) ? K : clear_after;
    exp_ok = (clear_after >= 0);
    checks += 4;
    if (int'(iterations) != exp_k) begin failures++; $display("FAIL iterations %0d expected %0d", iterations, exp_k); end
    if (iter_seen != exp_k) begin failures++; $display("FAIL iterate pulses %0d expected %0d", iter_seen, exp_k); end
    if (success !== exp_ok) begin failures++; $display("FAIL success %b expected %b", success, exp_ok); end
    if (n_cyc != exp_k + 1) begin failures++; $display("FAIL done after %0d cycles expected %0d", n_cyc, exp_k + 1); end
  endtask

  initial begin
    #12 rst_n = 1;
    checks++;
    if (!ready || done) begin failures++; $display("FAIL reset state"); end
    run_frame(0, 0);
    run_frame(1, 0);
    run_frame(5, 1);
    run_frame(-1, 0);
    run_frame(K, 0);
    for (int i = 0; i < 10; i++) run_frame($urandom_range(K), 0);
    // outputs held after done
    @(posedge clk) #1;
    checks += 2;
    if (done) begin failures++; $display("FAIL done longer than one cycle"); end
    if (!ready) begin failures++; $display("FAIL not ready after done"); end
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
