// tb_ppbf_fer_tanner -- frame error rate of the PPBF decoder on the (155,64)
// Tanner code at its default parameters, at two binary-symmetric-channel
// crossover probabilities, alpha = 0.04 and 0.032.
//
// Every frame is the all-zero codeword with each bit flipped independently
// with probability alpha (the decoder treats all codewords of a linear code
// alike). A frame is in error when the decoder stops at the iteration limit
// or returns a non-zero word. The published curve for this decoder and code
// is near 1e-2 at alpha = 0.04 and near 5e-3 at alpha = 0.032; with 2000
// frames per point the test only requires the measured rate to stay below
// 4e-2 and 2e-2, and reports the measured values and the average iteration
// count. Each done must also come iterations + 1 cycles after start.
module tb_ppbf_fer_tanner;
  localparam int N = 155, K = 300, KW = $clog2(K + 1), FRAMES = 2000;

  logic          clk = 0, rst_n = 0, start = 0, rt_load = 0;
  logic [N-1:0]  y_in = '0;
  logic [154:0]  rt_data = '0;
  logic          ready, done, success;
  logic [KW-1:0] iterations;
  logic [N-1:0]  v_out;

  ppbf_decoder dut (.clk(clk), .rst_n(rst_n), .start(start), .y_in(y_in), .rt_load(rt_load),
                    .rt_data(rt_data), .ready(ready), .done(done), .success(success),
                    .iterations(iterations), .v_out(v_out));

  always #5 clk = ~clk;
  int cycles = 0;
  always @(posedge clk) cycles++;

  int checks = 0, failures = 0;

  task automatic run_point(int alpha_per_100k, real limit);
    int frame_errors, latency_errors, miscorrected;
    longint iters;
    real fer;
    frame_errors = 0;
    latency_errors = 0;
    miscorrected = 0;
    iters = 0;
    for (int f = 0; f < FRAMES; f++) begin
      int n_cyc;
      @(negedge clk);
      while (!ready) @(negedge clk);
      for (int n = 0; n < N; n++) y_in[n] = ($urandom_range(99999) < alpha_per_100k);
      start = 1;
      @(negedge clk) start = 0;
      n_cyc = 0;
      while (!done && n_cyc < K + 10) begin
        @(negedge clk);
        n_cyc++;
      end
      if (!done || n_cyc != int'(iterations) + 1) latency_errors++;  // n_cyc counts edges after the start edge
      if (!success || v_out != '0) frame_errors++;
      if (success && v_out != '0) miscorrected++;
      iters += longint'(iterations);
    end
    fer = real'(frame_errors) / FRAMES;
    $display("alpha=%0.5f: %0d frame errors (%0d to another codeword) in %0d frames, FER=%e, average iterations %0.2f",
             alpha_per_100k / 100000.0, frame_errors, miscorrected, FRAMES, fer, real'(iters) / FRAMES);
    checks += 2;
    if (latency_errors != 0) begin failures++; $display("FAIL %0d frames with wrong done latency", latency_errors); end
    if (fer >= limit) begin failures++; $display("FAIL FER %e not below %e", fer, limit); end
  endtask

  initial begin
    #22 rst_n = 1;
    run_point(4000, 4e-2);
    run_point(3200, 2e-2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 2 * FRAMES * (K + 5));
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
