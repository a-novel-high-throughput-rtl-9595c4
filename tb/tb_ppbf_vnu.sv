// tb_ppbf_vnu -- checks the variable node unit against a reference model of
// equation 2 and the flip rule: energy = (v xor y) + number of unsatisfied
// neighbour checks; flip = 0, p1, p2, p3, 1 for energy 0..4; v toggles when
// flip is 1 and iterate is set; load sets both y and v to y_in. Random
// stimulus; every energy value is required to occur.
module tb_ppbf_vnu;
  import ppbf_pkg::*;
  logic          clk = 0, load = 0, y_in = 0, iterate = 0;
  logic [DV-1:0] cv = '0;
  logic [DV:1]   p = '0;
  logic          v, flip;
  logic [EW-1:0] energy;
  logic          ref_y, ref_v;
  int checks = 0, failures = 0, cycles = 0;
  int seen [5];

  ppbf_vnu dut (.clk(clk), .load(load), .y_in(y_in), .iterate(iterate), .cv(cv), .p(p),
                .v(v), .energy(energy), .flip(flip));

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin
    foreach (seen[e]) seen[e] = 0;
    ref_y = 0;
    ref_v = 0;
    for (int t = 0; t < 2000; t++) begin
      int e;
      logic f;
      @(negedge clk);
      load    = (t == 0) || ($urandom_range(15) == 0);
      y_in    = 1'($urandom);
      iterate = 1'($urandom_range(3) != 0);
      cv      = DV'($urandom);
      p       = DV'($urandom);
      #1;
      if (!load) begin
        e = int'(ref_v ^ ref_y) + int'(cv[0]) + int'(cv[1]) + int'(cv[2]);
        case (e)
          0: f = 1'b0;
          1: f = p[1];
          2: f = p[2];
          3: f = p[3];
          default: f = 1'b1;
        endcase
        seen[e]++;
        checks += 2;
        if (int'(energy) != e) begin failures++; $display("FAIL t=%0d energy %0d expected %0d", t, energy, e); end
        if (flip !== f) begin failures++; $display("FAIL t=%0d flip %b expected %b", t, flip, f); end
      end
      @(posedge clk) #1;
      if (load) begin
        ref_y = y_in;
        ref_v = y_in;
      end else if (iterate) begin
        ref_v = ref_v ^ f;
      end
      checks++;
      if (v !== ref_v) begin failures++; $display("FAIL t=%0d v=%b expected %b", t, v, ref_v); end
    end
    for (int e = 0; e < 5; e++) begin
      checks++;
      if (seen[e] == 0) begin failures++; $display("FAIL energy %0d never occurred", e); end
    end
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
