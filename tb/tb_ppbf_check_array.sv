// tb_ppbf_check_array -- checks connection network 1, the check node units and
// connection network 2 for the (155,64) Tanner code. The reference H is built
// here from the code's definition (block (j,l) is the 31 x 31 circulant
// permutation with shift 5^j * 2^l mod 31) rather than from the design's table;
// for random VN words the syndrome and every VN's three check values are
// compared, and H must have 3 ones per column and 5 per row.
module tb_ppbf_check_array;
  localparam int Z = 31, MB = 3, NB = 5, N = 155, M = 93;
  logic [N-1:0]        v;
  logic [M-1:0]        c;
  logic [N-1:0][2:0]   cv;
  bit                  h [M][N];
  int checks = 0, failures = 0;

  ppbf_check_array dut (.v(v), .c(c), .cv(cv));

  function automatic int powmod(int base, int e, int md);
    int r = 1;
    for (int i = 0; i < e; i++) r = (r * base) % md;
    return r;
  endfunction

  initial begin
    for (int m = 0; m < M; m++) for (int n = 0; n < N; n++) h[m][n] = 0;
    for (int j = 0; j < MB; j++)
      for (int l = 0; l < NB; l++) begin
        int s;
        s = (powmod(5, j, Z) * powmod(2, l, Z)) % Z;
        for (int i = 0; i < Z; i++) h[j*Z + i][l*Z + (i + s) % Z] = 1;
      end
    for (int n = 0; n < N; n++) begin
      int w;
      w = 0;
      for (int m = 0; m < M; m++) w += int'(h[m][n]);
      checks++;
      if (w != 3) begin failures++; $display("FAIL column %0d weight %0d", n, w); end
    end
    for (int m = 0; m < M; m++) begin
      int w;
      w = 0;
      for (int n = 0; n < N; n++) w += int'(h[m][n]);
      checks++;
      if (w != 5) begin failures++; $display("FAIL row %0d weight %0d", m, w); end
    end
    for (int t = 0; t < 300; t++) begin
      bit ref_c [M];
      for (int n = 0; n < N; n++) v[n] = (t < 155) ? (n == t) : 1'($urandom);
      #1;
      for (int m = 0; m < M; m++) begin
        ref_c[m] = 0;
        for (int n = 0; n < N; n++) if (h[m][n]) ref_c[m] ^= v[n];
        checks++;
        if (c[m] !== ref_c[m]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d c[%0d]=%b expected %b", t, m, c[m], ref_c[m]);
        end
      end
      for (int n = 0; n < N; n++) begin
        int j;
        j = 0;
        for (int m = 0; m < M; m++) if (h[m][n]) begin
          checks++;
          if (cv[n][j] !== ref_c[m]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d cv[%0d][%0d]", t, n, j);
          end
          j++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
