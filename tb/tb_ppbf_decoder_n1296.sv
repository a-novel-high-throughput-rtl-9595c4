// tb_ppbf_decoder_n1296 -- runs the PPBF decoder at the size of a rate-1/2,
// 1296-bit, (3,6)-regular code: Z = 54, 12 x 24 circulants, d_c = 6, S = 216.
//
// The parity-check matrix used here is a stand-in with the right shape: block
// column b has non-zero blocks in block rows b, b+4 and b+8 (mod 12), each with
// a shift derived from (r, b). Every frame is the all-zero codeword plus a set
// number of channel errors (the decoder treats all codewords of a linear code
// alike). A cycle-accurate reference model of the algorithm, built from the
// same base matrix by its own loops, runs beside the design: v_out must match
// it every cycle, and iterations, success and the done latency (k + 1 cycles)
// must match at the end of each frame. Zero-iteration frames, decoded frames,
// frames stopped at K and flips at every energy 1..4 must all occur. Light error patterns
// (up to 8 errors) must be corrected to the all-zero word.
module tb_ppbf_decoder_n1296;
  import ppbf_pkg::*;
  localparam int Z = 54, MB = 12, NB = 24, DC = 6, S = 216, K = 300;
  localparam int N = NB * Z, M = MB * Z;
  localparam int KW = $clog2(K + 1);
  typedef shift_t [0:MB-1][0:NB-1] base_t;

  // Built row by row: block row r holds the columns b with b = r, r-4 or r-8 (mod 12).
  function automatic base_t make_base();
    base_t bm;
    for (int r = 0; r < MB; r++) begin
      for (int b = 0; b < NB; b++) begin
        if ((r - b % MB + MB) % 4 == 0)
          bm[r][b] = shift_t'((7 * b + 13 * r + 3 * b * r) % Z);
        else
          bm[r][b] = -16'sd1;
      end
    end
    return bm;
  endfunction
  localparam base_t BM = make_base();

  logic          clk = 0, rst_n = 0, start = 0, rt_load = 0;
  logic [N-1:0]  y_in = '0;
  logic [S-1:0]  rt_data = '0;
  logic          ready, done, success;
  logic [KW-1:0] iterations;
  logic [N-1:0]  v_out;

  ppbf_decoder #(.Z(Z), .MB(MB), .NB(NB), .DC(DC), .BASE(BM), .S(S), .K(K)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .y_in(y_in), .rt_load(rt_load), .rt_data(rt_data),
    .ready(ready), .done(done), .success(success), .iterations(iterations), .v_out(v_out));

  always #5 clk = ~clk;
  int cycles = 0;
  always @(posedge clk) cycles++;

  int checks = 0, failures = 0;
  int n_zero_iter = 0, n_decoded = 0, n_max_iter = 0, n_miscorrected = 0;
  int n_flip [5];
  int vn_cn [N][3];
  int cn_vn [M][DC];
  bit ref_y [N], ref_v [N], ref_c [M];
  bit ref_rt [S];

  task automatic build_graph();
    int cnt [M];
    for (int m = 0; m < M; m++) cnt[m] = 0;
    for (int b = 0; b < NB; b++) begin
      int j;
      j = 0;
      for (int r = 0; r < MB; r++) if (int'(BM[r][b]) >= 0) begin
        for (int i = 0; i < Z; i++) begin
          int m, n;
          m = r * Z + i;
          n = b * Z + (i + int'(BM[r][b])) % Z;
          vn_cn[n][j] = m;
          cn_vn[m][cnt[m]] = n;
          cnt[m]++;
        end
        j++;
      end
    end
    for (int m = 0; m < M; m++) begin
      checks++;
      if (cnt[m] != DC) begin failures++; $display("FAIL row %0d weight %0d", m, cnt[m]); end
    end
  endtask

  function automatic bit ref_checks_zero();
    bit any;
    any = 0;
    for (int m = 0; m < M; m++) begin
      ref_c[m] = 0;
      for (int i = 0; i < DC; i++) ref_c[m] ^= ref_v[cn_vn[m][i]];
      any |= ref_c[m];
    end
    return !any;
  endfunction

  task automatic ref_iterate();
    bit flip [N];
    for (int n = 0; n < N; n++) begin
      int e;
      e = int'(ref_v[n] ^ ref_y[n]);
      for (int j = 0; j < 3; j++) e += int'(ref_c[vn_cn[n][j]]);
      case (e)
        0: flip[n] = 0;
        1: flip[n] = ref_rt[xbar_tap(S, n, 0)] & ref_rt[xbar_tap(S, n, 1)];
        2: flip[n] = ref_rt[xbar_tap(S, n, 2)];
        3: flip[n] = !ref_rt[xbar_tap(S, n, 3)];
        default: flip[n] = 1;
      endcase
      if (flip[n]) n_flip[e]++;
    end
    for (int n = 0; n < N; n++) ref_v[n] ^= flip[n];
    begin
      bit last;
      last = ref_rt[S-1];
      for (int i = S - 1; i > 0; i--) ref_rt[i] = ref_rt[i-1];
      ref_rt[0] = last;
    end
  endtask

  task automatic compare_v(string where);
    int bad;
    bad = 0;
    for (int n = 0; n < N; n++) if (v_out[n] !== ref_v[n]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      if (failures < 10) $display("FAIL %s: v_out differs from model in %0d bits", where, bad);
    end
  endtask

  task automatic run_frame(int nerr);
    int k, n_cyc;
    bit ok;
    @(negedge clk);
    while (!ready) @(negedge clk);
    y_in = '0;
    for (int e = 0; e < nerr; e++) begin
      int pos;
      do pos = $urandom_range(N - 1); while (y_in[pos]);
      y_in[pos] = 1'b1;
    end
    start = 1;
    @(posedge clk) #1;
    for (int n = 0; n < N; n++) begin ref_y[n] = y_in[n]; ref_v[n] = y_in[n]; end
    compare_v("load");
    @(negedge clk) start = 0;
    k = 0;
    n_cyc = 0;
    while (!(ref_checks_zero() || k == K)) begin
      ref_iterate();
      k++;
      @(posedge clk) #1;
      n_cyc++;
      compare_v("iteration");
    end
    ok = ref_checks_zero();
    @(posedge clk) #1;
    n_cyc++;
    checks += 4;
    if (!done) begin failures++; $display("FAIL done missing"); end
    if (int'(iterations) != k) begin failures++; $display("FAIL iterations %0d expected %0d", iterations, k); end
    if (success !== ok) begin failures++; $display("FAIL success %b expected %b", success, ok); end
    if (n_cyc != k + 1) begin failures++; $display("FAIL done after %0d cycles, expected %0d", n_cyc, k + 1); end
    if (ok && k == 0) n_zero_iter++;
    else if (ok) n_decoded++;
    else n_max_iter++;
    // The stand-in code is not designed for distance: a heavily corrupted
    // word may land on another codeword. Only light error patterns must be
    // corrected back to the sent word.
    if (ok && v_out != '0) begin
      n_miscorrected++;
      $display("frame with %0d errors decoded to another codeword (weight %0d)", nerr, $countones(v_out));
    end
    if (nerr <= 8) begin
      checks++;
      if (!ok || v_out != '0) begin failures++; $display("FAIL %0d-error frame not corrected", nerr); end
    end
  endtask

  initial begin
    foreach (n_flip[e]) n_flip[e] = 0;
    build_graph();
    for (int i = 0; i < S; i++) ref_rt[i] = rt_init_bit(1, i);
    #22 rst_n = 1;
    run_frame(0);
    for (int f = 0; f < 12; f++) run_frame(2 + 3 * f);
    run_frame(300);
    $display("frames: zero-iteration %0d, decoded %0d, stopped at K %0d, miscorrected %0d",
             n_zero_iter, n_decoded, n_max_iter, n_miscorrected);
    $display("flips at energy 1..4: %0d %0d %0d %0d", n_flip[1], n_flip[2], n_flip[3], n_flip[4]);
    checks += 7;
    if (n_zero_iter == 0) begin failures++; $display("FAIL no zero-iteration frame"); end
    if (n_decoded == 0)   begin failures++; $display("FAIL no frame decoded by iterating"); end
    if (n_max_iter == 0)  begin failures++; $display("FAIL no frame stopped at K"); end
    for (int e = 1; e <= 4; e++)
      if (n_flip[e] == 0) begin failures++; $display("FAIL no flip at energy %0d", e); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
