// tb_ppbf_decoder -- end-to-end test of the PPBF decoder at its default
// parameters: the (155,64) Tanner code, S = 155, K = 300.
//
// The testbench builds its own parity-check matrix from the code's definition
// (block (j,l) = 31 x 31 circulant permutation with shift 5^j * 2^l mod 31),
// derives a basis of the code by Gaussian elimination, and sends random
// codewords through a binary symmetric channel with a fixed number of errors.
// A cycle-accurate reference model of Algorithm PPBF (check parities, energy,
// flip with p = {0, p1, p2, p3, 1}, R^t rotation per iteration) runs beside
// the design; it uses the design's R^t reset content and cross-bar table from
// ppbf_pkg, which are design choices, and computes everything else itself.
// Every cycle v_out must match the model; at the end of each frame done must
// come exactly iterations + 1 cycles after start, with the model's iteration
// count and success flag. Low-weight error patterns must mostly be corrected
// to the sent codeword.
//
// Mechanisms counted, each must occur: a frame that is already a codeword
// (zero iterations), a frame decoded after one or more iterations, a frame
// stopped at K iterations, flips at energy 1, 2, 3 and 4, a run-time reload
// of R^t, and a start request ignored while decoding.
module tb_ppbf_decoder;
  import ppbf_pkg::*;
  localparam int Z = 31, MB = 3, NB = 5, N = 155, M = 93, S = 155, K = 300;
  localparam int KW = $clog2(K + 1);

  logic          clk = 0, rst_n = 0, start = 0, rt_load = 0;
  logic [N-1:0]  y_in = '0;
  logic [S-1:0]  rt_data = '0;
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
  int n_zero_iter = 0, n_decoded = 0, n_max_iter = 0, n_reload = 0, n_ignored = 0;
  int n_flip [5];
  int low_weight_frames = 0, low_weight_correct = 0;
  longint total_iters = 0;

  // reference code
  int vn_cn [N][3];          // the three CNs of every VN
  int cn_vn [M][5];          // the five VNs of every CN
  bit basis [$][N];          // codeword basis
  // reference decoder state
  bit ref_y [N], ref_v [N];
  bit ref_rt [S];

  function automatic int powmod(int b, int e, int md);
    int r;
    r = 1;
    for (int i = 0; i < e; i++) r = (r * b) % md;
    return r;
  endfunction

  task automatic build_code();
    bit h [M][N];
    int rowcnt [M];
    int pivcol [M];
    int rank;
    bit is_piv [N];
    for (int m = 0; m < M; m++) begin
      rowcnt[m] = 0;
      for (int n = 0; n < N; n++) h[m][n] = 0;
    end
    for (int j = 0; j < MB; j++)
      for (int l = 0; l < NB; l++) begin
        int s;
        s = (powmod(5, j, Z) * powmod(2, l, Z)) % Z;
        for (int i = 0; i < Z; i++) begin
          int m, n;
          m = j * Z + i;
          n = l * Z + (i + s) % Z;
          h[m][n] = 1;
          vn_cn[n][j] = m;
          cn_vn[m][rowcnt[m]] = n;
          rowcnt[m]++;
        end
      end
    // reduced row echelon form over GF(2)
    rank = 0;
    for (int n = 0; n < N; n++) is_piv[n] = 0;
    for (int col = 0; col < N && rank < M; col++) begin
      int pr;
      pr = -1;
      for (int r = rank; r < M; r++) if (h[r][col]) begin pr = r; break; end
      if (pr < 0) continue;
      if (pr != rank) for (int c = 0; c < N; c++) begin
        bit t;
        t = h[pr][c]; h[pr][c] = h[rank][c]; h[rank][c] = t;
      end
      for (int r = 0; r < M; r++) if (r != rank && h[r][col])
        for (int c = 0; c < N; c++) h[r][c] ^= h[rank][c];
      pivcol[rank] = col;
      is_piv[col] = 1;
      rank++;
    end
    // one basis vector per free column
    for (int f = 0; f < N; f++) if (!is_piv[f]) begin
      bit b [N];
      for (int n = 0; n < N; n++) b[n] = 0;
      b[f] = 1;
      for (int r = 0; r < rank; r++) b[pivcol[r]] = h[r][f];
      basis.push_back(b);
    end
    $display("code: rank %0d, dimension %0d", rank, basis.size());
    checks++;
    if (basis.size() != 64) begin failures++; $display("FAIL code dimension %0d", basis.size()); end
  endtask

  function automatic bit ref_check(int m);
    bit c;
    c = 0;
    for (int i = 0; i < 5; i++) c ^= ref_v[cn_vn[m][i]];
    return c;
  endfunction

  function automatic bit ref_syndrome_zero();
    for (int m = 0; m < M; m++) if (ref_check(m)) return 0;
    return 1;
  endfunction

  // one iteration of the reference model
  task automatic ref_iterate();
    bit flip [N];
    for (int n = 0; n < N; n++) begin
      int e;
      bit p1, p2, p3;
      e = int'(ref_v[n] ^ ref_y[n]);
      for (int j = 0; j < 3; j++) e += int'(ref_check(vn_cn[n][j]));
      p1 = ref_rt[xbar_tap(S, n, 0)] & ref_rt[xbar_tap(S, n, 1)];
      p2 = ref_rt[xbar_tap(S, n, 2)];
      p3 = !ref_rt[xbar_tap(S, n, 3)];
      case (e)
        0: flip[n] = 0;
        1: flip[n] = p1;
        2: flip[n] = p2;
        3: flip[n] = p3;
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

  // Decode one frame: codeword x with nerr channel errors.
  task automatic run_frame(int nerr, bit poke_start);
    bit x [N];
    int k, n_cyc, exp_k;
    bit exp_ok;
    for (int n = 0; n < N; n++) x[n] = 0;
    foreach (basis[i]) if ($urandom_range(1)) for (int n = 0; n < N; n++) x[n] ^= basis[i][n];
    @(negedge clk);
    while (!ready) @(negedge clk);
    for (int n = 0; n < N; n++) y_in[n] = x[n];
    for (int e = 0; e < nerr; e++) begin
      int pos;
      do pos = $urandom_range(N - 1); while (y_in[pos] != x[pos]);
      y_in[pos] = ~y_in[pos];
    end
    start = 1;
    @(posedge clk) #1;
    for (int n = 0; n < N; n++) begin ref_y[n] = y_in[n]; ref_v[n] = y_in[n]; end
    compare_v("load");
    k = 0;
    n_cyc = 0;
    @(negedge clk) begin
      start = poke_start;          // a start while busy must be ignored
      y_in  = ~y_in;
    end
    forever begin
      if (ref_syndrome_zero() || k == K) break;
      ref_iterate();
      k++;
      @(posedge clk) #1;
      n_cyc++;
      compare_v("iteration");
      checks++;
      if (done) begin failures++; $display("FAIL done early at iteration %0d", k); break; end
      if (k == 3) start = 0;
    end
    start = 0;
    if (poke_start) n_ignored++;
    @(posedge clk) #1;
    n_cyc++;
    exp_k  = k;
    exp_ok = ref_syndrome_zero();
    checks += 4;
    if (!done) begin failures++; $display("FAIL done missing after %0d cycles", n_cyc); end
    if (int'(iterations) != exp_k) begin failures++; $display("FAIL iterations %0d expected %0d", iterations, exp_k); end
    if (success !== exp_ok) begin failures++; $display("FAIL success %b expected %b", success, exp_ok); end
    if (n_cyc != exp_k + 1) begin failures++; $display("FAIL done %0d cycles after start, expected %0d", n_cyc, exp_k + 1); end
    compare_v("done");
    if (exp_k == 0) n_zero_iter++;
    else if (exp_ok) n_decoded++;
    if (!exp_ok) n_max_iter++;
    total_iters += exp_k;
    if (nerr >= 1 && nerr <= 4) begin
      bit same;
      same = 1;
      for (int n = 0; n < N; n++) if (v_out[n] !== x[n]) same = 0;
      low_weight_frames++;
      if (same && success) low_weight_correct++;
    end
  endtask

  task automatic reload_rt();
    @(negedge clk);
    while (!ready) @(negedge clk);
    for (int i = 0; i < S; i++) rt_data[i] = ($urandom_range(9) == 0);
    rt_load = 1;
    @(posedge clk) #1;
    for (int i = 0; i < S; i++) ref_rt[i] = rt_data[i];
    @(negedge clk) rt_load = 0;
    n_reload++;
  endtask

  initial begin
    foreach (n_flip[e]) n_flip[e] = 0;
    build_code();
    for (int i = 0; i < S; i++) ref_rt[i] = rt_init_bit(1, i);
    #22 rst_n = 1;
    run_frame(0, 0);
    run_frame(0, 0);
    for (int f = 0; f < 40; f++) run_frame(1 + f % 4, f % 7 == 3);
    reload_rt();
    for (int f = 0; f < 10; f++) run_frame(5 + f % 4, 0);
    for (int f = 0; f < 3; f++) run_frame(40, f == 1);
    reload_rt();
    for (int f = 0; f < 5; f++) run_frame(3, 0);
    $display("frames: zero-iteration %0d, decoded %0d, stopped at K %0d; iterations total %0d",
             n_zero_iter, n_decoded, n_max_iter, total_iters);
    $display("flips at energy 1..4: %0d %0d %0d %0d; R^t reloads %0d; ignored starts %0d",
             n_flip[1], n_flip[2], n_flip[3], n_flip[4], n_reload, n_ignored);
    $display("low-weight (1..4 errors) frames corrected: %0d of %0d", low_weight_correct, low_weight_frames);
    checks += 10;
    if (n_zero_iter == 0) begin failures++; $display("FAIL no zero-iteration frame"); end
    if (n_decoded == 0)   begin failures++; $display("FAIL no frame decoded by iterating"); end
    if (n_max_iter == 0)  begin failures++; $display("FAIL no frame stopped at K"); end
    for (int e = 1; e <= 4; e++)
      if (n_flip[e] == 0) begin failures++; $display("FAIL no flip at energy %0d", e); end
    if (n_reload == 0)    begin failures++; $display("FAIL no R^t reload"); end
    if (n_ignored == 0)   begin failures++; $display("FAIL no start ignored while busy"); end
    if (low_weight_correct * 10 < low_weight_frames * 9) begin
      failures++;
      $display("FAIL too few low-weight frames corrected");
    end
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
