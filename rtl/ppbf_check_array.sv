// ppbf_check_array -- connection network 1, the M check node units and
// connection network 2 of the PPBF decoder.
//
// Connection network 1 routes the N variable-node values to the d_c inputs of
// each check node unit as given by the parity-check matrix H; each CNU
// (ppbf_cnu) computes the parity c_m; connection network 2 routes every c_m
// back to the d_v variable nodes it checks, giving cv[n] = c values of N(v_n).
// The networks are fixed wiring derived at elaboration from the quasi-cyclic
// base matrix BASE (see ppbf_pkg): block (r,b) with entry s >= 0 is the Z x Z
// circulant whose row i has its one in column (i + s) mod Z.
//
// Interface: v in; c out (the syndrome, c_m = 1 for an unsatisfied check); cv
// out, cv[n][j] being the check of the j-th non-zero block in column n / Z,
// in block-row order. Purely combinational. The code must be regular with
// column weight ppbf_pkg::DV and row weight DC.
module ppbf_check_array
  import ppbf_pkg::*;
#(
  parameter int unsigned Z  = TANNER_Z,
  parameter int unsigned MB = TANNER_MB,
  parameter int unsigned NB = TANNER_NB,
  parameter int unsigned DC = 5,
  parameter shift_t [0:MB-1][0:NB-1] BASE = TANNER_BASE
) (
  input  logic [NB*Z-1:0]         v,
  output logic [MB*Z-1:0]         c,
  output logic [NB*Z-1:0][DV-1:0] cv
);
  localparam int unsigned N = NB * Z;
  localparam int unsigned M = MB * Z;

  // Base-matrix entry (r, b) as an integer: -1 for a zero block.
  function automatic int sh(input int unsigned r, input int unsigned b);
    return int'(BASE[r][b]);
  endfunction

  // VN feeding input k of CN m (connection network 1).
  function automatic int unsigned vn_of_cn(input int unsigned m, input int unsigned k);
    int unsigned r, i, cnt;
    r = m / Z;
    i = m % Z;
    cnt = 0;
    for (int unsigned b = 0; b < NB; b++) begin
      if (sh(r, b) >= 0) begin
        if (cnt == k) return b * Z + (i + sh(r, b)) % Z;
        cnt++;
      end
    end
    return 0;
  endfunction

  // CN feeding input j of VN n (connection network 2).
  function automatic int unsigned cn_of_vn(input int unsigned n, input int unsigned j);
    int unsigned b, col, cnt;
    b = n / Z;
    col = n % Z;
    cnt = 0;
    for (int unsigned r = 0; r < MB; r++) begin
      if (sh(r, b) >= 0) begin
        if (cnt == j) return r * Z + (col + Z - sh(r, b) % Z) % Z;
        cnt++;
      end
    end
    return 0;
  endfunction

  function automatic bit is_regular();
    for (int unsigned r = 0; r < MB; r++) begin
      int unsigned w;
      w = 0;
      for (int unsigned b = 0; b < NB; b++) if (sh(r, b) >= 0) w++;
      if (w != DC) return 1'b0;
    end
    for (int unsigned b = 0; b < NB; b++) begin
      int unsigned w;
      w = 0;
      for (int unsigned r = 0; r < MB; r++) if (sh(r, b) >= 0) w++;
      if (w != DV) return 1'b0;
    end
    return 1'b1;
  endfunction

  if (!is_regular()) begin : g_bad_code
    $error("ppbf_check_array: BASE must have column weight DV and row weight DC");
  end

  for (genvar m = 0; m < M; m++) begin : g_cn
    logic [DC-1:0] vin;
    for (genvar k = 0; k < DC; k++) begin : g_in
      localparam int unsigned VN = vn_of_cn(m, k);
      assign vin[k] = v[VN];
    end
    ppbf_cnu #(.DC(DC)) u_cnu (.v(vin), .c(c[m]));
  end

  for (genvar n = 0; n < N; n++) begin : g_vn
    for (genvar j = 0; j < DV; j++) begin : g_out
      localparam int unsigned CN = cn_of_vn(n, j);
      assign cv[n][j] = c[CN];
    end
  end
endmodule
