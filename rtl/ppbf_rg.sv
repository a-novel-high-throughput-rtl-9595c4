// ppbf_rg -- probabilistic signal generator (RG) of the PPBF decoder.
//
// One short random ring R^t of S bits (ppbf_csts) feeds N probability
// controlling units (ppbf_pcu), one per variable node, through a fixed
// cross-bar. The cross-bar is wiring only: PCU n, tap t reads R^t position
// ppbf_pkg::xbar_tap(S, n, t), a hashed, "random-looking" but fixed choice.
// Because R^t rotates once per iteration, each VN sees fresh bits every
// iteration. The structure (one ring, a cross-bar, one PCU per VN) follows the
// decoder description; the particular wiring pattern is this design's choice.
//
// Interface: shift rotates R^t (asserted for each decoding iteration);
// rt_load/rt_data replace the sequence; p[n][1..3] are VN n's flip-probability
// signals for the current iteration; rt exposes the ring. The p outputs are
// combinational from the ring register.
module ppbf_rg
  import ppbf_pkg::*;
#(
  parameter int unsigned N    = 155,
  parameter int unsigned S    = 155,
  parameter int unsigned SEED = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic             rt_load,
  input  logic [S-1:0]     rt_data,
  output logic [S-1:0]     rt,
  output logic [N-1:0][3:1] p
);
  ppbf_csts #(.S(S), .SEED(SEED)) u_csts (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (rt_load),
    .load_data(rt_data),
    .shift    (shift),
    .rt       (rt)
  );

  for (genvar n = 0; n < N; n++) begin : g_pcu
    logic [PCU_TAPS-1:0] taps;
    for (genvar t = 0; t < PCU_TAPS; t++) begin : g_tap
      localparam int unsigned POS = xbar_tap(S, n, t);
      assign taps[t] = rt[POS];
    end
    ppbf_pcu u_pcu (.r(taps), .p(p[n]));
  end
endmodule
