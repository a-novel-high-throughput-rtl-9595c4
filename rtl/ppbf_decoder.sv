// ppbf_decoder -- Probabilistic Parallel Bit Flipping (PPBF) LDPC decoder for
// the binary symmetric channel, one decoding iteration per clock cycle.
//
// PPBF decodes a hard-decision word y with a regular d_v = 3 LDPC code. Every
// iteration all M check node units compute their parities from the current
// estimate v, every variable node unit forms its energy E_n = (v_n xor y_n) +
// (number of its unsatisfied checks), 0..4, and flips v_n with probability
// p_E, p = {0, 0.01, 0.1, 0.9, 1}. There is no global maximum search: each
// VN decides alone, from its own energy and a random bit. Random bits come from
// one rotating ring R^t of S bits spread over the VNs by a fixed cross-bar.
// Decoding stops when the syndrome is zero or after K iterations.
//
// Blocks: ppbf_rg (R^t ring, cross-bar, one PCU per VN), N x ppbf_vnu,
// ppbf_check_array (connection network 1, M x ppbf_cnu, connection network 2),
// ppbf_ctrl. Defaults: the (155,64) Tanner code (Z = 31, 3 x 5 circulants,
// d_c = 5) and S = 155 as in the decoder's own evaluation of that code; K = 300
// is this design's choice.
//
// Interface: when ready, pulse start with the channel word on y_in. done pulses
// for one cycle k+1 cycles after the start edge, where k = iterations; success
// tells whether all checks were satisfied; v_out is the decoded word (valid
// from done until the next start). rt_load/rt_data replace the random ring
// (optional, must not be used while decoding). rst_n is asynchronous, active
// low.
module ppbf_decoder
  import ppbf_pkg::*;
#(
  parameter int unsigned Z    = TANNER_Z,
  parameter int unsigned MB   = TANNER_MB,
  parameter int unsigned NB   = TANNER_NB,
  parameter int unsigned DC   = 5,
  parameter shift_t [0:MB-1][0:NB-1] BASE = TANNER_BASE,
  parameter int unsigned S    = 155,
  parameter int unsigned K    = 300,
  parameter int unsigned SEED = 1,
  localparam int unsigned N   = NB * Z,
  localparam int unsigned M   = MB * Z,
  localparam int unsigned KW  = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  y_in,
  input  logic          rt_load,
  input  logic [S-1:0]  rt_data,
  output logic          ready,
  output logic          done,
  output logic          success,
  output logic [KW-1:0] iterations,
  output logic [N-1:0]  v_out
);
  logic                 load, iterate;
  logic [N-1:0][3:1]    p;
  logic [M-1:0]         syndrome;
  logic [N-1:0][DV-1:0] cv;

  ppbf_ctrl #(.M(M), .K(K)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .syndrome  (syndrome),
    .ready     (ready),
    .load      (load),
    .iterate   (iterate),
    .done      (done),
    .success   (success),
    .iterations(iterations)
  );

  ppbf_rg #(.N(N), .S(S), .SEED(SEED)) u_rg (
    .clk    (clk),
    .rst_n  (rst_n),
    .shift  (iterate),
    .rt_load(rt_load),
    .rt_data(rt_data),
    .rt     (),
    .p      (p)
  );

  for (genvar n = 0; n < N; n++) begin : g_vnu
    ppbf_vnu u_vnu (
      .clk    (clk),
      .load   (load),
      .y_in   (y_in[n]),
      .iterate(iterate),
      .cv     (cv[n]),
      .p      (p[n]),
      .v      (v_out[n]),
      .energy (),
      .flip   ()
    );
  end

  ppbf_check_array #(.Z(Z), .MB(MB), .NB(NB), .DC(DC), .BASE(BASE)) u_checks (
    .v (v_out),
    .c (syndrome),
    .cv(cv)
  );
endmodule
