// ppbf_vnu -- Variable Node processing Unit of the PPBF decoder (d_v = 3).
//
// Holds two registers, the channel bit y_n and the current estimate v_n^(k).
// Each iteration it computes the energy
//   E_n = (v_n XOR y_n) + c_1 + c_2 + c_3        (XOR1 and the summation block)
// over its three neighbouring check values, uses E_n to select the flip signal
// from {0, p1, p2, p3, 1} (multiplexer inputs 0..4), and XORs that signal into
// v_n (XOR2), so v_n flips with probability p_E. This datapath follows the
// decoder drawing and text. The load path that sets v_n^(0) = y_n together
// with y_n is this design's addition (the algorithm initialises v to y).
//
// Interface: load captures y_in into both registers; iterate performs one
// decoding iteration (load has priority); cv are the d_v check values of this
// VN; p[1..3] come from the probability controlling unit. Outputs v (register)
// and energy and flip (combinational, for observation). One iteration per
// clock; no reset is needed because load always precedes use.
module ppbf_vnu
  import ppbf_pkg::*;
(
  input  logic          clk,
  input  logic          load,
  input  logic          y_in,
  input  logic          iterate,
  input  logic [DV-1:0] cv,
  input  logic [DV:1]   p,
  output logic          v,
  output logic [EW-1:0] energy,
  output logic          flip
);
  logic y_q;

  always_comb begin
    energy = EW'(v ^ y_q);
    for (int unsigned j = 0; j < DV; j++) energy += EW'(cv[j]);
    if (energy == '0)                 flip = 1'b0;
    else if (energy >= EW'(DV + 1))   flip = 1'b1;
    else                              flip = p[energy];
  end

  always_ff @(posedge clk) begin
    if (load) begin
      y_q <= y_in;
      v   <= y_in;
    end else if (iterate) begin
      v   <= v ^ flip;
    end
  end
endmodule
