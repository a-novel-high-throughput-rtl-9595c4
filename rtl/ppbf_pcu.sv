// ppbf_pcu -- Probability Controlling Unit of the PPBF probabilistic signal
// generator.
//
// Turns bits of the truncated random sequence R^t, each 1 with probability
// p = 0.1, into the three flip-probability signals that one variable node unit
// selects from: p1 = p AND p (probability 0.01), p2 = p (0.1) and p3 = NOT p
// (0.9). The gate types and the probability vector {0, 0.01, 0.1, 0.9, 1}
// follow the decoder description. Taking four separate R^t taps (two for the
// AND gate, one for p2, one for the inverter) is this design's reading of the
// generator drawing; only the two AND inputs must be distinct bits.
//
// Interface: r[1:0] AND inputs, r[2] p2 source, r[3] inverter input; p[1..3]
// out. Purely combinational, no timing of its own.
module ppbf_pcu
  import ppbf_pkg::*;
(
  input  logic [PCU_TAPS-1:0] r,
  output logic [3:1]          p
);
  always_comb begin
    p[1] = r[0] & r[1];
    p[2] = r[2];
    p[3] = ~r[3];
  end
endmodule
