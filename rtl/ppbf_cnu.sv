// ppbf_cnu -- Check Node processing Unit of the PPBF decoder.
//
// A d_c-input exclusive-OR: c_m = XOR of the d_c variable-node values that the
// check node m checks (equation 1 of the algorithm). c_m = 1 means the parity
// check is unsatisfied. Purely combinational; follows the decoder description.
module ppbf_cnu #(
  parameter int unsigned DC = 5
) (
  input  logic [DC-1:0] v,
  output logic          c
);
  always_comb c = ^v;
endmodule
