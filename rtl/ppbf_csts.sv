// ppbf_csts -- Cyclic Shift Truncated Sequence register R^t.
//
// A ring of S flip-flops holding pre-generated random bits that are 1 with
// probability about 0.1. Every decoding iteration (shift = 1) the ring rotates
// by one position, R^t[i+1] <= R^t[i] and R^t[0] <= R^t[S-1], so that the same
// S bits reach the probability controlling units at different places from one
// iteration to the next. The short ring (S < N) and its rotation per iteration
// follow the decoder description; the reset content (an elaboration-time hash,
// see ppbf_pkg::rt_init_bit) and the parallel load port are this design's
// choices, the load letting a system replace the sequence at run time.
//
// Interface: rst_n (asynchronous, active low) restores the built-in sequence;
// load writes load_data in one cycle and has priority over shift; rt is the
// register content. One clock per rotation.
module ppbf_csts
  import ppbf_pkg::*;
#(
  parameter int unsigned S    = 155,
  parameter int unsigned SEED = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [S-1:0] load_data,
  input  logic         shift,
  output logic [S-1:0] rt
);
  function automatic logic [S-1:0] init_seq();
    logic [S-1:0] q;
    for (int unsigned i = 0; i < S; i++) q[i] = rt_init_bit(SEED, i);
    return q;
  endfunction

  localparam logic [S-1:0] RT_INIT = init_seq();

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rt <= RT_INIT;
    else if (load)  rt <= load_data;
    else if (shift) rt <= {rt[S-2:0], rt[S-1]};
  end
endmodule
