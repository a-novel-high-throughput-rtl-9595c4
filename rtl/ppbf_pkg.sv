// ppbf_pkg -- types, constants and elaboration-time functions shared by the
// Probabilistic Parallel Bit Flipping (PPBF) LDPC decoder.
//
// The decoder works on a regular quasi-cyclic (QC) LDPC code whose parity-check
// matrix H is an MB x NB array of Z x Z blocks. A block is either all-zero
// (base entry -1) or a circulant permutation matrix I_s (base entry s): row i of
// I_s has its single one in column (i + s) mod Z. The default base matrix is
// the (155,64) Tanner code, d_v = 3, d_c = 5, Z = 31, block (j,l) = I_{5^j*2^l
// mod 31}. The algorithm and the variable-node degree d_v = 3 follow the
// decoder description; the QC form of H and the Tanner code shifts are the
// standard published construction of that code and are this design's choice of
// how to supply H.
//
// The package also holds the two elaboration-time "random" tables of the
// probabilistic signal generator: the initial content of the truncated
// sequence R^t (bits that are 1 with probability about 0.1) and the fixed
// cross-bar wiring from R^t to the probability controlling units. Both are
// computed by a small integer hash so that nothing has to be read from a file.
package ppbf_pkg;

  // Variable-node degree this architecture is drawn for (energy is 0..DV+1).
  localparam int unsigned DV = 3;
  // Width of the energy value E_n = (v xor y) + sum of DV check values.
  localparam int unsigned EW = $clog2(DV + 2);

  // Number of R^t taps each probability controlling unit takes from the
  // cross-bar: two for the AND gate (p1), one for p2, one for the inverter (p3).
  localparam int unsigned PCU_TAPS = 4;

  // Tanner (155,64) code: 3 x 5 circulants of size 31.
  localparam int unsigned TANNER_Z  = 31;
  localparam int unsigned TANNER_MB = 3;
  localparam int unsigned TANNER_NB = 5;
  // One base-matrix entry: a circulant shift 0..Z-1, or -1 for a zero block.
  // Base matrices are packed arrays with ascending ranges, [0:MB-1][0:NB-1],
  // so that a matrix written as a literal reads row by row in index order
  // and a constant function can compute one element by element.
  typedef logic signed [15:0] shift_t;
  localparam shift_t [0:TANNER_MB-1][0:TANNER_NB-1] TANNER_BASE = '{
    '{ 1,  2,  4,  8, 16},
    '{ 5, 10, 20,  9, 18},
    '{25, 19,  7, 14, 28}
  };

  // Flip probabilities p = {p0, p1, p2, p3, p4} = {0, 0.01, 0.1, 0.9, 1} are
  // realised from one source probability p = 0.1: p1 = p AND p, p2 = p,
  // p3 = NOT p. RT_ONE_PERMILLE is the density of ones placed in R^t.
  localparam int unsigned RT_ONE_PERMILLE = 100;

  // Decoder control state.
  typedef enum logic [0:0] {
    ST_IDLE = 1'b0,
    ST_RUN  = 1'b1
  } ppbf_state_t;

  // 32-bit integer mixing function (a fixed permutation of 32-bit words).
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Initial content of R^t: bit i is 1 when a hash of (seed, i) falls below
  // RT_ONE_PERMILLE out of 1000, i.e. with probability about 0.1.
  function automatic logic rt_init_bit(input int unsigned seed, input int unsigned i);
    logic [31:0] h;
    h = mix32(mix32(seed) ^ i);
    return (h % 1000) < RT_ONE_PERMILLE;
  endfunction

  // Cross-bar wiring: R^t position feeding tap t of the PCU of VN n.
  // Taps 0 and 1 (the two AND inputs) are always different positions.
  function automatic int unsigned xbar_tap(input int unsigned s, input int unsigned n,
                                           input int unsigned t);
    int unsigned a, b;
    a = mix32(32'h9e3779b9 ^ (n * PCU_TAPS)) % s;
    if (t == 0) return a;
    if (t == 1) begin
      b = mix32(32'h85ebca6b ^ (n * PCU_TAPS + 1)) % s;
      if (b == a) b = (a + 1) % s;
      return b;
    end
    return mix32(32'hc2b2ae35 ^ (n * PCU_TAPS + t)) % s;
  endfunction

endpackage
