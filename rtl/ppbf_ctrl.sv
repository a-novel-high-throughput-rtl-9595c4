// ppbf_ctrl -- iteration controller of the PPBF decoder.
//
// Starts a decoding on start (accepted only while idle), then lets one
// decoding iteration happen per clock until either every parity check is
// satisfied (syndrome all zero) or K iterations have been done, as the
// algorithm's stopping rule says. The syndrome is checked before every
// iteration, including the first, so a received word that is already a
// codeword finishes after zero iterations. The two-state machine, the handshake
// and K = 300 are this design's choices (the iteration limit is left open);
// K = 300 brings the simulated frame error rate of the Tanner code close to the
// published curve, where K = 100 left it about four times higher.
//
// Timing: start sampled at edge t loads the frame (load = 1 in that cycle);
// iterations happen at edges t+1 .. t+k; at edge t+k+1 the controller returns to
// idle and done is high for the one cycle after it, with success (syndrome was
// zero) and iterations = k valid while done is high and held until the next
// start. Registers: state, the iteration counter, done and success.
module ppbf_ctrl
  import ppbf_pkg::*;
#(
  parameter int unsigned M  = 93,
  parameter int unsigned K  = 300,
  localparam int unsigned KW = $clog2(K + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [M-1:0]  syndrome,
  output logic          ready,
  output logic          load,
  output logic          iterate,
  output logic          done,
  output logic          success,
  output logic [KW-1:0] iterations
);
  ppbf_state_t  state;
  logic [KW-1:0] k;
  logic          all_sat, finish;

  always_comb begin
    all_sat = ~|syndrome;
    finish  = (state == ST_RUN) && (all_sat || k == KW'(K));
    ready   = (state == ST_IDLE);
    load    = ready && start;
    iterate = (state == ST_RUN) && !finish;
  end

  // The counter stops when the frame ends and is cleared only by the next
  // load, so it doubles as the iteration-count output.
  assign iterations = k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= ST_IDLE;
      k          <= '0;
      done       <= 1'b0;
      success    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (load) begin
        state <= ST_RUN;
        k     <= '0;
      end else if (finish) begin
        state      <= ST_IDLE;
        done       <= 1'b1;
        success    <= all_sat;
      end else if (iterate) begin
        k <= k + 1'b1;
      end
    end
  end

  // The iteration count never passes the limit.
  a_k_bound: assert property (@(posedge clk) disable iff (!rst_n) k <= KW'(K));
endmodule
