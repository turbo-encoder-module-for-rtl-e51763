// rsc_encoder: one 8-state recursive systematic convolutional constituent
// encoder of the turbo code, processing one bit per clock.
//
// Transfer function G(D) = [1, g1(D)/g0(D)] with feedback g0 = 1 + D^2 + D^3
// and forward g1 = 1 + D + D^3 (the 3GPP constituent code); see
// turbo_pkg::rsc_step. The three delay elements start at zero.
//
// Interface: with en = 1 the encoder takes x_in (term = 0) and presents the
// systematic bit x_out and parity bit z_out of that step combinationally, and
// the state advances at the clock edge. With term = 1 the input switch is in
// the termination position: the input becomes the feedback, x_out/z_out are
// the tail and parity-tail bits, and after three such steps the state is 0
// again. init (synchronous) clears the state before a new block.
// The structure (three delays, feedback and output taps, termination switch,
// zero initial state) follows the described 3GPP constituent encoder; the
// init/en/term control interface is this design's.
module rsc_encoder
  import turbo_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic init,
  input  logic en,
  input  logic term,
  input  logic x_in,
  output logic x_out,
  output logic z_out,
  output rsc_state_t state
);

  rsc_step_t step;

  always_comb step = rsc_step(state, x_in, term);

  assign x_out = step.x;
  assign z_out = step.z;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)       state <= '0;
    else if (init) state <= '0;
    else if (en)   state <= step.next;
  end

endmodule
