// rsc_block_encoder: the constituent encoder unrolled over a whole block.
//
// From K input bits it computes, in one combinational pass, the K parity bits
// and the three tail (systematic termination) and three parity-tail bits,
// exactly as K steps of rsc_encoder followed by three termination steps
// would. The parallel computation method uses two of these, one on the
// MSD+CRC bits and one on the interleaved bits, so that the whole coded block
// is ready in a single clock. The logic depth grows with K (the recursion is
// a chain of K steps).
//
// x[i] is input bit i (i = 0 first in time); par[i] its parity bit;
// tail[j], ptail[j] the termination bits in time order. Computing the block
// as one function follows the described parallel method; par[0] always
// equals x[0] because the register starts at zero.
module rsc_block_encoder
  import turbo_pkg::*;
#(
  parameter int unsigned K = 1148
) (
  input  logic [K-1:0] x,
  output logic [K-1:0] par,
  output logic [2:0]   tail,
  output logic [2:0]   ptail
);

  always_comb begin
    rsc_state_t s;
    rsc_step_t  r;
    s = '0;
    par = '0;
    tail = '0;
    ptail = '0;
    for (int unsigned i = 0; i < K; i++) begin
      r = rsc_step(s, x[i], 1'b0);
      par[i] = r.z;
      s = r.next;
    end
    for (int unsigned j = 0; j < 3; j++) begin
      r = rsc_step(s, 1'b0, 1'b1);
      tail[j]  = r.x;
      ptail[j] = r.z;
      s = r.next;
    end
  end

endmodule
