// turbo_pkg: constants and functions shared by the turbo encoder modules.
//
// The encoder is the rate-1/3 parallel concatenated convolutional code of
// 3GPP: two identical 8-state recursive systematic constituent encoders, the
// second fed through the 3GPP internal interleaver. The MSD+CRC block is
// K = 1148 bits, and with the 12 tail bits the coded block is 3*K+12 = 3456.
//
// Constituent encoder (3GPP TS 25.212; one passage of the description this
// design follows lists g0 and g1 exchanged, the schematic and 3GPP agree):
//   feedback  g0(D) = 1 + D^2 + D^3   fb = s2 ^ s3
//   forward   g1(D) = 1 + D   + D^3   z  = w ^ s1 ^ s3,  w = x ^ fb
// State s = {s1,s2,s3} with s1 the first delay. During termination the input
// is switched to the feedback, so w = 0 and the register empties in 3 steps.
//
// Coded block order (index 0 is sent first), after the output buffer format:
//   MSD+CRC (K) | tail1 (3) | tail2 (3) | parity1 (K) | ptail1 (3) |
//   parity2 (K) | ptail2 (3)
// tail1/ptail1 are the systematic and parity termination bits of encoder 1,
// tail2/ptail2 those of encoder 2, each triple in time order.
package turbo_pkg;

  localparam int unsigned K_MSD   = 1148;  // MSD + CRC bits per block
  localparam int unsigned N_TAIL  = 12;    // tail bits per coded block

  // Number of coded bits for a block of k input bits.
  function automatic int unsigned coded_len(int unsigned k);
    return 3 * k + N_TAIL;
  endfunction

  // Offsets of the fields of the coded block (MSD+CRC starts at 0).
  function automatic int unsigned off_tail1 (int unsigned k); return k;           endfunction
  function automatic int unsigned off_tail2 (int unsigned k); return k + 3;       endfunction
  function automatic int unsigned off_par1  (int unsigned k); return k + 6;       endfunction
  function automatic int unsigned off_ptail1(int unsigned k); return 2 * k + 6;   endfunction
  function automatic int unsigned off_par2  (int unsigned k); return 2 * k + 9;   endfunction
  function automatic int unsigned off_ptail2(int unsigned k); return 3 * k + 9;   endfunction

  typedef logic [2:0] rsc_state_t;  // {s1, s2, s3}

  typedef struct packed {
    rsc_state_t next;  // state after the step
    logic       x;     // systematic bit sent for this step
    logic       z;     // parity bit sent for this step
  } rsc_step_t;

  // One step of the constituent encoder. With term = 1 the input switch is in
  // the feedback position (trellis termination) and x_in is ignored.
  function automatic rsc_step_t rsc_step(rsc_state_t s, logic x_in, logic term);
    rsc_step_t r;
    logic fb, x, w;
    fb = s[1] ^ s[0];          // s2 ^ s3
    x  = term ? fb : x_in;
    w  = x ^ fb;
    r.x    = x;
    r.z    = w ^ s[2] ^ s[0];  // w ^ s1 ^ s3
    r.next = {w, s[2], s[1]};
    return r;
  endfunction

  // Encoding methods selected by the mode input.
  typedef enum logic {
    MODE_SERIAL   = 1'b0,
    MODE_PARALLEL = 1'b1
  } te_mode_e;

endpackage
