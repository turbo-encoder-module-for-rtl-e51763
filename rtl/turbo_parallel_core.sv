// turbo_parallel_core: parallel computation method of the turbo encoder.
//
// The whole coded block is a combinational function of the K-bit MSD+CRC
// block: the interleaver permutes the block by fixed wiring, two
// rsc_block_encoder instances produce parity 1 and parity 2 with their
// termination bits, and the fields are placed in the output buffer order
// (MSD+CRC, tail1, tail2, parity1, ptail1, parity2, ptail2). A start pulse
// registers that function into cw at the next clock, and done is high for
// that one following cycle: the encoding latency is one clock.
//
// msd must be stable while start is high. rst is asynchronous, active high.
// Encoding the whole block as one function follows the described parallel
// method; the start/done interface is this design's.
module turbo_parallel_core
  import turbo_pkg::*;
#(
  parameter int unsigned K = 1148,
  localparam int unsigned N = 3 * K + 12
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         start,
  input  logic [K-1:0] msd,
  output logic [N-1:0] cw,
  output logic         done
);

  localparam int unsigned AW = $clog2(K);

  logic [K-1:0] msd_il;
  logic [K-1:0] par1, par2;
  logic [2:0]   tail1, ptail1, tail2, ptail2;
  logic [N-1:0] cw_next;
  logic [AW-1:0] unused_addr;

  turbo_interleaver #(.K(K)) u_il (
    .rd_idx ('0),
    .rd_addr(unused_addr),
    .din    (msd),
    .dout   (msd_il)
  );

  rsc_block_encoder #(.K(K)) u_enc1 (
    .x    (msd),
    .par  (par1),
    .tail (tail1),
    .ptail(ptail1)
  );

  rsc_block_encoder #(.K(K)) u_enc2 (
    .x    (msd_il),
    .par  (par2),
    .tail (tail2),
    .ptail(ptail2)
  );

  // Field order of the output buffer, index 0 sent first.
  assign cw_next = {ptail2, par2, ptail1, par1, tail2, tail1, msd};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cw   <= '0;
      done <= 1'b0;
    end else begin
      done <= start;
      if (start) cw <= cw_next;
    end
  end

endmodule
