// msd_input_buffer: serial-in, parallel-out register that collects one
// MSD+CRC block of K bits, one bit per clock.
//
// Each clock with shift = 1 the register moves one place towards bit 0 and
// din enters at bit K-1, so after K shifts the first bit received is msd[0]
// and the last is msd[K-1]. The block is then held for the encoder until the
// next shift. rst is asynchronous and active high and clears the register.
// Reading the block bit by bit into a register follows the described method;
// the bit order is this design's choice.
module msd_input_buffer #(
  parameter int unsigned K = 1148
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         shift,
  input  logic         din,
  output logic [K-1:0] msd
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        msd <= '0;
    else if (shift) msd <= {din, msd[K-1:1]};
  end

endmodule
