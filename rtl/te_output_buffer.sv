// te_output_buffer: parallel-load, serial-out register for the coded block.
//
// load = 1 copies the N-bit coded block into the register; each later clock
// with shift = 1 moves it one place towards bit 0, so dout presents bit 0,
// 1, 2, ... of the block on successive clocks (index 0 first, which is the
// first MSD+CRC bit of the output buffer format). load has priority over
// shift. rst is asynchronous and active high. The 3456-bit buffer and its
// field order follow the described output format; sending bit 0 first is
// this design's choice.
module te_output_buffer #(
  parameter int unsigned N = 3456
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [N-1:0] data,
  input  logic         shift,
  output logic         dout
);

  logic [N-1:0] sreg;

  always_ff @(posedge clk or posedge rst) begin
    if (rst)        sreg <= '0;
    else if (load)  sreg <= data;
    else if (shift) sreg <= {1'b0, sreg[N-1:1]};
  end

  assign dout = sreg[0];

endmodule
