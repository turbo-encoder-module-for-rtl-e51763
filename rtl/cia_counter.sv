// cia_counter: WIDTH-bit up counter whose incrementer is the carry increment
// adder. Each clock with en = 1 the count becomes count + 1, computed by a
// carry_increment_adder with b = 0 and cin = 1; clr (synchronous) sets it to
// zero and takes priority over en. rst is the asynchronous active-high reset.
// The encoder uses these counters to step through the 1148-bit phases of the
// serial method and through the 3456 output bits. Using the carry increment
// adder for the counters is this design's reading of where the adder sits.
module cia_counter #(
  parameter int unsigned WIDTH = 12  // multiple of 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             clr,
  input  logic             en,
  output logic [WIDTH-1:0] count
);

  logic [WIDTH-1:0] inc;
  logic             unused_cout;

  carry_increment_adder #(.WIDTH(WIDTH)) u_cia (
    .a   (count),
    .b   ('0),
    .cin (1'b1),
    .sum (inc),
    .cout(unused_cout)
  );

  always_ff @(posedge clk or posedge rst) begin
    if (rst)      count <= '0;
    else if (clr) count <= '0;
    else if (en)  count <= inc;
  end

endmodule
