// rca4: 4-bit ripple carry adder, the building block of the carry increment
// adder. Four full adders are chained from bit 0 to bit 3; the carry out of
// each feeds the carry in of the next. Purely combinational.
//
// Ports (names as on the block in the adder schematic): a, b are the 4-bit
// addends, cin the carry in, s the 4-bit sum and cout the carry out.
// The full adder equations (sum = a^b^c, carry = majority) are the standard
// ones; the schematic shows only the 4-bit block.
module rca4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout
);

  logic [4:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < 4; i++) begin : g_fa
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[4];

endmodule
