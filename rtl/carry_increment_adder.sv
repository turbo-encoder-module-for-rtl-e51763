// carry_increment_adder: WIDTH-bit carry increment adder (CIA), 8 bits by
// default, built from 4-bit ripple carry adders (rca4).
//
// The lowest rca4 adds bits [3:0] with the carry in. Every higher rca4 adds
// its 4 bits with its own carry in tied low, so all blocks add at the same
// time. A conditional increment block of half adders then adds the carry out
// of the block below to that partial sum: the half adder chain produces the
// final sum bits and an increment carry. The block's carry out is the OR of
// the rca4 carry and the increment carry (both cannot be 1 at once).
// Combinational; sum = a + b + cin, cout is the carry out of the top bit.
//
// The 8-bit organisation (two rca4, the lower one's carry driving a half
// adder increment block on the upper one) follows the adder description;
// generalising it to WIDTH/4 blocks so that the same adder can serve the
// 12-bit counters of the encoder is this design's choice.
module carry_increment_adder #(
  parameter int unsigned WIDTH = 8   // multiple of 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned NBLK = WIDTH / 4;

  logic [NBLK:0] blk_c;  // carry into each block, blk_c[NBLK] = cout

  assign blk_c[0] = cin;

  // Lowest block: plain ripple carry addition with the carry in.
  rca4 u_rca_lo (
    .a   (a[3:0]),
    .b   (b[3:0]),
    .cin (blk_c[0]),
    .s   (sum[3:0]),
    .cout(blk_c[1])
  );

  for (genvar k = 1; k < NBLK; k++) begin : g_blk
    logic [3:0] ps;     // partial sum, carry in tied low
    logic       pc;     // rca4 carry out
    logic [4:0] hc;     // half adder carry chain of the increment block

    rca4 u_rca (
      .a   (a[4*k +: 4]),
      .b   (b[4*k +: 4]),
      .cin (1'b0),
      .s   (ps),
      .cout(pc)
    );

    // Conditional increment block: half adders add blk_c[k] to ps.
    assign hc[0] = blk_c[k];
    for (genvar i = 0; i < 4; i++) begin : g_ha
      assign sum[4*k + i] = ps[i] ^ hc[i];
      assign hc[i+1]      = ps[i] & hc[i];
    end

    assign blk_c[k+1] = pc | hc[4];
  end

  assign cout = blk_c[NBLK];

  initial begin
    assert (WIDTH % 4 == 0 && WIDTH >= 4)
      else $error("carry_increment_adder: WIDTH must be a positive multiple of 4");
  end

endmodule
