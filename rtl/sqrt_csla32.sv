// sqrt_csla32: 32-bit square-root carry-select adder (SQRT CSLA) with
// Han-Carlson adders in the first level.
//
// sum/cout = a + b + cin. The operands are cut into blocks whose widths grow
// towards the most significant end (csla_pkg::CSLA_BLOCK_W, 2,2,3,4,5,7,9).
// Block 0 is a plain Han-Carlson adder that takes cin. Every further block is
// a csla_group: it adds its slice with carry-in 0 in a Han-Carlson adder,
// derives the carry-in-1 result with a Binary to Excess-1 Converter, and
// lets the carry out of the block below select one of the two. The carry
// thus ripples only through one multiplexer per block, while the widening
// blocks give each block's own adder the time the carry needs to reach it.
// Replacing the first-level ripple-carry adders by Han-Carlson adders and
// keeping the converter in the second level follows the source design; the
// block widths are this design's own choice.
//
// Interface: purely combinational, no clock or reset.
module sqrt_csla32
  import csla_pkg::*;
(
  input  logic [CSLA_WIDTH-1:0] a,
  input  logic [CSLA_WIDTH-1:0] b,
  input  logic                  cin,
  output logic [CSLA_WIDTH-1:0] sum,
  output logic                  cout
);

  // The block widths must tile the operand exactly.
  if (csla_block_lsb(CSLA_NUM_BLOCKS) != CSLA_WIDTH) begin : g_bad_partition
    $error("csla_pkg block widths do not add up to CSLA_WIDTH");
  end

  // blk_carry[k] is the carry out of block k.
  logic [CSLA_NUM_BLOCKS-1:0] blk_carry;

  hc_adder #(.WIDTH(CSLA_BLOCK_W[0])) u_blk0 (
    .a    (a[CSLA_BLOCK_W[0]-1:0]),
    .b    (b[CSLA_BLOCK_W[0]-1:0]),
    .cin  (cin),
    .sum  (sum[CSLA_BLOCK_W[0]-1:0]),
    .cout (blk_carry[0])
  );

  for (genvar k = 1; k < CSLA_NUM_BLOCKS; k++) begin : g_blk
    localparam int unsigned W   = CSLA_BLOCK_W[k];
    localparam int unsigned LSB = csla_block_lsb(k);

    csla_group #(.WIDTH(W)) u_grp (
      .a    (a[LSB +: W]),
      .b    (b[LSB +: W]),
      .sel  (blk_carry[k-1]),
      .sum  (sum[LSB +: W]),
      .cout (blk_carry[k])
    );
  end

  assign cout = blk_carry[CSLA_NUM_BLOCKS-1];

endmodule
