// hc_adder: Han-Carlson parallel-prefix adder.
//
// The adder computes sum = a + b + cin in four steps:
//   1. bit level:  g_i = a_i & b_i, p_i = a_i ^ b_i. The carry-in is folded
//      into bit 0 as g_0 | p_0 & cin, so the prefix tree needs no extra input.
//   2. one Brent-Kung row: every odd bit i combines with bit i-1.
//   3. Kogge-Stone rows on the odd bits only, with spans 2, 4, 8, ...: after
//      them every odd bit i holds the group generate of bits i..0.
//   4. one final row: every even bit i >= 2 combines with odd bit i-1, which
//      fills in the carries the sparse tree skipped.
// The carry into bit i+1 is the group generate at bit i and sum_i = p_i ^ c_i.
// For a width n that is a power of two the tree has 1 + log2(n) rows of
// prefix cells; the 4-bit default has three (one Brent-Kung, one
// Kogge-Stone, one final row). This structure, the sparse "every other bit"
// Kogge-Stone rows and the 4-bit default width follow the source design.
//
// REMOVED_LEVELS > 0 builds the speculative variant: that many of the last
// Kogge-Stone rows are left out, so each carry only looks back a window of
// l = 2^(1 + log2(n) - 1 - REMOVED_LEVELS) bits: odd bit i gets (g,p)_{i:i-l+1},
// even bit i gets (g,p)_{i:i-l}, and bits below l stay exact. The result is
// then wrong whenever a carry chain is longer than the window; no error
// detection or correction is provided. REMOVED_LEVELS = 0 (the default) is the
// exact adder.
//
// Interface: purely combinational, no clock. Width of a and b is WIDTH;
// cout is the carry out of the most significant bit.
module hc_adder
  import csla_pkg::*;
#(
  parameter int unsigned WIDTH          = 4,
  parameter int unsigned REMOVED_LEVELS = 0
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // Highest odd bit position, and the number of Kogge-Stone rows needed for
  // it to reach bit 0.
  localparam int unsigned ODD_TOP   = (WIDTH % 2 == 0) ? WIDTH - 1 : WIDTH - 2;
  localparam int unsigned KS_LEVELS = (WIDTH >= 4) ? $clog2(ODD_TOP + 1) - 1 : 0;
  localparam int unsigned KS_USED   = (KS_LEVELS > REMOVED_LEVELS) ?
                                      KS_LEVELS - REMOVED_LEVELS : 0;

  // Rows of prefix cells between the bit-level and the sum logic: the
  // Brent-Kung row, the Kogge-Stone rows kept and the final row.
  localparam int unsigned PREFIX_LEVELS = (WIDTH >= 2) ? KS_USED + 2 : 0;

  // For a power-of-two width the depth must be 1 + log2(l), l being the
  // carry window (l = WIDTH for the exact adder).
  if ((WIDTH >= 4) && ((WIDTH & (WIDTH - 1)) == 0) && (REMOVED_LEVELS < $clog2(WIDTH)) &&
      (PREFIX_LEVELS != 1 + $clog2(WIDTH) - REMOVED_LEVELS)) begin : g_bad_depth
    $error("hc_adder: prefix tree depth does not match 1 + log2(window)");
  end

  logic [WIDTH-1:0] p_bit;
  logic [WIDTH:0]   carry;

  always_comb begin
    gp_t row [WIDTH];
    gp_t nxt [WIDTH];

    // Bit-level generate / propagate, carry-in folded into bit 0.
    for (int i = 0; i < WIDTH; i++) begin
      p_bit[i]  = a[i] ^ b[i];
      row[i].g  = a[i] & b[i];
      row[i].p  = a[i] ^ b[i];
    end
    row[0].g = row[0].g | (row[0].p & cin);

    // Brent-Kung row: odd bits combine with their even neighbour.
    nxt = row;
    for (int i = 1; i < WIDTH; i += 2)
      nxt[i] = gp_combine(row[i], row[i-1]);
    row = nxt;

    // Sparse Kogge-Stone rows on odd bits, span 2^k.
    for (int k = 1; k <= int'(KS_USED); k++) begin
      nxt = row;
      for (int i = 1; i < WIDTH; i += 2)
        if (i >= (1 << k))
          nxt[i] = gp_combine(row[i], row[i - (1 << k)]);
      row = nxt;
    end

    // Final row: even bits take the carry of the odd bit below them.
    nxt = row;
    for (int i = 2; i < WIDTH; i += 2)
      nxt[i] = gp_combine(row[i], row[i-1]);
    row = nxt;

    carry[0] = cin;
    for (int i = 0; i < WIDTH; i++)
      carry[i+1] = row[i].g;
  end

  assign sum  = p_bit ^ carry[WIDTH-1:0];
  assign cout = carry[WIDTH];

endmodule
