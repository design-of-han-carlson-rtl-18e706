// csla_group: one block of the carry-select adder with a Han-Carlson adder
// in its first level.
//
// Three levels, as in the proposed carry-select block:
//   1. a WIDTH-bit Han-Carlson adder (hc_adder) with carry-in 0 gives
//      {c0, s0} = a + b;
//   2. a (WIDTH+1)-bit Binary to Excess-1 Converter (bec) turns that into
//      {c1, s1} = a + b + 1, the result for carry-in 1;
//   3. 2:1 multiplexers pick {c1, s1} when the carry from the previous
//      block (sel) is 1, otherwise {c0, s0}.
// Both candidates are ready before sel arrives, so the block adds only a
// multiplexer delay to the carry path. The block structure follows the
// source design; the default width of 4 bits is that of its worked example.
//
// Interface: purely combinational. sel is the carry out of the less
// significant neighbour block.
module csla_group #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sel,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] res_c0;   // {carry, sum} for carry-in 0
  logic [WIDTH:0] res_c1;   // {carry, sum} for carry-in 1

  hc_adder #(.WIDTH(WIDTH)) u_hca (
    .a    (a),
    .b    (b),
    .cin  (1'b0),
    .sum  (res_c0[WIDTH-1:0]),
    .cout (res_c0[WIDTH])
  );

  bec #(.WIDTH(WIDTH + 1)) u_bec (
    .x (res_c0),
    .y (res_c1)
  );

  assign {cout, sum} = sel ? res_c1 : res_c0;

endmodule
