// csla_pkg: types, the prefix operator and the block partition shared by the
// Han-Carlson carry-select adder.
//
// gp_t is a (generate, propagate) pair. gp_combine() is the prefix ("black
// cell") operator of a parallel-prefix adder:
//   (g, p)_hi o (g, p)_lo = (g_hi | p_hi & g_lo, p_hi & p_lo)
// The 32-bit square-root carry-select adder is cut into CSLA_NUM_BLOCKS
// blocks whose widths grow from the least significant end. The widths
// 2,2,3,4,5,7,9 are this design's choice: the source of the design states
// only that block sizes follow the square-root rule and that the adder is
// 32 bits wide.
package csla_pkg;

  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  // Prefix operator: combine a more significant span (hi) with the adjacent
  // less significant span (lo).
  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

  localparam int unsigned CSLA_WIDTH      = 32;
  localparam int unsigned CSLA_NUM_BLOCKS = 7;

  typedef int unsigned block_list_t [CSLA_NUM_BLOCKS];
  localparam block_list_t CSLA_BLOCK_W = '{2, 2, 3, 4, 5, 7, 9};

  // Bit position of the least significant bit of block k.
  function automatic int unsigned csla_block_lsb(int unsigned k);
    int unsigned s;
    s = 0;
    for (int unsigned j = 0; j < CSLA_NUM_BLOCKS; j++)
      if (j < k) s += CSLA_BLOCK_W[j];
    return s;
  endfunction

endpackage
