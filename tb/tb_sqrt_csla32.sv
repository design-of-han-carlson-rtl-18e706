// tb_sqrt_csla32: end-to-end, self-checking testbench for the 32-bit
// square-root carry-select adder at its default (and only) size.
//
// Vectors: corner cases, a carry entering at every bit position and
// rippling to the top, and random operands. The reference {cout, sum} is
// a + b + cin in 33-bit integer arithmetic. For every carry-select block the
// testbench also works out, from the operands alone, the carry that enters
// it, and counts how often the block had to take its carry-in-0 result and
// how often its carry-in-1 (excess-1) result; a block whose either choice is
// never exercised counts as a failure. It also counts additions whose carry
// passes through every block's multiplexer. The adder is combinational: each
// result is checked in the same cycle its operands are applied. A watchdog
// ends the run.
module tb_sqrt_csla32;
  import csla_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  int sel_cnt [CSLA_NUM_BLOCKS][2];
  int full_ripple_cnt = 0;

  logic [31:0] a, b, sum;
  logic        cin, cout;

  sqrt_csla32 dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  task automatic apply(logic [31:0] x, logic [31:0] y, logic ci);
    logic [32:0] exp;
    bit          all_prop;
    a = x; b = y; cin = ci;
    @(posedge clk);
    exp = {1'b0, x} + {1'b0, y} + {32'd0, ci};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%h b=%h cin=%0d: got %0d_%h expected %0d_%h",
                 x, y, ci, cout, sum, exp[32], exp[31:0]);
    end
    // Carry entering each block k >= 1, from the operands alone.
    for (int k = 1; k < CSLA_NUM_BLOCKS; k++) begin
      int unsigned lsb;
      logic [32:0] lo_sum;
      lsb    = csla_block_lsb(k);
      lo_sum = ({1'b0, x} & ((33'd1 << lsb) - 1)) + ({1'b0, y} & ((33'd1 << lsb) - 1))
               + {32'd0, ci};
      sel_cnt[k][lo_sum[lsb]]++;
    end
    all_prop = ((x ^ y) == 32'hFFFF_FFFF) && ci;
    if (all_prop) full_ripple_cnt++;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (sel_cnt[k, v]) sel_cnt[k][v] = 0;

    // Corner cases.
    apply(32'h0000_0000, 32'h0000_0000, 1'b0);
    apply(32'h0000_0000, 32'h0000_0000, 1'b1);
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    apply(32'h5555_5555, 32'hAAAA_AAAA, 1'b1);

    // A carry generated at bit j propagating to the top.
    for (int j = 0; j < 32; j++) begin
      logic [31:0] ones_above;
      ones_above = ~((32'd1 << j) - 1);
      apply(ones_above, 32'd1 << j, 1'b0);
      apply(ones_above, 32'd0, 1'b1);
    end

    // Random operands, with and without carry-in.
    for (int n = 0; n < 20000; n++)
      apply($urandom, $urandom, 1'($urandom));

    // Every block must have selected both of its results.
    for (int k = 1; k < CSLA_NUM_BLOCKS; k++) begin
      checks++;
      $display("block %0d (bits %0d..%0d): carry-in-0 result %0d times, carry-in-1 result %0d times",
               k, csla_block_lsb(k) + CSLA_BLOCK_W[k] - 1, csla_block_lsb(k),
               sel_cnt[k][0], sel_cnt[k][1]);
      if (sel_cnt[k][0] == 0 || sel_cnt[k][1] == 0) begin
        failures++;
        $display("FAIL block %0d never took one of its two results", k);
      end
    end
    checks++;
    $display("carry rippled through all block multiplexers %0d times", full_ripple_cnt);
    if (full_ripple_cnt == 0) begin
      failures++;
      $display("FAIL no carry rippled through every block");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
