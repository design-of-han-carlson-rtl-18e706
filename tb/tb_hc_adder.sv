// tb_hc_adder: self-checking testbench for the Han-Carlson adder.
//
// Four instances are checked against reference values computed in the
// testbench with plain integer arithmetic or, for the speculative variant,
// with an explicit window-limited carry model:
//   * 4-bit exact adder (the default size): all 512 input combinations;
//   * 9-bit exact adder (odd width, extra Kogge-Stone row): random vectors;
//   * 32-bit exact adder: random vectors plus long carry chains;
//   * 8-bit adder with one Kogge-Stone row removed (window l = 4): all
//     operand pairs with random carry-in, against the window model, and it
//     must disagree with the exact sum at least once.
// A new vector is applied every clock cycle; a watchdog ends the run.
module tb_hc_adder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int spec_wrong_cases = 0;

  // 4-bit exact
  logic [3:0]  a4, b4, s4;
  logic        c4i, c4o;
  hc_adder #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .cin(c4i), .sum(s4), .cout(c4o));

  // 9-bit exact
  logic [8:0]  a9, b9, s9;
  logic        c9i, c9o;
  hc_adder #(.WIDTH(9)) dut9 (.a(a9), .b(b9), .cin(c9i), .sum(s9), .cout(c9o));

  // 32-bit exact
  logic [31:0] a32, b32, s32;
  logic        c32i, c32o;
  hc_adder #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(c32i), .sum(s32), .cout(c32o));

  // 8-bit speculative, one Kogge-Stone row removed
  logic [7:0]  a8, b8, s8;
  logic        c8i, c8o;
  hc_adder #(.WIDTH(8), .REMOVED_LEVELS(1)) dut8s (.a(a8), .b(b8), .cin(c8i), .sum(s8), .cout(c8o));

  // 4-bit adder with its only Kogge-Stone row removed (window l = 2)
  logic [3:0]  a4s, b4s, s4s;
  logic        c4si, c4so;
  hc_adder #(.WIDTH(4), .REMOVED_LEVELS(1)) dut4s (.a(a4s), .b(b4s), .cin(c4si), .sum(s4s), .cout(c4so));

  // Window model: carry into bit i+1 looks at bits lo..i only, where
  // lo = i-L+1 for odd i and i-L for even i (clamped at 0); cin counts only
  // when the window reaches bit 0.
  function automatic logic [8:0] spec_model(logic [7:0] a, logic [7:0] b, logic ci, int L);
    logic [8:0] c;
    logic [7:0] r;
    c[0] = ci;
    for (int i = 0; i < 8; i++) begin
      int lo;
      logic g;
      lo = (i % 2 == 1) ? i - L + 1 : i - L;
      if (lo <= 0) begin
        lo = 0;
        g  = ci;
      end else begin
        g = 1'b0;
      end
      for (int j = lo; j <= i; j++)
        g = (a[j] & b[j]) | ((a[j] ^ b[j]) & g);
      c[i+1] = g;
    end
    for (int i = 0; i < 8; i++) r[i] = a[i] ^ b[i] ^ c[i];
    return {c[8], r};
  endfunction

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [32:0] e32;
    logic [9:0]  e9;
    logic [8:0]  e8;

    // 4-bit: exhaustive
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          a4 = 4'(x); b4 = 4'(y); c4i = 1'(ci);
          @(posedge clk);
          check("hca4", {59'd0, c4o, s4}, 64'(x) + 64'(y) + 64'(ci));
        end

    // 9-bit: random
    for (int n = 0; n < 3000; n++) begin
      a9 = 9'($urandom); b9 = 9'($urandom); c9i = 1'($urandom);
      @(posedge clk);
      e9 = {1'b0, a9} + {1'b0, b9} + {9'd0, c9i};
      check("hca9", {54'd0, c9o, s9}, {54'd0, e9});
    end

    // 32-bit: random, then carry chains of every length
    for (int n = 0; n < 5000; n++) begin
      a32 = $urandom; b32 = $urandom; c32i = 1'($urandom);
      @(posedge clk);
      e32 = {1'b0, a32} + {1'b0, b32} + {32'd0, c32i};
      check("hca32", {31'd0, c32o, s32}, {31'd0, e32});
    end
    for (int len = 0; len <= 32; len++) begin
      a32 = (len == 32) ? 32'hFFFF_FFFF : ((32'd1 << len) - 1);
      b32 = 32'd0; c32i = 1'b1;
      @(posedge clk);
      e32 = {1'b0, a32} + 33'd1;
      check("hca32 chain", {31'd0, c32o, s32}, {31'd0, e32});
    end

    // 4-bit speculative: exhaustive, same window model with the upper
    // operand bits zero (bit 4 of the model is then the carry out).
    for (int ci = 0; ci < 2; ci++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          a4s = 4'(x); b4s = 4'(y); c4si = 1'(ci);
          @(posedge clk);
          e8 = spec_model({4'd0, a4s}, {4'd0, b4s}, c4si, 2);
          check("spec4", {59'd0, c4so, s4s}, {59'd0, e8[4:0]});
        end

    // 8-bit speculative: exhaustive operands
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y); c8i = 1'($urandom);
        @(posedge clk);
        e8 = spec_model(a8, b8, c8i, 4);
        check("spec8", {55'd0, c8o, s8}, {55'd0, e8});
        if ({c8o, s8} != 9'(x + y + int'(c8i))) spec_wrong_cases++;
      end
    // The speculative adder must really be speculative.
    checks++;
    if (spec_wrong_cases == 0) begin
      failures++;
      $display("FAIL spec8 never differed from the exact sum");
    end
    $display("speculative 8-bit adder: %0d of 65536 results differ from exact", spec_wrong_cases);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
