// tb_csla_group: self-checking testbench for one carry-select block.
//
// The default 4-bit block is driven with every (a, b, sel) combination and a
// 9-bit block with random vectors. The expected {cout, sum} is a + b + sel
// computed with integer arithmetic, so both the carry-in-0 path (adder
// only) and the carry-in-1 path (adder followed by the excess-1 converter)
// are checked. The testbench counts how often each path was selected and
// fails if one never was. One vector per clock cycle; a watchdog ends the run.
module tb_csla_group;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;
  int sel0_cnt = 0;
  int sel1_cnt = 0;

  logic [3:0] a4, b4, s4;
  logic       sel4, c4;
  logic [8:0] a9, b9, s9;
  logic       sel9, c9;

  csla_group dut4 (.a(a4), .b(b4), .sel(sel4), .sum(s4), .cout(c4));
  csla_group #(.WIDTH(9)) dut9 (.a(a9), .b(b9), .sel(sel9), .sum(s9), .cout(c9));

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          a4 = 4'(x); b4 = 4'(y); sel4 = 1'(s);
          @(posedge clk);
          check("grp4", {11'd0, c4, s4}, 16'(x + y + s));
          if (s == 0) sel0_cnt++; else sel1_cnt++;
        end
    for (int n = 0; n < 4000; n++) begin
      a9 = 9'($urandom); b9 = 9'($urandom); sel9 = 1'($urandom);
      @(posedge clk);
      check("grp9", {6'd0, c9, s9}, 16'(int'(a9) + int'(b9) + int'(sel9)));
      if (sel9) sel1_cnt++; else sel0_cnt++;
    end
    checks++;
    if (sel0_cnt == 0 || sel1_cnt == 0) begin
      failures++;
      $display("FAIL a select path was never exercised");
    end
    $display("carry-in-0 path selected %0d times, carry-in-1 path %0d times", sel0_cnt, sel1_cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
