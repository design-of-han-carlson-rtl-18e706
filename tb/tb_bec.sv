// tb_bec: self-checking testbench for the Binary to Excess-1 Converter.
//
// The default 5-bit converter (the one a 4-bit block needs) and a 10-bit one
// (for a 9-bit block) are driven with every input value; the expected output
// is x + 1 modulo 2^WIDTH computed with integer arithmetic. One vector per
// clock cycle; a watchdog ends the run.
module tb_bec;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [4:0] x5, y5;
  logic [9:0] x10, y10;

  bec dut5 (.x(x5), .y(y5));
  bec #(.WIDTH(10)) dut10 (.x(x10), .y(y10));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      x5 = 5'(v);
      @(posedge clk);
      checks++;
      if (y5 !== 5'(v + 1)) begin
        failures++;
        $display("FAIL bec5: x=%h y=%h", x5, y5);
      end
    end
    for (int v = 0; v < 1024; v++) begin
      x10 = 10'(v);
      @(posedge clk);
      checks++;
      if (y10 !== 10'(v + 1)) begin
        failures++;
        if (failures <= 10) $display("FAIL bec10: x=%h y=%h", x10, y10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
