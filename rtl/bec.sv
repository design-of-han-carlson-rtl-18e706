// bec: Binary to Excess-1 Converter.
//
// Returns x + 1 (modulo 2^WIDTH) without an adder: bit i of the result is
// x_i XOR (x_{i-1} & ... & x_0), and bit 0 is simply inverted. In a
// carry-select block it replaces the second adder that assumes carry-in 1:
// an n-bit block needs an (n+1)-bit converter, the extra bit taking the
// block's carry out. That use and the n+1 sizing follow the source design;
// the running-AND form of the logic is the usual one for this circuit.
//
// Interface: purely combinational. Default WIDTH = 5 is the converter of a
// 4-bit block.
module bec #(
  parameter int unsigned WIDTH = 5
) (
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] y
);

  always_comb begin
    logic run_and;
    run_and = 1'b1;
    for (int i = 0; i < WIDTH; i++) begin
      y[i]    = x[i] ^ run_and;
      run_and = run_and & x[i];
    end
  end

endmodule
