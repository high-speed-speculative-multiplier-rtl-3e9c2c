// cp_adder: exact carry-propagate adder, sum = (a + b) mod 2^W. It adds the
// two rows of the correction tree to give the non-speculative product. The
// adder's architecture is left to synthesis. Combinational.
module cp_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  assign sum = a + b;
endmodule
