// spec_counter: (m:2) speculative counter.
//
// Counts the inputs that are high and encodes the count on two outputs, S
// (weight 1) and C (weight 2), on the assumption that at most three inputs
// are high: then 2*C + S equals the count exactly. For M = 2 it is a
// half-adder and for M = 3 a full-adder. S is the XOR of all inputs; C is
// the "at least two inputs high" function, built here as a single chain that
// keeps "some input seen high" and "two inputs seen high" (the description
// gives the two- and three-input forms; the chain for any M is this design's
// choice, and synthesis is free to restructure it). When four or more inputs
// are high the outputs are wrong; the matching corr_block flags that case.
// Purely combinational.
module spec_counter #(
  parameter int M = 4              // number of inputs
) (
  input  logic [M-1:0] x,
  output logic         s,          // weight 1
  output logic         c           // weight 2
);

  always_comb begin
    logic any_hi;
    logic two_hi;
    any_hi = 1'b0;
    two_hi = 1'b0;
    for (int i = 0; i < M; i++) begin
      two_hi = two_hi | (any_hi & x[i]);
      any_hi = any_hi | x[i];
    end
    s = ^x;
    c = two_hi;
  end

endmodule
