// aad1: 2-bit LUT adder (AAd1) for the two most significant bits of an
// approximate part, together with the carry it hands to the accurate part.
//
// It adds two 2-bit operands and a predicted carry-in exactly: s is the 2-bit
// sum and co its carry out. The carry-in is not the true ripple carry from the
// bits below but a prediction supplied by the instantiating adder. co is the
// carry that the first LUT of the accurate part computes from the same inputs,
// so the approximate and accurate parts agree on it.
//
// The document gives AAd1 as a 2-bit LUT adder whose inputs are those of the
// first accurate LUT; the exact sum and the carry prediction are this design's
// choices.
//
// Ports: a, b (2 bits), ci (1 bit) -> s (2 bits), co (1 bit). Combinational.
module aad1 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       ci,
  output logic [1:0] s,
  output logic       co
);

  always_comb begin
    {co, s} = {1'b0, a} + {1'b0, b} + {2'b00, ci};
  end

endmodule
