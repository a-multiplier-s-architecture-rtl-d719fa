// aad2: approximate 2-bit adder (AAd2) of the LEADx approximate part.
//
// A 5-input, 2-output function that fits one FPGA 6-input LUT used as two
// 5-input LUTs. It adds two 2-bit operands and a 1-bit carry-in and produces a
// 2-bit sum with no carry out: when the true sum exceeds 3 the output saturates
// at 2'b11 instead of wrapping. This keeps the error of an overflowing pair at
// most 3 units of the pair's weight and never propagates a carry upward.
//
// The document gives the 5-input/2-output shape and the rule that the least
// significant bits neither produce nor consume a ripple carry; its truth table is
// not reproduced here, and the saturating function is this design's choice.
//
// Ports: a, b (2 bits each), ci (1 bit) -> s (2 bits). Purely combinational.
module aad2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  input  logic       ci,
  output logic [1:0] s
);

  logic [2:0] full;

  always_comb begin
    full = {1'b0, a} + {1'b0, b} + {2'b00, ci};
    s    = full[2] ? 2'b11 : full[1:0];
  end

endmodule
