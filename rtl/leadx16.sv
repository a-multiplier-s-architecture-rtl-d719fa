// leadx16: 16-bit LEADx approximate adder made of two 8-bit LEADx units.
//
// The low unit adds bits 7:0 with no carry-in; its carry out enters the high
// unit as the fifth input of that unit's lowest AAd2, so a carry produced in the
// low accurate part still reaches bits 9:8 (without rippling further, since AAd2
// saturates rather than carrying). The high unit adds bits 15:8 and produces the
// adder's carry out.
//
// Ports follow the document's 16-bit LEADx: a and b (16 bits), s (16 bits) and
// cout, 49 signals in all, with no carry-in and no clock. Combinational.
module leadx16 (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] s,
  output logic        cout
);

  logic carry_mid;

  leadx8 u_lo (
    .a    (a[7:0]),
    .b    (b[7:0]),
    .cin  (1'b0),
    .s    (s[7:0]),
    .cout (carry_mid)
  );

  leadx8 u_hi (
    .a    (a[15:8]),
    .b    (b[15:8]),
    .cin  (carry_mid),
    .s    (s[15:8]),
    .cout (cout)
  );

endmodule
