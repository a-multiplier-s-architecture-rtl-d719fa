// leadx8: 8-bit LEADx (low error, area efficient) approximate adder unit.
//
// The unit splits its operands into a 4-bit approximate part (bits 3:0) and a
// 4-bit accurate part (bits 7:4):
//   bits 1:0  AAd2, saturating 2-bit adder; its fifth input is the unit's cin,
//             the carry arriving from the unit below (0 for the lowest unit).
//   bits 3:2  AAd1, exact 2-bit adder with a predicted carry-in a[1] & b[1];
//             its carry out feeds the accurate part.
//   bits 7:4  accurate adder on the dedicated carry chain; its carry out is
//             the unit's cout.
// No ripple carry crosses from bits 1:0 to bits 3:2, which is where the error
// comes from and what keeps the carry path short.
//
// The split into approximate and accurate halves, AAd2 below AAd1, AAd1 sharing
// its inputs with the first accurate LUT and the carry chain follow the
// document. The saturating AAd2 function and the a[1] & b[1] prediction are this
// design's choices.
//
// Ports: a, b (8 bits), cin -> s (8 bits), cout. Combinational.
module leadx8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,
  output logic [7:0] s,
  output logic       cout
);

  logic carry_pred;  // predicted carry into bit 2
  logic carry_acc;   // carry from the approximate part into the accurate part

  assign carry_pred = a[1] & b[1];

  aad2 u_aad2 (
    .a  (a[1:0]),
    .b  (b[1:0]),
    .ci (cin),
    .s  (s[1:0])
  );

  aad1 u_aad1 (
    .a  (a[3:2]),
    .b  (b[3:2]),
    .ci (carry_pred),
    .s  (s[3:2]),
    .co (carry_acc)
  );

  carry_chain_adder #(.W(4)) u_acc (
    .a    (a[7:4]),
    .b    (b[7:4]),
    .cin  (carry_acc),
    .s    (s[7:4]),
    .cout (cout)
  );

endmodule
