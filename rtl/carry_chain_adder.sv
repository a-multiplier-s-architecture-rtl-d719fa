// carry_chain_adder: accurate adder of the most significant part.
//
// Each bit has one LUT that forms the propagate p = a ^ b. A mux-based carry
// chain, the structure of an FPGA's dedicated carry logic, then selects the next
// carry: when p is 1 the incoming carry passes, otherwise the operand bit a
// (which then equals b) becomes the carry. The sum bit is p ^ carry-in. The
// result is the exact sum of a, b and cin.
//
// The document states that the accurate part uses one LUT per bit, XOR for the
// sums and the dedicated carry chain with muxes; the parameterised width is this
// design's own.
//
// Ports: a, b (W bits), cin -> s (W bits), cout. Combinational.
module carry_chain_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W-1:0] p;
  logic [W:0]   c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign p[i]   = a[i] ^ b[i];           // the bit's LUT
    assign s[i]   = p[i] ^ c[i];           // sum XOR
    assign c[i+1] = p[i] ? c[i] : a[i];    // carry-chain mux
  end

  assign cout = c[W];

endmodule
