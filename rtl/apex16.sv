// apex16: 16-bit APEx (area and power efficient) approximate adder, pipelined.
//
// The operands are first captured in input registers. From the registered
// operands the low APPROX_BITS sum bits are not computed at all: they are the
// constant 1, so no logic is spent on them. The high bits are added exactly by a
// LUT-per-bit adder on the mux-based carry chain. Its carry-in is predicted from
// the two most significant approximate bit pairs (the carry a 2-bit add of
// a[A-1:A-2] and b[A-1:A-2] would produce), because the constant bits carry no
// information. Sum and carry out are captured in output registers.
//
// Timing: a result appears on s/cout two clock edges after its operands are
// presented (input register, then output register). An active-low synchronous
// reset clears both register stages, so s and cout read 0 until the first
// operands have passed through.
//
// From the document: 8 approximate bits forced to 1, 8 accurate bits with one
// LUT each and the dedicated carry chain, input and output registers cleared by
// reset. This design's own: the carry prediction into the accurate part,
// synchronous active-low reset.
//
// Ports: clk, rst_n, a, b (16 bits) -> s (16 bits), cout.
module apex16 #(
  parameter int unsigned APPROX_BITS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] s,
  output logic        cout
);

  localparam int unsigned ACC_BITS = 16 - APPROX_BITS;

  logic [15:0]         a_q, b_q;
  logic                carry_acc;
  logic [ACC_BITS-1:0] s_acc;
  logic                cout_acc;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else begin
      a_q <= a;
      b_q <= b;
    end
  end

  // Carry into the accurate part, predicted from the top two approximate bits.
  assign carry_acc = (a_q[APPROX_BITS-1] & b_q[APPROX_BITS-1]) |
                     ((a_q[APPROX_BITS-1] ^ b_q[APPROX_BITS-1]) &
                      a_q[APPROX_BITS-2] & b_q[APPROX_BITS-2]);

  carry_chain_adder #(.W(ACC_BITS)) u_acc (
    .a    (a_q[15:APPROX_BITS]),
    .b    (b_q[15:APPROX_BITS]),
    .cin  (carry_acc),
    .s    (s_acc),
    .cout (cout_acc)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s    <= '0;
      cout <= 1'b0;
    end else begin
      s    <= {s_acc, {APPROX_BITS{1'b1}}};
      cout <= cout_acc;
    end
  end

endmodule
