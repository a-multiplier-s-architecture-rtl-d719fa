// approx_mult_top: the two 8x8 approximate multipliers side by side.
//
// One multiplier reduces its partial products with combinational 16-bit LEADx
// adders (low error, answer in the same cycle); the other with pipelined 16-bit
// APEx adders (whose low 8 sum bits are the constant 1; answer 6 cycles later,
// one operation per cycle). Each has its own operand, valid and product ports so
// they can be used and compared independently; they share the clock and the
// active-low synchronous reset.
//
// Ports: clk, rst_n;
//   LEADx multiplier: lx_valid_in, lx_a, lx_b -> lx_valid_out, lx_p
//   APEx multiplier:  ax_valid_in, ax_a, ax_b -> ax_valid_out, ax_p
module approx_mult_top
  import approx_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             lx_valid_in,
  input  logic [MUL_W-1:0] lx_a,
  input  logic [MUL_W-1:0] lx_b,
  output logic             lx_valid_out,
  output logic [ADD_W-1:0] lx_p,
  input  logic             ax_valid_in,
  input  logic [MUL_W-1:0] ax_a,
  input  logic [MUL_W-1:0] ax_b,
  output logic             ax_valid_out,
  output logic [ADD_W-1:0] ax_p
);

  approx_mult8 #(.ADDER(ADDER_LEADX)) u_mult_leadx (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (lx_valid_in),
    .a         (lx_a),
    .b         (lx_b),
    .out_valid (lx_valid_out),
    .p         (lx_p)
  );

  approx_mult8 #(.ADDER(ADDER_APEX)) u_mult_apex (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (ax_valid_in),
    .a         (ax_a),
    .b         (ax_b),
    .out_valid (ax_valid_out),
    .p         (ax_p)
  );

endmodule
