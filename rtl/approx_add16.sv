// approx_add16: one 16-bit reduction adder of the multiplier, of either kind.
//
// A thin selector so that the multiplier's reduction tree can be written once:
// ADDER = ADDER_LEADX places a combinational LEADx adder (clk and rst_n are then
// unused), ADDER = ADDER_APEX a pipelined APEx adder with a latency of
// APEX_LATENCY clock cycles.
//
// Ports: clk, rst_n, a, b (16 bits) -> s (16 bits), cout.
module approx_add16
  import approx_pkg::*;
#(
  parameter adder_kind_e ADDER = ADDER_LEADX
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [15:0] s,
  output logic        cout
);

  if (ADDER == ADDER_APEX) begin : g_apex
    apex16 u_add (
      .clk   (clk),
      .rst_n (rst_n),
      .a     (a),
      .b     (b),
      .s     (s),
      .cout  (cout)
    );
  end else begin : g_leadx
    leadx16 u_add (
      .a    (a),
      .b    (b),
      .s    (s),
      .cout (cout)
    );
  end

endmodule
