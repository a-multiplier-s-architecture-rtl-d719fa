// approx_mult8: 8x8 unsigned multiplier whose partial products are reduced by
// 16-bit approximate LUT adders.
//
// The eight partial-product rows from pp_gen are summed by a balanced tree of
// seven 16-bit adders in three levels (4, 2, 1 adders), all of the kind chosen
// by ADDER. The product is the 16-bit sum of the last adder; adder carry outs
// are dropped, since an exact 8x8 product always fits 16 bits.
//
// Timing: with LEADx adders the multiplier is combinational (LATENCY = 0) and
// out_valid equals in_valid. With APEx adders every level adds two register
// stages, so p and out_valid follow a, b and in_valid after LATENCY = 6 clock
// cycles, one new operation per cycle. An active-low synchronous reset clears
// the pipeline and its valid bits.
//
// From the document: an 8-bit multiplier, partial products reduced by LEADx or
// APEx approximate adders, registered APEx. This design's own: the balanced
// tree order of the reduction, the valid handshake, dropping the carry outs.
//
// Ports: clk, rst_n, in_valid, a, b (8 bits) -> out_valid, p (16 bits).
module approx_mult8
  import approx_pkg::*;
#(
  parameter adder_kind_e ADDER = ADDER_LEADX
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [MUL_W-1:0]  a,
  input  logic [MUL_W-1:0]  b,
  output logic              out_valid,
  output logic [ADD_W-1:0]  p
);

  localparam int unsigned LEVELS  = 3;
  localparam int unsigned LATENCY = (ADDER == ADDER_APEX) ? LEVELS * APEX_LATENCY : 0;

  logic [ADD_W-1:0] pp [MUL_W];
  logic [ADD_W-1:0] sum1 [4];
  logic [ADD_W-1:0] sum2 [2];
  logic [3:0]       cout1;
  logic [1:0]       cout2;
  logic             cout3;

  pp_gen #(.N(MUL_W)) u_pp (
    .a  (a),
    .b  (b),
    .pp (pp)
  );

  for (genvar j = 0; j < 4; j++) begin : g_lvl1
    approx_add16 #(.ADDER(ADDER)) u_add (
      .clk   (clk),
      .rst_n (rst_n),
      .a     (pp[2*j]),
      .b     (pp[2*j+1]),
      .s     (sum1[j]),
      .cout  (cout1[j])
    );
  end

  for (genvar j = 0; j < 2; j++) begin : g_lvl2
    approx_add16 #(.ADDER(ADDER)) u_add (
      .clk   (clk),
      .rst_n (rst_n),
      .a     (sum1[2*j]),
      .b     (sum1[2*j+1]),
      .s     (sum2[j]),
      .cout  (cout2[j])
    );
  end

  approx_add16 #(.ADDER(ADDER)) u_lvl3 (
    .clk   (clk),
    .rst_n (rst_n),
    .a     (sum2[0]),
    .b     (sum2[1]),
    .s     (p),
    .cout  (cout3)
  );

  // Valid bits travel alongside the data through the adder registers.
  if (LATENCY == 0) begin : g_comb_valid
    assign out_valid = in_valid;
  end else begin : g_pipe_valid
    logic [LATENCY-1:0] valid_q;
    always_ff @(posedge clk) begin
      if (!rst_n) valid_q <= '0;
      else        valid_q <= {valid_q[LATENCY-2:0], in_valid};
    end
    assign out_valid = valid_q[LATENCY-1];
  end

endmodule
