// approx_pkg: types and constants shared by the approximate-adder multiplier.
//
// The multiplier reduces its partial products with 16-bit approximate adders of
// one of two kinds: LEADx (low error, area efficient; purely combinational) or
// APEx (area and power efficient; registered inputs and outputs). The enum below
// selects the kind; the widths are those of the 8x8 multiplier and its 16-bit
// adders.
package approx_pkg;

  typedef enum logic [0:0] {
    ADDER_LEADX = 1'b0,  // combinational LEADx adders, multiplier latency 0
    ADDER_APEX  = 1'b1   // registered APEx adders, 2 cycles per adder level
  } adder_kind_e;

  localparam int unsigned MUL_W = 8;          // operand width of the multiplier
  localparam int unsigned ADD_W = 2 * MUL_W;  // width of the reduction adders

  // Latency of one APEx adder: input register plus output register.
  localparam int unsigned APEX_LATENCY = 2;

endpackage
