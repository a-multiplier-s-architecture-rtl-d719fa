// tb_aad1: exhaustive check of the exact 2-bit LUT adder with carry out.
// All 32 input combinations are compared with the integer sum a+b+ci.
module tb_aad1;
  import approx_ref_pkg::*;

  logic [1:0] a, b, s;
  logic       ci, co;
  int checks = 0, failures = 0;

  aad1 dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {a, b, ci} = 5'(i);
      #1;
      checks++;
      if ({co, s} !== ref_aad1(int'(a), int'(b), int'(ci))) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d co=%0d s=%0d", a, b, ci, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
