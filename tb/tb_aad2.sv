// tb_aad2: exhaustive check of the saturating 2-bit approximate adder.
// All 32 input combinations are applied and compared with min(a+b+ci, 3).
// Also counts how many combinations saturate, which must be some.
module tb_aad2;
  import approx_ref_pkg::*;

  logic [1:0] a, b, s;
  logic       ci;
  int checks = 0, failures = 0, saturated = 0;

  aad2 dut (.a(a), .b(b), .ci(ci), .s(s));

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
      if (int'(a) + int'(b) + int'(ci) > 3) saturated++;
      if (s !== ref_aad2(int'(a), int'(b), int'(ci))) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d s=%0d", a, b, ci, s);
      end
    end
    checks++;
    if (saturated == 0) failures++;
    $display("saturating combinations: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
