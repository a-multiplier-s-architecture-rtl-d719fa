// tb_leadx8: exhaustive check of the 8-bit LEADx unit over a, b and cin
// (2^17 combinations) against the reference model. Counts the events that
// make the unit approximate: AAd2 saturation and a missed carry into bit 2.
module tb_leadx8;
  import approx_ref_pkg::*;

  logic [7:0] a, b, s;
  logic       cin, cout;
  int checks = 0, failures = 0, sat = 0, missed = 0, exact = 0;

  leadx8 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      {a, b, cin} = 17'(i);
      #1;
      checks++;
      if (int'(a[1:0]) + int'(b[1:0]) + int'(cin) > 3) sat++;
      if ((int'(a[1:0]) + int'(b[1:0]) + int'(cin) > 3) && !(a[1] & b[1])) missed++;
      if (int'({cout, s}) == int'(a) + int'(b) + int'(cin)) exact++;
      if ({cout, s} !== ref_leadx8(a, b, cin)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%h b=%h cin=%0d got=%h", a, b, cin, {cout, s});
      end
    end
    checks += 2;
    if (sat == 0)    failures++;
    if (missed == 0) failures++;
    $display("saturations=%0d missed carries=%0d exact results=%0d", sat, missed, exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
