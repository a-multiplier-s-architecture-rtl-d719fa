// tb_leadx16: 16-bit LEADx adder against the reference model, with corner
// values and 200000 random operand pairs. Counts carries passed from the low
// 8-bit unit into the high one, and the error statistics of the adder.
module tb_leadx16;
  import approx_ref_pkg::*;

  logic [15:0] a, b, s;
  logic        cout;
  int checks = 0, failures = 0, mid_carry = 0, exact = 0;
  longint err_sum = 0;

  leadx16 dut (.a(a), .b(b), .s(s), .cout(cout));

  task automatic check();
    logic [16:0] exp;
    int lo_sum;
    #1;
    checks++;
    exp = ref_leadx16(a, b);
    lo_sum = int'(a[7:0]) + int'(b[7:0]);
    if (exp[16:0] != 17'(int'(a) + int'(b))) err_sum += longint'(int'(a)) + longint'(int'(b)) - longint'(exp);
    else exact++;
    if (ref_leadx8(a[7:0], b[7:0], 1'b0) >= 9'h100) mid_carry++;
    if ({cout, s} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h got=%h exp=%h", a, b, {cout, s}, exp);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0;      b = 0;      check();
    a = 16'hFFFF; b = 16'hFFFF; check();
    a = 16'h00FF; b = 16'h0001; check();
    a = 16'h0080; b = 16'h0080; check();
    a = 16'h8000; b = 16'h8000; check();
    for (int i = 0; i < 200000; i++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      check();
    end
    checks++;
    if (mid_carry == 0) failures++;
    $display("carries into high unit=%0d exact=%0d mean error=%0f", mid_carry, exact,
             real'(err_sum) / real'(checks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
