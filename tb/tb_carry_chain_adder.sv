// tb_carry_chain_adder: the accurate carry-chain adder at its default width
// (8 bits) is checked exhaustively over a, b and cin against integer addition.
module tb_carry_chain_adder;
  localparam int W = 8;

  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  carry_chain_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * W + 1)); i++) begin
      {a, b, cin} = (2 * W + 1)'(i);
      #1;
      checks++;
      if (int'({cout, s}) != int'(a) + int'(b) + int'(cin)) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d b=%0d cin=%0d sum=%0d", a, b, cin, {cout, s});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
