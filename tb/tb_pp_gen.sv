// tb_pp_gen: exhaustive check of the 8x8 partial-product rows: each row must
// equal a shifted by i when b[i] is set and 0 otherwise, and the rows must sum
// to the exact product a*b.
module tb_pp_gen;
  logic [7:0]  a, b;
  logic [15:0] pp [8];
  int checks = 0, failures = 0;

  pp_gen #(.N(8)) dut (.a(a), .b(b), .pp(pp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int total;
      {a, b} = 16'(i);
      #1;
      total = 0;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (int'(pp[r]) != (b[r] ? int'(a) * (1 << r) : 0)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d row %0d = %h", a, b, r, pp[r]);
        end
        total += int'(pp[r]);
      end
      checks++;
      if (total != int'(a) * int'(b)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
