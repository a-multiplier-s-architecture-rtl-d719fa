// tb_approx_mult8: both configurations of the 8x8 approximate multiplier over
// all 65536 operand pairs. The LEADx configuration is combinational and is
// checked directly; the APEx configuration takes one pair per clock and each
// product is checked, with its valid bit, exactly 6 cycles later. Both are
// compared with the reference model of the 4-2-1 adder tree, and the error
// against the exact product is reported.
module tb_approx_mult8;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  localparam int APEX_LAT = 6;

  logic        clk = 0, rst_n = 0;
  logic        lv_in = 0, lv_out, av_in = 0, av_out;
  logic [7:0]  la = 0, lb = 0, aa = 0, ab = 0;
  logic [15:0] lp, ap;
  int checks = 0, failures = 0;
  int l_exact = 0, a_exact = 0;
  longint l_err = 0, a_err = 0;

  approx_mult8 #(.ADDER(ADDER_LEADX)) dut_l (
    .clk(clk), .rst_n(rst_n), .in_valid(lv_in), .a(la), .b(lb),
    .out_valid(lv_out), .p(lp));

  approx_mult8 #(.ADDER(ADDER_APEX)) dut_a (
    .clk(clk), .rst_n(rst_n), .in_valid(av_in), .a(aa), .b(ab),
    .out_valid(av_out), .p(ap));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint absdiff(int x, int y);
    return (x > y) ? longint'(x) - longint'(y) : longint'(y) - longint'(x);
  endfunction

  // LEADx: combinational, valid passes straight through.
  initial begin
    #1;
    for (int i = 0; i < 65536; i++) begin
      {la, lb} = 16'(i);
      lv_in = i[0];
      #1;
      checks++;
      if (lp !== ref_mult(0, la, lb) || lv_out !== lv_in) begin
        failures++;
        if (failures < 10) $display("FAIL leadx %0d*%0d got %0d exp %0d", la, lb, lp, ref_mult(0, la, lb));
      end
      if (int'(lp) == int'(la) * int'(lb)) l_exact++;
      l_err += absdiff(int'(lp), int'(la) * int'(lb));
    end
  end

  // APEx: one operation per cycle, result after APEX_LAT cycles.
  logic [15:0] a_exp [$];
  logic [15:0] a_exact_q [$];
  initial begin
    int issued, received, cyc;
    issued = 0; received = 0; cyc = 0;
    repeat (2) @(posedge clk);
    checks++;
    if (av_out !== 1'b0 || ap !== 16'd0) begin failures++; $display("FAIL reset state"); end
    rst_n <= 1;
    while (received < 65536) begin
      if (issued < 65536) begin
        {aa, ab} <= 16'(issued);
        av_in    <= 1'b1;
        a_exp.push_back(ref_mult(1, 8'(issued >> 8), 8'(issued)));
        a_exact_q.push_back(16'((issued >> 8) * (issued & 255)));
        issued++;
      end else begin
        av_in <= 1'b0;
      end
      @(posedge clk);
      #1;
      cyc++;
      if (av_out) begin
        logic [15:0] e, x;
        e = a_exp.pop_front();
        x = a_exact_q.pop_front();
        checks++;
        if (ap !== e) begin
          failures++;
          if (failures < 10) $display("FAIL apex result %0d got %0d exp %0d", received, ap, e);
        end
        // The first result must appear exactly APEX_LAT cycles after issue.
        if (received == 0) begin
          checks++;
          if (cyc != APEX_LAT) begin failures++; $display("FAIL apex latency %0d", cyc); end
        end
        if (ap == x) a_exact++;
        a_err += absdiff(int'(ap), int'(x));
        received++;
      end
    end
    $display("LEADx: exact %0d of 65536, mean error distance %0f", l_exact, real'(l_err) / 65536.0);
    $display("APEx:  exact %0d of 65536, mean error distance %0f", a_exact, real'(a_err) / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
