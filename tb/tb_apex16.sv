// tb_apex16: pipelined 16-bit APEx adder. After reset the outputs must be 0;
// then a new random operand pair is presented every clock and each result is
// checked against the reference model exactly two cycles later. A mid-stream
// reset must clear both register stages.
module tb_apex16;
  import approx_ref_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [15:0] a = 0, b = 0, s;
  logic        cout;
  logic [16:0] expq [$];
  int checks = 0, failures = 0, cycles = 0, carries_in = 0;

  apex16 dut (.clk(clk), .rst_n(rst_n), .a(a), .b(b), .s(s), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_random(int n);
    for (int i = 0; i < n; i++) begin
      a <= 16'($urandom);
      b <= 16'($urandom);
      @(posedge clk);
      #1;
      expq.push_back(ref_apex16(a, b));
      if (int'(a[7:6]) + int'(b[7:6]) >= 4) carries_in++;
      // The pair captured one edge earlier must now be on the outputs.
      if (expq.size() == 2) begin
        logic [16:0] e;
        e = expq.pop_front();
        checks++;
        if ({cout, s} !== e) begin
          failures++;
          if (failures < 10) $display("FAIL got=%h exp=%h", {cout, s}, e);
        end
      end
    end
  endtask

  initial begin
    a = 16'h1234; b = 16'h4321;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if ({cout, s} !== 17'd0) begin failures++; $display("FAIL outputs not cleared by reset"); end
    rst_n = 1;
    // Exactly two edges: first operands captured, then result registered.
    @(posedge clk); #1;
    checks++;
    // Only the cleared input register has reached the output so far.
    if ({cout, s} !== ref_apex16(16'd0, 16'd0)) begin failures++; $display("FAIL result after one edge"); end
    @(posedge clk); #1;
    checks++;
    if ({cout, s} !== ref_apex16(16'h1234, 16'h4321)) begin
      failures++; $display("FAIL latency: got=%h", {cout, s});
    end
    // Known value: low byte forced to ones, high byte exact with predicted carry.
    checks++;
    if (s !== 16'h55FF) begin failures++; $display("FAIL 1234+4321 got %h", s); end
    @(negedge clk);
    expq.push_back(ref_apex16(a, b));  // pair already held in the input register
    drive_random(5000);
    // Mid-stream reset clears the pipeline.
    rst_n <= 0;
    @(posedge clk); #1;
    checks++;
    if ({cout, s} !== 17'd0) begin failures++; $display("FAIL mid-stream reset"); end
    checks++;
    if (carries_in == 0) failures++;
    $display("predicted carries into accurate part=%0d", carries_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
