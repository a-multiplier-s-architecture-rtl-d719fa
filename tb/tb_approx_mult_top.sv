// tb_approx_mult_top: end-to-end test of the top at its default parameters.
//
// Every one of the 65536 operand pairs goes through both multipliers. The
// LEADx multiplier is checked in the cycle its operands are applied; the APEx
// multiplier takes operands with random idle cycles (in_valid low) between
// them, and every valid product is matched, in order, with the reference
// model and must arrive exactly 6 cycles after issue. Halfway through, a
// synchronous reset is applied while operations are in flight: the APEx
// pipeline must drop them and come back clean.
//
// Each mechanism of the design must occur at least once, or a failure is
// counted: AAd2 saturation, carry from the low LEADx unit into the high one,
// AAd1 predicted carry, a carry lost between AAd2 and AAd1, APEx predicted
// carry into its accurate byte, an APEx idle cycle, the mid-stream reset.
module tb_approx_mult_top;
  import approx_ref_pkg::*;

  localparam int APEX_LAT = 6;

  logic        clk = 0, rst_n = 0;
  logic        lx_valid_in = 0, lx_valid_out, ax_valid_in = 0, ax_valid_out;
  logic [7:0]  lx_a = 0, lx_b = 0, ax_a = 0, ax_b = 0;
  logic [15:0] lx_p, ax_p;
  int checks = 0, failures = 0;
  int ev_sat = 0, ev_mid = 0, ev_pred = 0, ev_lost = 0, ev_apex_carry = 0;
  int ev_idle = 0, ev_reset = 0, ev_dropped = 0;
  logic lx_done = 0;

  approx_mult_top dut (
    .clk(clk), .rst_n(rst_n),
    .lx_valid_in(lx_valid_in), .lx_a(lx_a), .lx_b(lx_b),
    .lx_valid_out(lx_valid_out), .lx_p(lx_p),
    .ax_valid_in(ax_valid_in), .ax_a(ax_a), .ax_b(ax_b),
    .ax_valid_out(ax_valid_out), .ax_p(ax_p));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count the mechanisms exercised by one multiplication of each kind by
  // walking the same 4-2-1 adder tree as the reference model.
  task automatic count_events(input logic [7:0] a, input logic [7:0] b, input int kind);
    logic [15:0] row [8];
    logic [15:0] s1 [4];
    logic [15:0] s2 [2];
    logic [3:0]  ev;
    for (int i = 0; i < 8; i++) row[i] = b[i] ? (16'(a) << i) : 16'd0;
    for (int j = 0; j < 4; j++) s1[j] = ref_add(kind, row[2*j], row[2*j+1]);
    for (int j = 0; j < 2; j++) s2[j] = ref_add(kind, s1[2*j], s1[2*j+1]);
    if (kind == 0) begin
      ev = '0;
      for (int j = 0; j < 4; j++) ev |= leadx16_events(row[2*j], row[2*j+1]);
      for (int j = 0; j < 2; j++) ev |= leadx16_events(s1[2*j], s1[2*j+1]);
      ev |= leadx16_events(s2[0], s2[1]);
      if (ev[0]) ev_sat++;
      if (ev[1]) ev_mid++;
      if (ev[2]) ev_pred++;
      if (ev[3]) ev_lost++;
    end else begin
      logic any;
      any = 1'b0;
      for (int j = 0; j < 4; j++) any |= apex16_carry_event(row[2*j], row[2*j+1]);
      for (int j = 0; j < 2; j++) any |= apex16_carry_event(s1[2*j], s1[2*j+1]);
      any |= apex16_carry_event(s2[0], s2[1]);
      if (any) ev_apex_carry++;
    end
  endtask

  // LEADx side: combinational, one pair per cycle on the negative edge.
  initial begin
    @(negedge clk);
    for (int i = 0; i < 65536; i++) begin
      lx_a = 8'(i >> 8);
      lx_b = 8'(i);
      lx_valid_in = 1'b1;
      #1;
      checks++;
      if (lx_p !== ref_mult(0, lx_a, lx_b) || lx_valid_out !== 1'b1) begin
        failures++;
        if (failures < 10) $display("FAIL leadx %0d*%0d = %0d exp %0d", lx_a, lx_b, lx_p, ref_mult(0, lx_a, lx_b));
      end
      count_events(lx_a, lx_b, 0);
      @(negedge clk);
    end
    lx_valid_in = 1'b0;
    #1;
    checks++;
    if (lx_valid_out !== 1'b0) failures++;
    lx_done = 1'b1;
  end

  // APEx side: issue with random idle cycles, check in order with latency.
  logic [15:0] exp_q [$];
  int          issue_cyc_q [$];
  initial begin
    int next, cyc, done;
    next = 0; cyc = 0; done = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    while (done == 0) begin
      // Mid-stream reset while operations are in flight.
      if (next == 32768 && ev_reset == 0) begin
        rst_n       <= 1'b0;
        ax_valid_in <= 1'b0;
        ev_reset++;
        @(posedge clk); #1; cyc++;
        checks++;
        if (ax_valid_out !== 1'b0) begin failures++; $display("FAIL valid after reset"); end
        ev_dropped = exp_q.size();
        // Operations in flight are lost; the ones before them must be replayed.
        next -= exp_q.size();
        exp_q.delete();
        issue_cyc_q.delete();
        rst_n <= 1'b1;
      end
      if (next < 65536 && ($urandom % 4) != 0) begin
        ax_a        <= 8'(next >> 8);
        ax_b        <= 8'(next);
        ax_valid_in <= 1'b1;
        exp_q.push_back(ref_mult(1, 8'(next >> 8), 8'(next)));
        issue_cyc_q.push_back(cyc);
        count_events(8'(next >> 8), 8'(next), 1);
        next++;
      end else begin
        ax_valid_in <= 1'b0;
        if (next < 65536) ev_idle++;
      end
      @(posedge clk); #1; cyc++;
      if (ax_valid_out) begin
        logic [15:0] e;
        int ic;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL unexpected valid output");
        end else begin
          e  = exp_q.pop_front();
          ic = issue_cyc_q.pop_front();
          if (ax_p !== e) begin
            failures++;
            if (failures < 10) $display("FAIL apex got %0d exp %0d", ax_p, e);
          end
          checks++;
          if (cyc - ic != APEX_LAT) begin
            failures++;
            if (failures < 10) $display("FAIL apex latency %0d", cyc - ic);
          end
        end
      end
      if (next == 65536 && exp_q.size() == 0) done = 1;
    end
    wait (lx_done);
    $display("leadx: saturations=%0d mid carries=%0d predicted carries=%0d lost carries=%0d",
             ev_sat, ev_mid, ev_pred, ev_lost);
    $display("apex: predicted carries=%0d idle cycles=%0d resets=%0d dropped in flight=%0d",
             ev_apex_carry, ev_idle, ev_reset, ev_dropped);
    checks++; if (ev_sat == 0)        failures++;
    checks++; if (ev_mid == 0)        failures++;
    checks++; if (ev_pred == 0)       failures++;
    checks++; if (ev_lost == 0)       failures++;
    checks++; if (ev_apex_carry == 0) failures++;
    checks++; if (ev_idle == 0)       failures++;
    checks++; if (ev_reset == 0 || ev_dropped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
