// approx_ref_pkg: reference models used by the testbenches.
//
// Each function recomputes, with plain integer arithmetic on bit fields, what
// the corresponding RTL block is specified to produce. They share no code with
// the RTL, so a testbench comparing the two checks the RTL against the
// specification rather than against itself.
package approx_ref_pkg;

  // AAd2: a + b + ci, saturated at 3.
  function automatic logic [1:0] ref_aad2(input int a, input int b, input int ci);
    int t;
    t = a + b + ci;
    return (t > 3) ? 2'd3 : 2'(t);
  endfunction

  // AAd1: exact a + b + ci, returned as {carry, sum[1:0]}.
  function automatic logic [2:0] ref_aad1(input int a, input int b, input int ci);
    return 3'(a + b + ci);
  endfunction

  // 8-bit LEADx unit: returns {cout, s[7:0]}.
  function automatic logic [8:0] ref_leadx8(input logic [7:0] a, input logic [7:0] b,
                                            input logic cin);
    int lo, mid, hi;
    logic [8:0] r;
    lo  = int'(a[1:0]) + int'(b[1:0]) + int'(cin);
    if (lo > 3) lo = 3;
    mid = int'(a[3:2]) + int'(b[3:2]) + int'({1'b0, a[1] & b[1]});
    hi  = int'(a[7:4]) + int'(b[7:4]) + mid / 4;
    r   = 9'((hi << 4) | ((mid % 4) << 2) | lo);
    return r;
  endfunction

  // 16-bit LEADx: returns {cout, s[15:0]}.
  function automatic logic [16:0] ref_leadx16(input logic [15:0] a, input logic [15:0] b);
    logic [8:0] l, h;
    l = ref_leadx8(a[7:0], b[7:0], 1'b0);
    h = ref_leadx8(a[15:8], b[15:8], l[8]);
    return {h, l[7:0]};
  endfunction

  // 16-bit APEx: low 8 bits are 1, high byte exact with carry predicted from
  // bits 7:6. Returns {cout, s[15:0]}.
  function automatic logic [16:0] ref_apex16(input logic [15:0] a, input logic [15:0] b);
    int c, hi;
    c  = ((int'(a[7:6]) + int'(b[7:6])) >= 4) ? 1 : 0;
    hi = int'(a[15:8]) + int'(b[15:8]) + c;
    return 17'((hi << 8) | 255);
  endfunction

  // Approximate 16-bit addition of the selected kind (0 = LEADx, 1 = APEx),
  // carry dropped.
  function automatic logic [15:0] ref_add(input int kind, input logic [15:0] a,
                                          input logic [15:0] b);
    logic [16:0] r;
    r = (kind == 1) ? ref_apex16(a, b) : ref_leadx16(a, b);
    return r[15:0];
  endfunction

  // 8x8 approximate multiplier: rows summed pairwise in a 4-2-1 tree.
  function automatic logic [15:0] ref_mult(input int kind, input logic [7:0] a,
                                           input logic [7:0] b);
    logic [15:0] row [8];
    logic [15:0] s1 [4];
    logic [15:0] s2 [2];
    for (int i = 0; i < 8; i++) row[i] = b[i] ? (16'(a) << i) : 16'd0;
    for (int j = 0; j < 4; j++) s1[j] = ref_add(kind, row[2*j], row[2*j+1]);
    for (int j = 0; j < 2; j++) s2[j] = ref_add(kind, s1[2*j], s1[2*j+1]);
    return ref_add(kind, s2[0], s2[1]);
  endfunction

  // Events inside one 16-bit LEADx addition, as a bit mask:
  //   bit 0  an AAd2 saturated (true 2-bit sum above 3)
  //   bit 1  the low unit passed a carry into the high unit
  //   bit 2  an AAd1 used a predicted carry of 1
  //   bit 3  a true carry out of bits 1:0 of a unit was lost (not predicted)
  function automatic logic [3:0] leadx16_events(input logic [15:0] a, input logic [15:0] b);
    logic [3:0] ev;
    logic [8:0] l;
    int ci;
    ev = '0;
    l  = ref_leadx8(a[7:0], b[7:0], 1'b0);
    for (int u = 0; u < 2; u++) begin
      int lo;
      ci = (u == 0) ? 0 : int'(l[8]);
      lo = int'(a[8*u +: 2]) + int'(b[8*u +: 2]) + ci;
      if (lo > 3) ev[0] = 1'b1;
      if (a[8*u+1] & b[8*u+1]) ev[2] = 1'b1;
      if (lo > 3 && !(a[8*u+1] & b[8*u+1])) ev[3] = 1'b1;
    end
    ev[1] = l[8];
    return ev;
  endfunction

  // 1 when a 16-bit APEx addition predicts a carry into its accurate byte.
  function automatic logic apex16_carry_event(input logic [15:0] a, input logic [15:0] b);
    return (int'(a[7:6]) + int'(b[7:6])) >= 4;
  endfunction

endpackage
