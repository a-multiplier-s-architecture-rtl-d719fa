// pp_gen: partial-product generator of the N x N multiplier.
//
// Row i is the multiplicand ANDed with multiplier bit i and shifted left by i,
// placed in a 2N-bit word, so the N rows sum to the exact product. The rows are
// the dot diagram of an array multiplier; the reduction adders that follow take
// them in pairs.
//
// Ports: a (multiplicand), b (multiplier), N bits each -> pp[N] rows of 2N bits.
// Combinational.
module pp_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] pp [N]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = ({{N{1'b0}}, a} & {2*N{b[i]}}) << i;
    end
  end

endmodule
