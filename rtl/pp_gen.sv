// pp_gen - partial-product generator of an unsigned N x N array multiplier.
//
// Row i of the output is the multiplicand A gated by multiplier bit B[i] and
// shifted left by i places, so that the N rows summed give A * B. Each row is
// 2N bits wide, the width of the product. The AND-array form is the
// unsigned array multiplier the design starts from; no recoding (Booth or
// otherwise) is used.
//
// Interface: a, b operands (N bits each); pp[i] the i-th shifted partial
// product (2N bits). Purely combinational. Bits of row i below bit i and
// above bit i+N-1 are constant zero by construction; they are kept so that
// every row has the product's width and the rows can be added as vectors.
module pp_gen #(
  parameter int N = 64
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] pp [N]
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = ({{N{1'b0}}, a & {N{b[i]}}}) << i;
    end
  end

endmodule
