// wallace_tree - reduces N partial-product rows to two operands.
//
// The rows are taken three at a time into 3:2 carry-save adders (full adders
// on every bit: sum = a^b^c, carry = majority(a,b,c) shifted left one place);
// the rows that do not fill a group of three pass to the next layer
// unchanged. Layers repeat until two rows remain, the sum and the carry
// vector, whose integer sum equals the sum of all input rows. For 64 rows
// this takes 10 layers. Every intermediate row is non-negative and the rows
// of a layer add up to the product, which is below 2**(2N), so no row ever
// needs a bit above bit 2N-1 and the carries shifted out at the top are
// always zero.
//
// The design calls for Wallace-tree reduction of the partial products down
// to two operands; the row-wise grouping by threes is this design's choice.
//
// Interface: pp[i] the N input rows (2N bits each); sum, carry the two
// output operands. Purely combinational. Bit 0 of carry is always zero
// (carries are shifted up one place).
module wallace_tree
  import mfibvp_pkg::*;
#(
  parameter int N = 64
) (
  input  logic [2*N-1:0] pp [N],
  output logic [2*N-1:0] sum,
  output logic [2*N-1:0] carry
);

  localparam int W      = 2 * N;
  localparam int LEVELS = csa_levels(N);
  localparam int R      = (N < 2) ? 2 : N;  // storage rows (at least two)

  initial assert (N >= 2) else $error("wallace_tree: N must be at least 2");

  logic [W-1:0] cur [R];
  logic [W-1:0] nxt [R];

  always_comb begin
    int n;
    int groups;
    n = N;
    for (int i = 0; i < R; i++) cur[i] = (i < N) ? pp[i] : '0;
    for (int i = 0; i < R; i++) nxt[i] = '0;
    for (int lv = 0; lv < LEVELS; lv++) begin
      groups = n / 3;
      for (int i = 0; i < R; i++) nxt[i] = '0;
      for (int g = 0; g < R / 3; g++) begin
        if (g < groups) begin
          nxt[2*g]   = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
          nxt[2*g+1] = ((cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2]) |
                        (cur[3*g+1] & cur[3*g+2])) << 1;
        end
      end
      // rows left over from the grouping move down unchanged
      for (int j = 0; j < R; j++) begin
        if (j >= 3 * groups && j < n) nxt[2*groups + j - 3*groups] = cur[j];
      end
      n = csa_rows_after(n);
      for (int i = 0; i < R; i++) cur[i] = nxt[i];
    end
    sum   = cur[0];
    carry = cur[1];
  end

endmodule
