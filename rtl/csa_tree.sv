// Carry-save adder tree (Wallace style).
//
// Reduces N rows of W bits to a Sum row and a Carry row whose sum equals the
// sum of the inputs modulo 2^W.  Each level groups the rows in threes and
// replaces every group by a 3:2 counter output (sum bits and majority bits
// shifted left by one); rows left over pass to the next level unchanged.
// The row count per level follows n' = 2*floor(n/3) + (n mod 3) until two
// rows remain.  Purely combinational.
//
// The multiplier's column tree uses it with W = 9 (one tree per digit column)
// and its binary split path uses it on full-width vectors.
module csa_tree #(
  parameter int N = 3,
  parameter int W = 8
) (
  input  logic [W-1:0] rows [N],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);
  localparam int MAXL = 16;

  // rows present after l levels
  function automatic int count_at(int l);
    int n;
    n = N;
    for (int i = 0; i < l; i++)
      if (n > 2) n = (n / 3) * 2 + n % 3;
    return n;
  endfunction

  localparam int NA = (N < 2) ? 2 : N;

  always_comb begin
    logic [W-1:0] cur [NA];
    logic [W-1:0] nxt [NA];
    int ni, ng;
    for (int r = 0; r < NA; r++) cur[r] = (r < N) ? rows[r] : '0;
    for (int l = 0; l < MAXL; l++) begin
      ni = count_at(l);
      ng = (ni > 2) ? ni / 3 : 0;
      for (int r = 0; r < NA; r++) nxt[r] = '0;
      for (int g = 0; g < NA / 3; g++) begin
        if (g < ng) begin
          nxt[2*g]   = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
          nxt[2*g+1] = ((cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2])
                        | (cur[3*g+1] & cur[3*g+2])) << 1;
        end
      end
      for (int r = 0; r < NA; r++) begin
        if (r >= 3 * ng && r < ni) nxt[2*ng + r - 3*ng] = cur[r];
      end
      cur = nxt;
    end
    sum   = cur[0];
    carry = cur[1];
  end
endmodule
