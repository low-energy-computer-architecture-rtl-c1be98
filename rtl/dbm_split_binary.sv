// Split binary addition of the dual-base multiplier (stage 2, binary path).
//
// Column j's Sum and Carry carry the weight 16^j, i.e. they start at bit 4j.
// Since each is 9 bits wide (three digit positions), the columns are
// rearranged into six non-overlapping vectors: the Sums of columns j = 0, 1
// and 2 (mod 3) and likewise the Carrys.  A carry-save tree reduces the six
// vectors to two and a 128-bit Kogge-Stone adder produces the product.
// Column 32 has weight 2^128 and drops out of the 128-bit product.  The
// document rearranges into four vectors (stride two, 8-bit fields); the
// stride of three follows from the 9-bit fields of this design's column tree.
// Purely combinational.
module dbm_split_binary
  import dbm_pkg::*;
(
  input  col_t          col_sum   [NCOL],
  input  col_t          col_carry [NCOL],
  output logic [PW-1:0] product
);
  logic [PW-1:0] vec [6];

  always_comb begin
    logic [PW+3*COLW-1:0] wide [6];
    for (int v = 0; v < 6; v++) wide[v] = '0;
    for (int j = 0; j < NCOL; j++) begin
      wide[j % 3][4*j +: COLW]     = col_sum[j];
      wide[3 + j % 3][4*j +: COLW] = col_carry[j];
    end
    for (int v = 0; v < 6; v++) vec[v] = wide[v][PW-1:0];
  end

  logic [PW-1:0] s, c;
  logic          cout_unused;

  csa_tree #(.N(6), .W(PW)) u_csa (
    .rows  (vec),
    .sum   (s),
    .carry (c)
  );

  ks_adder #(.W(PW)) u_cpa (
    .a    (s),
    .b    (c),
    .cin  (1'b0),
    .sum  (product),
    .cout (cout_unused)
  );
endmodule
