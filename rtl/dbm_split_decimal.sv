// Split decimal addition of the dual-base multiplier (stage 2, decimal path).
//
// 1. A 9-bit Kogge-Stone adder adds each column's Sum and Carry, giving the
//    column total (at most 497) in binary.
// 2. A binary-to-BCD converter (shift-and-add-3) turns each total into three
//    BCD-8421 digits, which are then recoded to BCD-4221.  This is where all
//    decimal correction happens; the column tree itself is purely binary.
// 3. The three digits of column j have weights 10^j, 10^(j+1), 10^(j+2);
//    columns j = 0, 1, 2 (mod 3) go to three non-overlapping vectors.
// 4. A decimal 3:2 carry-save adder works bitwise on the BCD-4221 digits:
//    the sum digits are valid 4221 codes, and the carry digits are doubled
//    by recoding them to BCD-5211 and shifting the vector left one bit,
//    which gives 2x in BCD-4221.
// 5. Both vectors are recoded to BCD-8421 and a decimal Kogge-Stone CPA
//    gives the 32-digit product (digits above 31 are dropped).
// Purely combinational.
module dbm_split_decimal
  import dbm_pkg::*;
(
  input  col_t          col_sum   [NCOL],
  input  col_t          col_carry [NCOL],
  output logic [PW-1:0] product
);
  localparam int ND = 2 * NDIG;   // product digits

  // 9-bit binary to three BCD-8421 digits
  function automatic logic [11:0] bin_to_bcd(col_t v);
    logic [20:0] sh;
    sh = {12'd0, v};
    for (int k = 0; k < COLW; k++) begin
      for (int d = 0; d < 3; d++)
        if (sh[COLW + 4*d +: 4] >= 4'd5) sh[COLW + 4*d +: 4] = sh[COLW + 4*d +: 4] + 4'd3;
      sh = sh << 1;
    end
    return sh[COLW +: 12];
  endfunction

  col_t col_total [NCOL];

  for (genvar j = 0; j < NCOL; j++) begin : g_colcpa
    logic co_unused;
    ks_adder #(.W(COLW)) u_cpa (
      .a    (col_sum[j]),
      .b    (col_carry[j]),
      .cin  (1'b0),
      .sum  (col_total[j]),
      .cout (co_unused)
    );
  end

  // three rearranged BCD-4221 vectors
  logic [4*ND-1:0] v4221 [3];

  always_comb begin
    for (int v = 0; v < 3; v++) v4221[v] = '0;
    for (int j = 0; j < NCOL; j++) begin
      logic [11:0] bcd;
      bcd = bin_to_bcd(col_total[j]);
      for (int d = 0; d < 3; d++)
        if (j + d < ND) v4221[j % 3][4*(j+d) +: 4] = bcd8421_to_4221(bcd[4*d +: 4]);
    end
  end

  // decimal carry-save adder in BCD-4221
  logic [4*ND-1:0] s4221, h4221, h5211, h2_4221;
  assign s4221 = v4221[0] ^ v4221[1] ^ v4221[2];
  assign h4221 = (v4221[0] & v4221[1]) | (v4221[0] & v4221[2]) | (v4221[1] & v4221[2]);

  always_comb begin
    for (int d = 0; d < ND; d++) h5211[4*d +: 4] = value_to_5211(bcd4221_value(h4221[4*d +: 4]));
  end
  assign h2_4221 = h5211 << 1;

  // recode to BCD-8421 for the final CPA
  logic [4*ND-1:0] s8421, h8421;
  always_comb begin
    for (int d = 0; d < ND; d++) begin
      s8421[4*d +: 4] = bcd4221_value(s4221[4*d +: 4]);
      h8421[4*d +: 4] = bcd4221_value(h2_4221[4*d +: 4]);
    end
  end

  logic cout_unused;
  decimal_cpa #(.ND(ND)) u_dcpa (
    .a    (s8421),
    .b    (h8421),
    .cin  (1'b0),
    .sum  (product),
    .cout (cout_unused)
  );
endmodule
