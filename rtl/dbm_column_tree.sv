// Shared binary column tree of the dual-base multiplier (end of stage 1).
//
// Each of the 33 partial products is a 17-digit vector starting at the
// column of its multiplier digit.  Column j gathers, for every partial
// product that reaches it, one 4-bit digit, and adds them as plain binary
// numbers in a carry-save tree, giving a column Sum and a column Carry.  No
// carry passes between columns, so the same tree serves binary digits
// (weight 16^j) and BCD digits (weight 10^j); the weighting is applied later
// by the split binary and split decimal paths.
//
// A negative partial product is the complemented multiple plus a sign bit of
// weight 1 at its lowest column.  The two sign bits of multiplier digit j
// enter column j's tree as two 1-bit rows.  Above its 17 digits a negative
// partial product is extended with digits F (binary) or 9 (decimal) up to
// column 32, so every column sum is exact modulo 16^33 or 10^33.  This
// explicit extension is this design's choice (the document does not say how
// the sign is extended); it makes column totals reach 33*15+2 = 497, so the
// column Sum and Carry are 9 bits wide.  Purely combinational.
module dbm_column_tree
  import dbm_pkg::*;
(
  input  logic  bd,
  input  mult_t pp1  [NDIG+1],
  input  mult_t pp2  [NDIG+1],
  input  logic  neg1 [NDIG+1],
  input  logic  neg2 [NDIG+1],
  output col_t  col_sum   [NCOL],
  output col_t  col_carry [NCOL]
);
  localparam int NROW = NPP + 2;   // 33 digit rows and 2 sign-bit rows

  digit_t fill;
  assign fill = bd ? 4'd9 : 4'd15;

  for (genvar j = 0; j < NCOL; j++) begin : g_col
    localparam int JS = (j <= NDIG) ? j : 0;   // sign bits exist for columns 0..16
    col_t rows [NROW];

    always_comb begin
      for (int r = 0; r < NROW; r++) rows[r] = '0;
      for (int i = 0; i <= NDIG; i++) begin
        if (i <= j) begin
          if (j - i < PPDIG) begin
            rows[2*i] = col_t'(pp1[i][4*(j-i) +: 4]);
            if (i < NDIG) rows[2*i+1] = col_t'(pp2[i][4*(j-i) +: 4]);
          end else begin
            rows[2*i] = neg1[i] ? col_t'(fill) : '0;
            if (i < NDIG) rows[2*i+1] = neg2[i] ? col_t'(fill) : '0;
          end
        end
      end
      if (j <= NDIG) begin
        rows[NPP]   = col_t'(neg1[JS]);
        rows[NPP+1] = col_t'(neg2[JS]);
      end
    end

    csa_tree #(.N(NROW), .W(COLW)) u_tree (
      .rows  (rows),
      .sum   (col_sum[j]),
      .carry (col_carry[j])
    );
  end
endmodule
