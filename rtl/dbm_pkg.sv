// Shared constants and helper functions of the dual-base (binary/decimal)
// multiplier, DBM.
//
// Operands are 64 bits wide and are read as 16 four-bit digits, either
// hexadecimal digits (binary mode) or BCD-8421 digits (decimal mode).  The
// multiplier produces 33 partial products (two per multiplier digit plus one
// for the extra Booth digit), which are summed column by column: column j
// collects every partial-product digit of weight 16^j (binary) or 10^j
// (decimal).  Columns run from 0 to 32.  A column total never exceeds
// 33*15+2 = 497, so a 9-bit field holds a column Sum, Carry or total.
//
// The BCD recoding helpers (8421 <-> 5421, 4221, 5211) are the digit
// encodings used by the decimal multiple generation and the decimal
// carry-save adder.
package dbm_pkg;

  localparam int NDIG  = 16;            // operand digits
  localparam int OPW   = 4 * NDIG;      // operand width, 64
  localparam int PPDIG = NDIG + 1;      // digits in one multiple / partial product
  localparam int NPP   = 2 * NDIG + 1;  // partial products, 33
  localparam int NCOL  = 2 * NDIG + 1;  // column count, 33
  localparam int COLW  = 9;             // column Sum / Carry width
  localparam int PW    = 8 * NDIG;      // product width, 128

  typedef logic [3:0] digit_t;
  typedef logic [4*PPDIG-1:0] mult_t;   // one multiplicand multiple, 17 digits
  typedef logic [COLW-1:0] col_t;

  // BCD-8421 digit (0..9) to BCD-5421 code
  function automatic digit_t bcd8421_to_5421(digit_t d);
    return (d >= 4'd5) ? d + 4'd3 : d;
  endfunction

  // BCD-5421 code to BCD-8421 digit
  function automatic digit_t bcd5421_to_8421(digit_t c);
    return c[3] ? 4'd5 + {1'b0, c[2:0]} : {1'b0, c[2:0]};
  endfunction

  // value of a BCD-4221 code (0..9)
  function automatic digit_t bcd4221_value(digit_t c);
    return 4'(4 * c[3] + 2 * c[2] + 2 * c[1] + c[0]);
  endfunction

  // BCD-8421 digit (0..9) to a BCD-4221 code: 0-3 keep their code, 4-7
  // set the weight-4 bit, 8 and 9 also set both weight-2 bits
  function automatic digit_t bcd8421_to_4221(digit_t d);
    digit_t r;
    if (d >= 4'd8)      r = {3'b111, d[0]};
    else if (d >= 4'd4) r = {2'b10, d[1:0]};
    else                r = d;
    return r;
  endfunction

  // value (0..9) to a BCD-5211 code
  function automatic digit_t value_to_5211(digit_t v);
    digit_t lo, r;
    lo = (v >= 4'd5) ? v - 4'd5 : v;
    case (lo)
      4'd0:    r = 4'b0000;
      4'd1:    r = 4'b0001;
      4'd2:    r = 4'b0100;
      4'd3:    r = 4'b0101;
      default: r = 4'b0111;
    endcase
    r[3] = (v >= 4'd5);
    return r;
  endfunction

  // nine's complement of a BCD-8421 digit
  function automatic digit_t nines(digit_t d);
    return 4'd9 - d;
  endfunction

endpackage
