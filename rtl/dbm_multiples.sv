// Multiplicand multiples generation of the dual-base multiplier (stage 1).
//
// Binary mode uses radix-16 Booth recoding and needs A, 2A, 4A and 8A, made
// by shifting the 64-bit multiplicand by 0..3 bits.  Decimal mode uses the
// BCD-8421 signed-digit radix-5 recoding and needs A, 2A, 5A and 10A:
//   2A  : each digit is recoded to BCD-5421 and the whole vector is shifted
//         left by one bit, which yields 2A directly in BCD-8421;
//   5A  : the BCD-8421 vector shifted left by three bits is 5A in BCD-5421,
//         which is then recoded digit by digit to BCD-8421;
//   10A : a one-digit (4-bit) shift.
// Negative multiples are prepared here as the ones' complement (binary) or
// the digit-wise nine's complement (decimal) of the positive multiple; the
// +1 that completes the two's / ten's complement is a sign bit added later
// in the column tree.  All multiples are 17 digits (68 bits) wide.  The
// decimal outputs are meaningful only for a valid BCD input.  Purely
// combinational.
module dbm_multiples
  import dbm_pkg::*;
(
  input  logic [4*NDIG-1:0] a,
  // binary multiples and their ones' complements
  output mult_t bx1, bx2, bx4, bx8,
  output mult_t bx1_n, bx2_n, bx4_n, bx8_n,
  // decimal multiples and nine's complements of A and 2A
  output mult_t dx1, dx2, dx5, dx10,
  output mult_t dx1_n, dx2_n
);
  mult_t a_ext, a5421, a5_5421;

  assign a_ext = {4'd0, a};
  assign bx1 = a_ext;
  assign bx2 = a_ext << 1;
  assign bx4 = a_ext << 2;
  assign bx8 = a_ext << 3;
  assign bx1_n = ~bx1;
  assign bx2_n = ~bx2;
  assign bx4_n = ~bx4;
  assign bx8_n = ~bx8;

  always_comb begin
    for (int i = 0; i < PPDIG; i++) a5421[4*i +: 4] = bcd8421_to_5421(a_ext[4*i +: 4]);
  end
  assign dx2     = a5421 << 1;
  assign a5_5421 = a_ext << 3;
  always_comb begin
    for (int i = 0; i < PPDIG; i++) dx5[4*i +: 4] = bcd5421_to_8421(a5_5421[4*i +: 4]);
  end
  assign dx1  = a_ext;
  assign dx10 = a_ext << 4;
  always_comb begin
    for (int i = 0; i < PPDIG; i++) begin
      dx1_n[4*i +: 4] = nines(dx1[4*i +: 4]);
      dx2_n[4*i +: 4] = nines(dx2[4*i +: 4]);
    end
  end
endmodule
