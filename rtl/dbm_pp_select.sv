// Partial products selection of the dual-base multiplier (stage 1).
//
// The 64-bit multiplier operand b is read as 16 four-bit digits.  For Booth
// recoding it is padded with one 0 bit on the right and four 0 bits on the
// left, giving 17 digits; digit i sees its own bits b[4i+3:4i] and the top
// bit of the digit below, b[4i-1].  Each digit drives two multiplexers:
//   MUX1 picks 0, A or 2A, possibly complemented (sign bit neg1),
//   MUX2 picks 0, 4A or 8A (binary, sign bit neg2) or 0, 5A or 10A (decimal).
// The select and invert conditions are the sum-of-products equations of the
// document (cond.1, cond.2, Inv.1 for MUX1; cond.4, cond.8, cond.5, cond.10,
// Inv.2 for MUX2), merged by the binary/decimal control bd (0 = binary).
// Binary digit values -8..8 split as 4*(-2b3+b2+b1) + (-2b1+b0+b-1); decimal
// digits 0..9 split as in the document's table (e.g. 3 = 5 - 2, 8 = 10 - 2).
// Digit 16 only ever selects 0 or A in MUX1 and has no MUX2, so 33 partial
// products result.  Purely combinational.
module dbm_pp_select
  import dbm_pkg::*;
(
  input  logic [4*NDIG-1:0] b,
  input  logic              bd,
  input  mult_t bx1, bx2, bx4, bx8,
  input  mult_t bx1_n, bx2_n, bx4_n, bx8_n,
  input  mult_t dx1, dx2, dx5, dx10,
  input  mult_t dx1_n, dx2_n,
  output mult_t pp1  [NDIG+1],
  output mult_t pp2  [NDIG+1],
  output logic  neg1 [NDIG+1],
  output logic  neg2 [NDIG+1]
);
  // padded multiplier: four 0 bits on the left, one 0 bit on the right
  logic [4*NDIG+4:0] bp;
  assign bp = {4'b0000, b, 1'b0};

  always_comb begin
    for (int i = 0; i <= NDIG; i++) begin
      logic bm1, b0, b1, b2, b3, c;
      logic c1, c2, inv1, c4, c8, c5, c10, inv2;
      bm1 = bp[4*i];
      b0  = bp[4*i+1];
      b1  = bp[4*i+2];
      b2  = bp[4*i+3];
      b3  = bp[4*i+4];
      c   = bd;
      // MUX1 conditions (2.1)-(2.7)
      c1   = ((b0 & ~bm1) | (~b0 & bm1)) & ~c
           | ((~b0 & b2) | (b0 & ~b1 & ~b2)) & c;
      c2   = ((~b0 & b1 & ~bm1) | (b0 & ~b1 & bm1)) & ~c
           | ((~b0 & b3) | (b0 & b1) | (b1 & ~b2)) & c;
      inv1 = ((~b0 & b1) | (b1 & ~bm1)) & ~c
           | (b3 | (b0 & b1 & ~b2) | (~b0 & ~b1 & b2)) & c;
      // MUX2 conditions (2.8)-(2.12)
      c4   = ((b1 & ~b2) | (~b1 & b2)) & ~c;
      c8   = ((~b1 & ~b2 & b3) | (b1 & b2 & ~b3)) & ~c;
      c5   = ((b0 & b1) | (b2 & ~b3)) & c;
      c10  = b3 & c;
      inv2 = b3 & ~c;

      pp1[i] = '0;
      if (c1)      pp1[i] = c ? (inv1 ? dx1_n : dx1) : (inv1 ? bx1_n : bx1);
      else if (c2) pp1[i] = c ? (inv1 ? dx2_n : dx2) : (inv1 ? bx2_n : bx2);
      else if (inv1) pp1[i] = c ? {PPDIG{4'd9}} : '1;
      neg1[i] = inv1;

      pp2[i] = '0;
      if (c4)       pp2[i] = inv2 ? bx4_n : bx4;
      else if (c8)  pp2[i] = inv2 ? bx8_n : bx8;
      else if (c5)  pp2[i] = dx5;
      else if (c10) pp2[i] = dx10;
      else if (inv2) pp2[i] = '1;
      neg2[i] = inv2;
    end
  end
endmodule
