// Clock-gated two-stage pipelined dual-base (binary/decimal) multiplier.
//
// Multiplies two 64-bit operands, either unsigned binary (bd = 0) or
// 16-digit BCD-8421 (bd = 1), into a 128-bit binary or 32-digit BCD
// product.  One operation can start every clock; the product appears two
// rising edges after the operands.
//
// Stage 1 (combinational from the inputs): multiples generation, partial
//   products selection and the shared binary column tree.  At the first
//   rising edge the 33 column Sum/Carry pairs are stored either in the
//   binary-path register bank or in the decimal-path register bank; the
//   other bank's clock is gated off, so only one split path switches.
// Stage 2: split binary addition or split decimal addition; at the second
//   rising edge the product of the active path is stored in the output
//   register.
//
// Clock gating: every clock gate captures its enable on the falling edge
// (the negative-edge register of the document) and ANDs it with clk.  The
// bank enables are mult_en & ~bd and mult_en & bd, so with mult_en low no
// datapath register is clocked at all.  Inputs must therefore be stable
// from before the falling edge that precedes the capturing rising edge,
// i.e. for the whole cycle in which they are presented.
//
// The stage boundary after the column tree and the gating follow the
// document's chosen pipeline (two binary and two decimal stages).  The
// output register, the p_valid/p_bd flags and the asynchronous active-low
// reset of the control flags are this design's choices.
module dbm_multiplier
  import dbm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              mult_en,
  input  logic              bd,
  input  logic [4*NDIG-1:0] a,
  input  logic [4*NDIG-1:0] b,
  output logic [PW-1:0]     p,
  output logic              p_valid,
  output logic              p_bd
);
  // ---------------- stage 1 ----------------
  mult_t bx1, bx2, bx4, bx8, bx1_n, bx2_n, bx4_n, bx8_n;
  mult_t dx1, dx2, dx5, dx10, dx1_n, dx2_n;

  dbm_multiples u_mult (
    .a, .bx1, .bx2, .bx4, .bx8, .bx1_n, .bx2_n, .bx4_n, .bx8_n,
    .dx1, .dx2, .dx5, .dx10, .dx1_n, .dx2_n
  );

  mult_t pp1 [NDIG+1];
  mult_t pp2 [NDIG+1];
  logic  neg1 [NDIG+1];
  logic  neg2 [NDIG+1];

  dbm_pp_select u_sel (
    .b, .bd, .bx1, .bx2, .bx4, .bx8, .bx1_n, .bx2_n, .bx4_n, .bx8_n,
    .dx1, .dx2, .dx5, .dx10, .dx1_n, .dx2_n,
    .pp1, .pp2, .neg1, .neg2
  );

  col_t col_sum   [NCOL];
  col_t col_carry [NCOL];

  dbm_column_tree u_tree (
    .bd, .pp1, .pp2, .neg1, .neg2, .col_sum, .col_carry
  );

  // ---------------- stage 1/2 registers ----------------
  logic gclk_bin, gclk_dec, gclk_out;
  logic s1_valid, s1_bd;

  clock_gate u_cg_bin (.clk, .rst_n, .en(mult_en & ~bd), .gclk(gclk_bin));
  clock_gate u_cg_dec (.clk, .rst_n, .en(mult_en &  bd), .gclk(gclk_dec));
  clock_gate u_cg_out (.clk, .rst_n, .en(s1_valid),      .gclk(gclk_out));

  col_t bin_sum [NCOL];
  col_t bin_car [NCOL];
  col_t dec_sum [NCOL];
  col_t dec_car [NCOL];

  always_ff @(posedge gclk_bin) begin
    bin_sum <= col_sum;
    bin_car <= col_carry;
  end

  always_ff @(posedge gclk_dec) begin
    dec_sum <= col_sum;
    dec_car <= col_carry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_bd    <= 1'b0;
      p_valid  <= 1'b0;
      p_bd     <= 1'b0;
    end else begin
      s1_valid <= mult_en;
      if (mult_en) s1_bd <= bd;
      p_valid  <= s1_valid;
      if (s1_valid) p_bd <= s1_bd;
    end
  end

  // ---------------- stage 2 ----------------
  logic [PW-1:0] prod_bin, prod_dec;

  dbm_split_binary  u_bin (.col_sum(bin_sum), .col_carry(bin_car), .product(prod_bin));
  dbm_split_decimal u_dec (.col_sum(dec_sum), .col_carry(dec_car), .product(prod_dec));

  always_ff @(posedge gclk_out) begin
    p <= s1_bd ? prod_dec : prod_bin;
  end
endmodule
