// Variable-length delta compressor for one 32-byte memory line.
//
// Same subtractor bank as the fixed-length compressor: NBYTES parallel
// 8-bit Kogge-Stone subtractors form the signed deltas l_i - f_i against
// the page's first line.  Five checks then test whether every delta fits in
// 3, 4, 5, 6 or 7 bits (two's complement), and the line is packed with the
// smallest width that fits: delta i in bits [w*i +: w], upper bits zero.
// A 3-bit tag says which width was used:
//   0 = not compressed (raw line), 1..5 = deltas of 3..7 bits.
// The output length in bytes is NBYTES*w/8 (12..28 bytes) or NBYTES.
// Purely combinational.
//
// The five checks, the choice of the smallest length and the 3-bit tag
// follow the document; the tag code values and the packing order are this
// design's choices.
module delta_compressor_var #(
  parameter int NBYTES = 32
) (
  input  logic [8*NBYTES-1:0] first_line,
  input  logic [8*NBYTES-1:0] line,
  output logic [2:0]          tag,
  output logic [8*NBYTES-1:0] c_line,
  output logic [5:0]          c_bytes
);
  logic [8:0] delta [NBYTES];
  logic [NBYTES-1:0] fits [3:7];

  for (genvar i = 0; i < NBYTES; i++) begin : g_sub
    logic [7:0] diff;
    logic       no_borrow;
    ks_adder #(.W(8)) u_sub (
      .a    (line[8*i +: 8]),
      .b    (~first_line[8*i +: 8]),
      .cin  (1'b1),
      .sum  (diff),
      .cout (no_borrow)
    );
    assign delta[i] = {~no_borrow, diff};
    for (genvar w = 3; w <= 7; w++) begin : g_chk
      assign fits[w][i] = (delta[i][8:w-1] == '0) || (delta[i][8:w-1] == '1);
    end
  end

  always_comb begin
    int w;
    w = 0;
    for (int k = 7; k >= 3; k--)
      if (&fits[k]) w = k;
    c_line  = line;
    tag     = 3'd0;
    c_bytes = 6'(NBYTES);
    if (w != 0) begin
      tag     = 3'(w - 2);
      c_bytes = 6'(NBYTES * w / 8);
      c_line  = '0;
      for (int i = 0; i < NBYTES; i++)
        for (int b = 0; b < 7; b++)
          if (b < w) c_line[w*i + b] = delta[i][b];
    end
  end
endmodule
