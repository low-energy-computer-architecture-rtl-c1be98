// Variable-length delta decompressor for one 32-byte memory line.
//
// Inverse of delta_compressor_var.  The 3-bit tag gives the delta width
// (0 = raw line, 1..5 = 3..7 bits); each delta i is taken from bits
// [w*i +: w], sign-extended to 8 bits and added to byte i of the page's
// first line with an 8-bit Kogge-Stone adder.  A multiplexer picks the raw
// line for tag 0.  Purely combinational.  The document describes the
// variable-length compressor only; this decompressor is its direct inverse.
module delta_decompressor_var #(
  parameter int NBYTES = 32
) (
  input  logic [8*NBYTES-1:0] first_line,
  input  logic [2:0]          tag,
  input  logic [8*NBYTES-1:0] c_line,
  output logic [8*NBYTES-1:0] line
);
  logic [7:0] dext [NBYTES];

  always_comb begin
    int w;
    w = (tag >= 3'd1 && tag <= 3'd5) ? int'(tag) + 2 : 3;
    for (int i = 0; i < NBYTES; i++) begin
      dext[i] = '0;
      for (int b = 0; b < 8; b++) begin
        if (b < w)     dext[i][b] = c_line[w*i + b];
        else if (w > 2) dext[i][b] = c_line[w*i + w - 1];
      end
    end
  end

  logic [8*NBYTES-1:0] sums;
  for (genvar i = 0; i < NBYTES; i++) begin : g_add
    logic co_unused;
    ks_adder #(.W(8)) u_add (
      .a    (first_line[8*i +: 8]),
      .b    (dext[i]),
      .cin  (1'b0),
      .sum  (sums[8*i +: 8]),
      .cout (co_unused)
    );
  end

  assign line = (tag == 3'd0 || tag > 3'd5) ? c_line : sums;
endmodule
