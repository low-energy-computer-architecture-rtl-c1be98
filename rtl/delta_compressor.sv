// Fixed-length delta compressor for one 32-byte memory line.
//
// Every line of a memory page is compared with the first line of the same
// page.  NBYTES parallel 8-bit Kogge-Stone subtractors form the deltas
// l_i - f_i as 9-bit signed numbers (the subtractor's borrow is the sign).
// If every delta fits in DBITS bits as a two's-complement number (-32..31
// for DBITS = 6) the C/U flag is 1 and the output line holds the NBYTES
// deltas packed DBITS bits each (24 bytes; delta i in bits
// [DBITS*i +: DBITS], upper bytes zero).  Otherwise the flag is 0 and the
// original line is passed.  The flag is the tag bit stored in front of the
// line.  Purely combinational: one subtraction, a range check and a
// multiplexer.
//
// The line and delta sizes and the Kogge-Stone subtractors follow the
// document; reading the deltas as signed and the packing order are this
// design's choices.
module delta_compressor #(
  parameter int NBYTES = 32,
  parameter int DBITS  = 6
) (
  input  logic [8*NBYTES-1:0] first_line,
  input  logic [8*NBYTES-1:0] line,
  output logic                cu_flag,
  output logic [8*NBYTES-1:0] cu_line
);
  logic [8:0]       delta [NBYTES];
  logic [NBYTES-1:0] fits;

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
    // fits when bits 8 .. DBITS-1 are all equal (sign extension)
    assign fits[i] = (delta[i][8:DBITS-1] == '0) || (delta[i][8:DBITS-1] == '1);
  end

  always_comb begin
    cu_flag = &fits;
    cu_line = line;
    if (cu_flag) begin
      cu_line = '0;
      for (int i = 0; i < NBYTES; i++) cu_line[DBITS*i +: DBITS] = delta[i][DBITS-1:0];
    end
  end
endmodule
