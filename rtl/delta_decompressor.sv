// Fixed-length delta decompressor for one 32-byte memory line.
//
// The tag bit (C/U flag) of the stored line is checked first.  If it is 1
// the line holds NBYTES deltas of DBITS bits (delta i in bits
// [DBITS*i +: DBITS]); each is sign-extended to 8 bits and added to the
// matching byte of the page's first line by an 8-bit Kogge-Stone adder.
// If it is 0 the stored line is already the data.  The critical path is one
// 8-bit addition followed by a multiplexer.  Purely combinational; the
// inverse of delta_compressor.
module delta_decompressor #(
  parameter int NBYTES = 32,
  parameter int DBITS  = 6
) (
  input  logic [8*NBYTES-1:0] first_line,
  input  logic                cu_flag,
  input  logic [8*NBYTES-1:0] cu_line,
  output logic [8*NBYTES-1:0] line
);
  logic [8*NBYTES-1:0] sums;

  for (genvar i = 0; i < NBYTES; i++) begin : g_add
    logic [DBITS-1:0] d;
    logic             co_unused;
    assign d = cu_line[DBITS*i +: DBITS];
    ks_adder #(.W(8)) u_add (
      .a    (first_line[8*i +: 8]),
      .b    ({{(8-DBITS){d[DBITS-1]}}, d}),
      .cin  (1'b0),
      .sum  (sums[8*i +: 8]),
      .cout (co_unused)
    );
  end

  assign line = cu_flag ? sums : cu_line;
endmodule
