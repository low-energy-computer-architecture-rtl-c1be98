// Top level: the two low-energy designs side by side.
//
//  * dbm_multiplier: clock-gated, two-stage pipelined dual-base multiplier
//    (64-bit binary or 16-digit BCD operands, 128-bit / 32-digit product).
//  * Main-memory line compression: the byte-serial compression unit
//    (line_compressor_serial, which contains the parallel delta compressor)
//    and the parallel delta decompressor, which turns a stored line and its
//    tag bit back into the original 32 bytes given the page's first line.
//  * The variable-length variant of the line compressor and decompressor
//    (deltas of 3..7 bits, 3-bit tag), as a second combinational port group.
//
// The two designs share only clock and reset; each has its own ports.  The
// decompressor is combinational; everything else is described in the
// sub-modules.
module low_energy_top
  import dbm_pkg::*;
#(
  parameter int NBYTES         = 32,
  parameter int DBITS          = 6,
  parameter int LINES_PER_PAGE = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  // dual-base multiplier
  input  logic                mult_en,
  input  logic                bd,
  input  logic [4*NDIG-1:0]   a,
  input  logic [4*NDIG-1:0]   b,
  output logic [PW-1:0]       p,
  output logic                p_valid,
  output logic                p_bd,
  // serial line compression
  input  logic [7:0]          l_e,
  output logic [8*NBYTES-1:0] first_line,
  output logic                first_line_en,
  output logic [8*NBYTES-1:0] cu_line,
  output logic                cu_line_en,
  output logic                cu_f,
  // line decompression
  input  logic [8*NBYTES-1:0] dec_first_line,
  input  logic                dec_cu_f,
  input  logic [8*NBYTES-1:0] dec_cu_line,
  output logic [8*NBYTES-1:0] dec_line,
  // variable-length line compression
  input  logic [8*NBYTES-1:0] vl_first_line,
  input  logic [8*NBYTES-1:0] vl_line,
  output logic [2:0]          vl_tag,
  output logic [8*NBYTES-1:0] vl_c_line,
  output logic [5:0]          vl_c_bytes,
  // variable-length line decompression
  input  logic [2:0]          vld_tag,
  input  logic [8*NBYTES-1:0] vld_c_line,
  output logic [8*NBYTES-1:0] vld_line
);
  dbm_multiplier u_dbm (
    .clk, .rst_n, .mult_en, .bd, .a, .b, .p, .p_valid, .p_bd
  );

  line_compressor_serial #(
    .NBYTES(NBYTES), .DBITS(DBITS), .LINES_PER_PAGE(LINES_PER_PAGE)
  ) u_comp (
    .clk, .rst_n, .l_e, .first_line, .first_line_en, .cu_line, .cu_line_en, .cu_f
  );

  delta_decompressor #(.NBYTES(NBYTES), .DBITS(DBITS)) u_decomp (
    .first_line (dec_first_line),
    .cu_flag    (dec_cu_f),
    .cu_line    (dec_cu_line),
    .line       (dec_line)
  );

  delta_compressor_var #(.NBYTES(NBYTES)) u_vcomp (
    .first_line (vl_first_line),
    .line       (vl_line),
    .tag        (vl_tag),
    .c_line     (vl_c_line),
    .c_bytes    (vl_c_bytes)
  );

  delta_decompressor_var #(.NBYTES(NBYTES)) u_vdecomp (
    .first_line (vl_first_line),
    .tag        (vld_tag),
    .c_line     (vld_c_line),
    .line       (vld_line)
  );
endmodule
