// Byte-serial memory line compression unit.
//
// Memory lines arrive one byte per clock on l_e, byte 0 of a line first,
// NBYTES bytes per line, without gaps, starting with the first clock after
// reset is released.  The first line of every page (LINES_PER_PAGE lines,
// 128 for a 4 KB page of 32-byte lines) is kept as the reference: it is
// presented on first_line with first_line_en high for one cycle.  Every
// other line is passed through delta_compressor against that reference.
//
// Timing: the edge that takes in a line's last byte also stores the whole
// line in the line register; the compressor works on it during the next
// cycle and the following edge stores the result in the output register,
// so cu_line, cu_f and cu_line_en (one cycle high) are valid one cycle after
// the last byte has been taken in.  The next line's bytes are collected
// meanwhile.
//
// The serial interface, the byte rate and the one-cycle compression step
// follow the document; the page counter, byte order and reset values are
// this design's choices.
module line_compressor_serial #(
  parameter int NBYTES         = 32,
  parameter int DBITS          = 6,
  parameter int LINES_PER_PAGE = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [7:0]          l_e,
  output logic [8*NBYTES-1:0] first_line,
  output logic                first_line_en,
  output logic [8*NBYTES-1:0] cu_line,
  output logic                cu_line_en,
  output logic                cu_f
);
  localparam int BW = $clog2(NBYTES);
  localparam int LW = (LINES_PER_PAGE > 1) ? $clog2(LINES_PER_PAGE) : 1;

  logic [BW-1:0]       byte_cnt;
  logic [LW-1:0]       line_cnt;
  logic [8*NBYTES-1:0] assemble;    // bytes of the line being read
  logic [8*NBYTES-1:0] line_reg;    // last complete line
  logic                line_full;   // line_reg was loaded on the last edge
  logic                line_first;  // line_reg is a page's first line
  logic [8*NBYTES-1:0] ref_line;    // reference (first) line of the page

  logic [8*NBYTES-1:0] full_line;
  always_comb begin
    full_line = assemble;
    full_line[8*byte_cnt +: 8] = l_e;
  end

  logic                comp_flag;
  logic [8*NBYTES-1:0] comp_line;

  delta_compressor #(.NBYTES(NBYTES), .DBITS(DBITS)) u_comp (
    .first_line (ref_line),
    .line       (line_reg),
    .cu_flag    (comp_flag),
    .cu_line    (comp_line)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      byte_cnt      <= '0;
      line_cnt      <= '0;
      assemble      <= '0;
      line_reg      <= '0;
      line_full     <= 1'b0;
      line_first    <= 1'b0;
      ref_line      <= '0;
      first_line    <= '0;
      first_line_en <= 1'b0;
      cu_line       <= '0;
      cu_line_en    <= 1'b0;
      cu_f          <= 1'b0;
    end else begin
      // byte collection
      assemble  <= full_line;
      line_full <= 1'b0;
      if (byte_cnt == BW'(NBYTES - 1)) begin
        byte_cnt   <= '0;
        line_reg   <= full_line;
        line_full  <= 1'b1;
        line_first <= (line_cnt == '0);
        if (line_cnt == '0) ref_line <= full_line;
        line_cnt   <= (line_cnt == LW'(LINES_PER_PAGE - 1)) ? '0 : line_cnt + 1'b1;
      end else begin
        byte_cnt <= byte_cnt + 1'b1;
      end

      // one cycle of compression, then the output register
      first_line_en <= line_full && line_first;
      cu_line_en    <= line_full && !line_first;
      if (line_full && line_first) first_line <= line_reg;
      if (line_full && !line_first) begin
        cu_line <= comp_line;
        cu_f    <= comp_flag;
      end
    end
  end
endmodule
