// Testbench of line_compressor_serial.  Lines are streamed one byte per
// clock with no gaps: the four Canneal lines first (first line, compressed,
// uncompressed, compressed), then random lines near the page's first line,
// over more than one page (LINES_PER_PAGE is reduced to 8 here so several
// page changes happen).  Checked: the first-line output at every page
// start, the C/U flag and line of every other line, and that each result
// appears exactly one cycle after the edge that took in the line's last
// byte.
module tb_line_compressor_serial;
  import mem_ref_pkg::*;
  localparam int LPP = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] l_e = '0;
  line_t first_line, cu_line;
  logic first_line_en, cu_line_en, cu_f;

  line_compressor_serial #(.LINES_PER_PAGE(LPP)) dut (
    .clk, .rst_n, .l_e, .first_line, .first_line_en, .cu_line, .cu_line_en, .cu_f);

  always #5 clk = ~clk;

  typedef struct {
    logic  first;
    logic  flag;
    line_t data;
    int    due;     // cycle at which the output must be visible
  } exp_t;
  exp_t q [$];
  int cycle = 0;
  int n_first = 0, n_comp = 0, n_unc = 0;

  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #2;
    if (rst_n && (first_line_en || cu_line_en)) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (e.due != cycle || e.first !== first_line_en || e.first === cu_line_en
            || (e.first && first_line !== e.data)
            || (!e.first && (cu_f !== e.flag || cu_line !== e.data))) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d (due %0d): first_en=%0b cu_en=%0b flag=%0b expected first=%0b flag=%0b",
                     cycle, e.due, first_line_en, cu_line_en, cu_f, e.first, e.flag);
        end
      end
    end
  end

  initial begin
    line_t ref_l, l;
    exp_t e;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 60; n++) begin
      if (n < 4) l = canneal_line(n + 1);
      else if (n % LPP == 0) l = {8{$urandom}};
      else l = near_line(ref_l, (n % 3 == 0) ? 60 : 20);
      if (n % LPP == 0) ref_l = l;
      for (int i = 0; i < 32; i++) begin
        l_e = l[8*i +: 8];
        @(posedge clk);
        #1;
      end
      // last byte taken at the edge that made 'cycle' its current value
      e.first = (n % LPP == 0);
      e.flag = 1'b0;
      if (e.first) begin
        e.data = l;
        n_first++;
      end else begin
        e.flag = compress_ref(ref_l, l, e.data);
        if (e.flag) n_comp++; else n_unc++;
      end
      e.due = cycle + 1;
      q.push_back(e);
    end
    repeat (3) @(posedge clk);
    #3;
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d outputs missing", q.size()); end
    $display("first lines %0d, compressed %0d, uncompressed %0d", n_first, n_comp, n_unc);
    if (n_first < 2 || n_comp == 0 || n_unc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
