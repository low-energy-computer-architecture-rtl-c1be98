// Testbench of delta_decompressor: stored lines are built with the
// reference packing (compressed where every delta fits six bits, raw
// otherwise) and must decompress to the original line, including the four
// Canneal lines.
module tb_delta_decompressor;
  import mem_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  line_t first_line, cu_line, line, orig;
  logic  cu_flag;
  int    n_comp = 0, n_unc = 0;

  delta_decompressor dut (.first_line, .cu_flag, .cu_line, .line);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    cu_flag = compress_ref(first_line, orig, cu_line);
    #1;
    checks++;
    if (line !== orig) begin
      failures++;
      if (failures < 10) $display("flag %0b: got %h expected %h", cu_flag, line, orig);
    end
    if (cu_flag) n_comp++; else n_unc++;
  endtask

  initial begin
    first_line = canneal_line(1);
    for (int k = 2; k <= 4; k++) begin
      orig = canneal_line(k);
      check_one();
    end
    for (int n = 0; n < 4000; n++) begin
      first_line = {8{$urandom}};
      orig = near_line(first_line, (n % 3 == 0) ? 32 : (n % 3 == 1) ? 31 : 80);
      check_one();
    end
    $display("compressed %0d, uncompressed %0d", n_comp, n_unc);
    if (n_comp == 0 || n_unc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
