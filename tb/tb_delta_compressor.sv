// Testbench of delta_compressor: the four Canneal lines (expected flags
// 1, 0, 1 against line 1), then random lines at several distances from a
// random first line, compared with the reference packing.
module tb_delta_compressor;
  import mem_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  line_t first_line, line, cu_line, exp_line;
  logic  cu_flag, exp_flag;
  int    n_comp = 0, n_unc = 0;

  delta_compressor dut (.first_line, .line, .cu_flag, .cu_line);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    #1;
    exp_flag = compress_ref(first_line, line, exp_line);
    checks++;
    if (cu_flag !== exp_flag || cu_line !== exp_line) begin
      failures++;
      if (failures < 10) $display("flag %0b (expected %0b) line %h expected %h", cu_flag, exp_flag, cu_line, exp_line);
    end
    if (cu_flag) n_comp++; else n_unc++;
  endtask

  initial begin
    first_line = canneal_line(1);
    for (int k = 2; k <= 4; k++) begin
      line = canneal_line(k);
      check_one();
      checks++;
      if (cu_flag !== (k != 3)) begin
        failures++;
        $display("Canneal line %0d: flag %0b", k, cu_flag);
      end
    end
    for (int n = 0; n < 4000; n++) begin
      first_line = {8{$urandom}};
      line = near_line(first_line, (n % 4 == 0) ? 31 : (n % 4 == 1) ? 32 : (n % 4 == 2) ? 40 : 3);
      check_one();
    end
    $display("compressed %0d, uncompressed %0d", n_comp, n_unc);
    if (n_comp == 0 || n_unc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
