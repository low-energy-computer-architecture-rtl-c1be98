// Testbench of delta_compressor_var: for random lines at several distances
// from a random first line, the tag must name the smallest width (3..7
// bits) that holds every signed delta, or 0, and the packed line and byte
// count must match a reference packing.  Includes the four Canneal lines.
module tb_delta_compressor_var;
  import mem_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  line_t first_line, line, c_line;
  logic [2:0] tag;
  logic [5:0] c_bytes;
  int hist [6];

  delta_compressor_var dut (.first_line, .line, .tag, .c_line, .c_bytes);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one();
    int maxw, w;
    line_t exp_line;
    int d [32];
    #1;
    maxw = 0;
    for (int i = 0; i < 32; i++) begin
      d[i] = int'(line[8*i +: 8]) - int'(first_line[8*i +: 8]);
    end
    w = 0;
    for (int k = 7; k >= 3; k--) begin
      logic ok;
      ok = 1'b1;
      for (int i = 0; i < 32; i++)
        if (d[i] < -(1 << (k - 1)) || d[i] >= (1 << (k - 1))) ok = 1'b0;
      if (ok) w = k;
    end
    exp_line = line;
    if (w != 0) begin
      exp_line = '0;
      for (int i = 0; i < 32; i++)
        for (int b = 0; b < w; b++) exp_line[w*i + b] = 1'((d[i] >>> b) & 1);
    end
    checks++;
    if (tag !== 3'((w == 0) ? 0 : w - 2) || c_line !== exp_line
        || c_bytes !== 6'((w == 0) ? 32 : 4 * w)) begin
      failures++;
      if (failures < 10) $display("tag %0d (width expected %0d) bytes %0d", tag, w, c_bytes);
    end
    hist[tag]++;
  endtask

  initial begin
    for (int k = 0; k < 6; k++) hist[k] = 0;
    first_line = canneal_line(1);
    for (int k = 2; k <= 4; k++) begin
      line = canneal_line(k);
      check_one();
    end
    for (int n = 0; n < 5000; n++) begin
      first_line = {8{$urandom}};
      line = near_line(first_line, (n % 6 == 5) ? 100 : 1 << (n % 6 + 1));
      check_one();
    end
    $display("tag histogram: raw %0d, 3b %0d, 4b %0d, 5b %0d, 6b %0d, 7b %0d",
             hist[0], hist[1], hist[2], hist[3], hist[4], hist[5]);
    for (int k = 0; k < 6; k++) if (hist[k] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
