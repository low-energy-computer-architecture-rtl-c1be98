// Testbench of delta_decompressor_var: lines are packed here with every
// width that holds their deltas (and raw), and each stored form must
// decompress to the original line.
module tb_delta_decompressor_var;
  import mem_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  line_t first_line, c_line, line, orig;
  logic [2:0] tag;
  int n_packed = 0;

  delta_decompressor_var dut (.first_line, .tag, .c_line, .line);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int d [32];
      first_line = {8{$urandom}};
      orig = near_line(first_line, 1 << (n % 7 + 1));
      for (int i = 0; i < 32; i++) d[i] = int'(orig[8*i +: 8]) - int'(first_line[8*i +: 8]);
      for (int w = 2; w <= 7; w++) begin
        logic ok;
        ok = 1'b1;
        if (w >= 3)
          for (int i = 0; i < 32; i++)
            if (d[i] < -(1 << (w - 1)) || d[i] >= (1 << (w - 1))) ok = 1'b0;
        if (ok) begin
          if (w == 2) begin
            tag = 3'd0;
            c_line = orig;
          end else begin
            tag = 3'(w - 2);
            c_line = '0;
            for (int i = 0; i < 32; i++)
              for (int b = 0; b < w; b++) c_line[w*i + b] = 1'((d[i] >>> b) & 1);
            n_packed++;
          end
          #1;
          checks++;
          if (line !== orig) begin
            failures++;
            if (failures < 10) $display("tag %0d: got %h expected %h", tag, line, orig);
          end
        end
      end
    end
    if (n_packed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
