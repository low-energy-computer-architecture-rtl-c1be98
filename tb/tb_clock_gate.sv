// Testbench of clock_gate: the gated clock must pulse exactly in the cycles
// whose enable was present at the preceding falling edge, and must never
// rise while the enable register changes.
module tb_clock_gate;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, gclk;
  int gedges = 0;

  clock_gate dut (.clk, .rst_n, .en, .gclk);

  always #5 clk = ~clk;
  always @(posedge gclk) gedges++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    logic pattern [200];
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 200; i++) pattern[i] = 1'($urandom);
    expected = 0;
    for (int i = 0; i < 200; i++) begin
      int gstart;
      en = pattern[i];          // set right after a rising edge
      gstart = gedges;
      @(posedge clk);
      #1;
      checks++;
      if (gedges - gstart != int'(pattern[i])) begin
        failures++;
        $display("cycle %0d: en=%0b gated edges=%0d", i, pattern[i], gedges - gstart);
      end
      expected += int'(pattern[i]);
    end
    checks++;
    if (gedges != expected) failures++;
    // the gate is closed while held in reset
    en = 1; rst_n = 0;
    gedges = 0;
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (gedges != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
