// Testbench of ks_adder: random operands at 8 and 128 bits (and all 8-bit
// pairs with carry in), compared with the built-in addition.
module tb_ks_adder;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [7:0]   a8, b8, s8;
  logic         ci8, co8;
  logic [127:0] a128, b128, s128;
  logic         ci128, co128;

  ks_adder #(.W(8))   u8   (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  ks_adder #(.W(128)) u128 (.a(a128), .b(b128), .cin(ci128), .sum(s128), .cout(co128));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y += 3) begin
        a8 = 8'(x); b8 = 8'(y); ci8 = 1'((x ^ y) & 1);
        #1;
        checks++;
        if ({co8, s8} !== 9'(x + y + int'(ci8))) begin
          failures++;
          if (failures < 10) $display("8-bit mismatch %0d+%0d", x, y);
        end
      end
    for (int n = 0; n < 2000; n++) begin
      a128 = {$urandom, $urandom, $urandom, $urandom};
      b128 = {$urandom, $urandom, $urandom, $urandom};
      if (n % 7 == 0) b128 = ~a128;
      ci128 = 1'($urandom);
      #1;
      checks++;
      if ({co128, s128} !== ({1'b0, a128} + {1'b0, b128} + 129'(ci128))) begin
        failures++;
        if (failures < 10) $display("128-bit mismatch");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
