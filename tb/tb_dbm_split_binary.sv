// Testbench of dbm_split_binary: random column Sum/Carry pairs (each pair
// adding up to at most 497, as the column tree guarantees) must give the
// product sum_j (Sum_j + Carry_j) * 16^j modulo 2^128.
module tb_dbm_split_binary;
  import dbm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  col_t col_sum [NCOL];
  col_t col_carry [NCOL];
  logic [PW-1:0] product;

  dbm_split_binary dut (.col_sum, .col_carry, .product);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [PW-1:0] expv;
      expv = '0;
      for (int j = 0; j < NCOL; j++) begin
        int t, s;
        t = (n == 0) ? 497 : int'($urandom_range(0, 497));
        s = int'($urandom_range(0, t));
        col_sum[j] = col_t'(s);
        col_carry[j] = col_t'(t - s);
        expv += PW'(t) << (4 * j);
      end
      #1;
      checks++;
      if (product !== expv) begin
        failures++;
        if (failures < 10) $display("n=%0d got %h expected %h", n, product, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
