// Testbench of dbm_split_decimal: random column Sum/Carry pairs (totals up
// to 497) must give sum_j total_j * 10^j modulo 10^32 in BCD.  The expected
// value is accumulated on a plain array of decimal digits.
module tb_dbm_split_decimal;
  import dbm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  col_t col_sum [NCOL];
  col_t col_carry [NCOL];
  logic [PW-1:0] product;

  dbm_split_decimal dut (.col_sum, .col_carry, .product);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int acc [40];
      logic [PW-1:0] expv;
      for (int k = 0; k < 40; k++) acc[k] = 0;
      for (int j = 0; j < NCOL; j++) begin
        int t, s;
        t = (n == 0) ? 497 : (n == 1) ? 0 : int'($urandom_range(0, 497));
        s = int'($urandom_range(0, t));
        col_sum[j] = col_t'(s);
        col_carry[j] = col_t'(t - s);
        acc[j] += t;
      end
      for (int k = 0; k < 39; k++) begin
        acc[k+1] += acc[k] / 10;
        acc[k] = acc[k] % 10;
      end
      for (int k = 0; k < 32; k++) expv[4*k +: 4] = 4'(acc[k]);
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
