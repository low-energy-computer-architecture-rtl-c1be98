// Testbench of dbm_multiples: binary multiples against a*k, decimal
// multiples against the BCD form of value(a)*k, complements digit by digit.
module tb_dbm_multiples;
  import dbm_pkg::*;
  import dbm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [63:0] a;
  mult_t bx1, bx2, bx4, bx8, bx1_n, bx2_n, bx4_n, bx8_n;
  mult_t dx1, dx2, dx5, dx10, dx1_n, dx2_n;

  dbm_multiples dut (.a, .bx1, .bx2, .bx4, .bx8, .bx1_n, .bx2_n, .bx4_n, .bx8_n,
                     .dx1, .dx2, .dx5, .dx10, .dx1_n, .dx2_n);

  task automatic chk(string what, logic [67:0] got, logic [67:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h expected %h (a=%h)", what, got, exp, a);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      logic [79:0] v, n9;
      a = {$urandom, $urandom};
      if (n == 0) a = '1;
      #1;
      chk("bx1", bx1, 68'(a));
      chk("bx2", bx2, 68'(a) * 2);
      chk("bx4", bx4, 68'(a) * 4);
      chk("bx8", bx8, 68'(a) * 8);
      chk("bx8_n", bx8_n, ~(68'(a) * 8));
      chk("bx1_n", bx1_n, ~68'(a));
      a = rand_bcd16();
      if (n == 0) a = 64'h9999_9999_9999_9999;
      #1;
      v = bcd_to_bin({16'd0, a});
      chk("dx1", dx1, 68'(a));
      chk("dx2", dx2, 68'(bin_to_bcd(v * 2)));
      chk("dx5", dx5, 68'(bin_to_bcd(v * 5)));
      chk("dx10", dx10, 68'(bin_to_bcd(v * 10)));
      // nine's complement: 10^17 - 1 - value
      n9 = bin_to_bcd(80'd99999999999999999 - v);
      chk("dx1_n", dx1_n, 68'(n9));
      n9 = bin_to_bcd(80'd99999999999999999 - v * 2);
      chk("dx2_n", dx2_n, 68'(n9));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
