// Testbench of dbm_column_tree.  Random partial products (BCD digits in
// decimal mode) and sign bits are applied; for every column the Sum plus
// Carry must equal the sum of all digits of that weight, counting the F / 9
// sign-extension digits of negative partial products and the sign bits.
// A second check weighs the column totals by 16^j and compares with the
// signed sum of the partial products modulo 2^128.
module tb_dbm_column_tree;
  import dbm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic  bd;
  mult_t pp1 [NDIG+1];
  mult_t pp2 [NDIG+1];
  logic  neg1 [NDIG+1];
  logic  neg2 [NDIG+1];
  col_t  col_sum [NCOL];
  col_t  col_carry [NCOL];

  dbm_column_tree dut (.bd, .pp1, .pp2, .neg1, .neg2, .col_sum, .col_carry);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int digit_at(mult_t pp, logic neg, int pos, logic dec);
    if (pos < PPDIG) return int'(pp[4*pos +: 4]);
    return neg ? (dec ? 9 : 15) : 0;
  endfunction

  initial begin
    for (int n = 0; n < 1500; n++) begin
      logic [127:0] weighted, signed_sum;
      bd = 1'(n & 1);
      for (int i = 0; i <= NDIG; i++) begin
        for (int d = 0; d < PPDIG; d++) begin
          pp1[i][4*d +: 4] = bd ? 4'($urandom_range(0, 9)) : 4'($urandom);
          pp2[i][4*d +: 4] = bd ? 4'($urandom_range(0, 9)) : 4'($urandom);
          if (n == 0) begin pp1[i][4*d +: 4] = 4'hF; pp2[i][4*d +: 4] = 4'hF; end
        end
        neg1[i] = (n == 0) ? 1'b1 : 1'($urandom);
        neg2[i] = (n == 0) ? 1'b1 : 1'($urandom);
        if (i == NDIG) begin pp2[i] = '0; neg1[i] = 1'b0; neg2[i] = 1'b0; end
      end
      #1;
      weighted = '0;
      for (int j = 0; j < NCOL; j++) begin
        int exp_total, got;
        exp_total = 0;
        for (int i = 0; i <= j && i <= NDIG; i++) begin
          exp_total += digit_at(pp1[i], neg1[i], j - i, bd);
          if (i < NDIG) exp_total += digit_at(pp2[i], neg2[i], j - i, bd);
        end
        if (j <= NDIG) exp_total += int'(neg1[j]) + int'(neg2[j]);
        got = int'(col_sum[j]) + int'(col_carry[j]);
        checks++;
        if (got != exp_total) begin
          failures++;
          if (failures < 10) $display("n=%0d column %0d: got %0d expected %0d", n, j, got, exp_total);
        end
        weighted += 128'(got) << (4 * j);
      end
      if (!bd) begin
        // signed sum of partial products, each placed at its column
        signed_sum = '0;
        for (int i = 0; i <= NDIG; i++) begin
          logic [127:0] v1, v2;
          v1 = neg1[i] ? -(128'(~pp1[i] & {4*PPDIG{1'b1}})) : 128'(pp1[i]);
          v2 = neg2[i] ? -(128'(~pp2[i] & {4*PPDIG{1'b1}})) : 128'(pp2[i]);
          signed_sum += (v1 + v2) << (4 * i);
        end
        checks++;
        if (weighted !== signed_sum) begin
          failures++;
          if (failures < 10) $display("n=%0d weighted sum mismatch", n);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
