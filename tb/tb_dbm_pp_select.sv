// Testbench of dbm_pp_select.  For each multiplier digit the signed values
// of the two selected partial products (a complemented one counts as minus
// the multiple it was made from) must add up to digit * A, where the digit
// is the radix-16 Booth digit (binary) or the BCD digit (decimal).  The
// multiples are driven with exact values computed here.
module tb_dbm_pp_select;
  import dbm_pkg::*;
  import dbm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [63:0] a, b;
  logic        bd;
  mult_t bx1, bx2, bx4, bx8, bx1_n, bx2_n, bx4_n, bx8_n;
  mult_t dx1, dx2, dx5, dx10, dx1_n, dx2_n;
  mult_t pp1 [NDIG+1];
  mult_t pp2 [NDIG+1];
  logic  neg1 [NDIG+1];
  logic  neg2 [NDIG+1];

  dbm_pp_select dut (.b, .bd, .bx1, .bx2, .bx4, .bx8, .bx1_n, .bx2_n, .bx4_n, .bx8_n,
                     .dx1, .dx2, .dx5, .dx10, .dx1_n, .dx2_n, .pp1, .pp2, .neg1, .neg2);

  localparam logic signed [89:0] NINES17 = 90'd99999999999999999;

  function automatic logic signed [89:0] pp_value(mult_t pp, logic neg, logic dec);
    logic signed [89:0] mag;
    mult_t inv;
    inv = ~pp;
    if (!dec) begin
      mag = neg ? 90'(inv) : 90'(pp);
    end else begin
      mag = 90'(bcd_to_bin(80'(pp)));
      if (neg) mag = NINES17 - mag;
    end
    return neg ? -mag : mag;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic signed [89:0] av, expv, got;
      bd = 1'(n & 1);
      if (!bd) begin
        a = {$urandom, $urandom};
        b = {$urandom, $urandom};
        if (n < 4) b = (n == 0) ? '1 : 64'h8888_7777_0000_FFFF;
        av = 90'(a);
      end else begin
        a = rand_bcd16();
        b = rand_bcd16();
        if (n < 4) b = 64'h9876_5432_1098_7654;
        av = 90'(bcd_to_bin(80'(a)));
      end
      bx1 = 68'(a); bx2 = bx1 << 1; bx4 = bx1 << 2; bx8 = bx1 << 3;
      bx1_n = ~bx1; bx2_n = ~bx2; bx4_n = ~bx4; bx8_n = ~bx8;
      dx1 = 68'(a);
      dx2 = 68'(bin_to_bcd(80'(av) * 2));
      dx5 = 68'(bin_to_bcd(80'(av) * 5));
      dx10 = 68'(bin_to_bcd(80'(av) * 10));
      dx1_n = 68'(bin_to_bcd(80'(NINES17 - av)));
      dx2_n = 68'(bin_to_bcd(80'(NINES17 - 2 * av)));
      #1;
      for (int i = 0; i <= NDIG; i++) begin
        int d;
        if (!bd) begin
          logic [4:0] g;
          g = {(i < NDIG) ? b[4*i +: 4] : 4'd0, (i > 0) ? b[4*i-1] : 1'b0};
          d = -8 * int'(g[4]) + 4 * int'(g[3]) + 2 * int'(g[2]) + int'(g[1]) + int'(g[0]);
        end else begin
          d = (i < NDIG) ? int'(b[4*i +: 4]) : 0;
        end
        expv = av * d;
        got = pp_value(pp1[i], neg1[i], bd) + pp_value(pp2[i], neg2[i], bd);
        checks++;
        if (got !== expv) begin
          failures++;
          if (failures < 10) $display("bd=%0b digit %0d (%0d): got %0d expected %0d", bd, i, d, got, expv);
        end
        if (bd && neg2[i]) begin
          failures++;
          $display("decimal MUX2 must not be negative");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
