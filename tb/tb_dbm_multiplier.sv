// Testbench of dbm_multiplier.  Random binary and decimal multiplications
// are issued back to back, in runs of one mode and interleaved, with idle
// cycles (mult_en low) between them.  Every product is compared with an
// independent reference (built-in multiplication, schoolbook BCD
// multiplication) and must appear exactly two rising edges after its
// operands.  The clock gating is checked too: the binary-path bank must not
// be clocked during decimal operations or idle cycles, the decimal bank not
// during binary operations or idle cycles.
module tb_dbm_multiplier;
  import dbm_pkg::*;
  import dbm_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic mult_en = 0, bd = 0;
  logic [63:0] a = '0, b = '0;
  logic [127:0] p;
  logic p_valid, p_bd;

  dbm_multiplier dut (.clk, .rst_n, .mult_en, .bd, .a, .b, .p, .p_valid, .p_bd);

  always #5 clk = ~clk;

  typedef struct {
    logic         bd;
    logic [127:0] prod;
    int           cycle;
  } exp_t;
  exp_t q [$];
  int cycle = 0;
  int n_bin = 0, n_dec = 0, n_idle = 0, n_switch = 0;
  int bin_clk = 0, dec_clk = 0, bin_clk_exp = 0, dec_clk_exp = 0;

  always @(posedge clk) cycle++;
  always @(posedge dut.gclk_bin) if (rst_n) bin_clk++;
  always @(posedge dut.gclk_dec) if (rst_n) dec_clk++;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker, sampled just after each rising edge
  always @(posedge clk) begin
    #2;
    if (rst_n && p_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected product at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (p !== e.prod || p_bd !== e.bd || cycle - e.cycle != 2) begin
          failures++;
          if (failures < 10)
            $display("cycle %0d bd=%0b: got %h expected %h (latency %0d)",
                     cycle, e.bd, p, e.prod, cycle - e.cycle);
        end
      end
    end
  end

  task automatic issue(logic mode);
    exp_t e;
    mult_en = 1;
    if (mode != bd) n_switch++;
    bd = mode;
    if (!mode) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (n_bin == 0) begin a = '1; b = '1; end
      e.prod = {64'd0, a} * {64'd0, b};
      n_bin++;
      bin_clk_exp++;
    end else begin
      a = rand_bcd16();
      b = rand_bcd16();
      if (n_dec == 0) begin a = 64'h9999_9999_9999_9999; b = a; end
      e.prod = bcd_mul(a, b);
      n_dec++;
      dec_clk_exp++;
    end
    e.bd = mode;
    e.cycle = cycle;
    q.push_back(e);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      #1;
      case ($urandom_range(0, 9))
        0:       begin mult_en = 0; bd = 1'($urandom); a = {$urandom, $urandom}; n_idle++; end
        1, 2, 3: issue(1'($urandom));
        default: issue(bd);    // stay in the current mode
      endcase
      @(posedge clk);
    end
    #1 mult_en = 0;
    repeat (4) @(posedge clk);
    #3;
    checks++;
    if (q.size() != 0) begin failures++; $display("%0d products missing", q.size()); end
    checks++;
    if (bin_clk != bin_clk_exp || dec_clk != dec_clk_exp) begin
      failures++;
      $display("gated clocks: binary %0d (expected %0d), decimal %0d (expected %0d)",
               bin_clk, bin_clk_exp, dec_clk, dec_clk_exp);
    end
    $display("binary ops %0d, decimal ops %0d, idle cycles %0d, mode switches %0d",
             n_bin, n_dec, n_idle, n_switch);
    if (n_bin == 0 || n_dec == 0 || n_idle == 0 || n_switch == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
