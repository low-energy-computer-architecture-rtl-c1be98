// End-to-end testbench of low_energy_top at its default parameters.
//
// Multiplier side: a stream of random binary and decimal multiplications
// with idle cycles, checked against reference products and the two-cycle
// latency.  Memory side: 132 lines (more than one 128-line page) are
// streamed into the serial compressor; every output line is fed back
// through the decompressor with the page's first line and must give the
// original bytes.  Each line is also passed through the variable-length
// compressor and back through its decompressor.  The count of every
// mechanism (binary / decimal operation, idle gating, mode switch, page
// start, compressed and uncompressed line, each variable-length tag) is
// reported, and one that never happened is a failure.
// Timing: stimulus changes 1 time unit after the rising edge and all checks
// finish within 4 units, before the falling edge at which the multiplier's
// clock gates sample their enables.
module tb_low_energy_top;
  import dbm_ref_pkg::*;
  import mem_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  logic mult_en = 0, bd = 0;
  logic [63:0] a = '0, b = '0;
  logic [127:0] p;
  logic p_valid, p_bd;
  logic [7:0] l_e = '0;
  line_t first_line, cu_line, dec_first_line = '0, dec_cu_line = '0, dec_line;
  logic first_line_en, cu_line_en, cu_f, dec_cu_f = 0;
  line_t vl_first_line = '0, vl_line = '0, vl_c_line, vld_c_line = '0, vld_line;
  logic [2:0] vl_tag, vld_tag = '0;
  logic [5:0] vl_c_bytes;
  int vl_hist [6];

  low_energy_top dut (
    .clk, .rst_n, .mult_en, .bd, .a, .b, .p, .p_valid, .p_bd,
    .l_e, .first_line, .first_line_en, .cu_line, .cu_line_en, .cu_f,
    .dec_first_line, .dec_cu_f, .dec_cu_line, .dec_line,
    .vl_first_line, .vl_line, .vl_tag, .vl_c_line, .vl_c_bytes,
    .vld_tag, .vld_c_line, .vld_line);

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- multiplier ----------------
  typedef struct { logic bd; logic [127:0] prod; int cycle; } mexp_t;
  mexp_t mq [$];
  int n_bin = 0, n_dec = 0, n_idle = 0, n_switch = 0;
  logic mult_done = 0;

  always @(posedge clk) begin
    #2;
    if (rst_n && p_valid) begin
      mexp_t e;
      checks++;
      if (mq.size() == 0) begin
        failures++;
      end else begin
        e = mq.pop_front();
        if (p !== e.prod || p_bd !== e.bd || cycle - e.cycle != 2) begin
          failures++;
          if (failures < 10) $display("product mismatch at cycle %0d: got %h expected %h bd %0b latency %0d", cycle, p, e.prod, e.bd, cycle - e.cycle);
        end
      end
    end
  end

  initial begin
    wait (rst_n);
    @(posedge clk);
    for (int n = 0; n < 600; n++) begin
      mexp_t e;
      #1;
      if ($urandom_range(0, 5) == 0) begin
        mult_en = 0;
        n_idle++;
      end else begin
        logic mode;
        mode = ($urandom_range(0, 3) == 0) ? ~bd : bd;
        if (mode != bd) n_switch++;
        mult_en = 1;
        bd = mode;
        if (!mode) begin
          a = {$urandom, $urandom}; b = {$urandom, $urandom};
          e.prod = {64'd0, a} * {64'd0, b};
          n_bin++;
        end else begin
          a = rand_bcd16(); b = rand_bcd16();
          e.prod = bcd_mul(a, b);
          n_dec++;
        end
        e.bd = mode;
        e.cycle = cycle;
        mq.push_back(e);
      end
      @(posedge clk);
    end
    #1 mult_en = 0;
    repeat (3) @(posedge clk);
    mult_done = 1;
  end

  // ---------------- line compression / decompression ----------------
  localparam int NLINES = 132;
  line_t lq [$];
  line_t page_first;
  int n_first = 0, n_comp = 0, n_unc = 0;
  logic mem_done = 0;

  always @(posedge clk) begin
    #2;
    if (rst_n && first_line_en) begin
      line_t orig;
      orig = lq.pop_front();
      checks++;
      if (first_line !== orig) failures++;
      page_first = first_line;
      n_first++;
    end
    if (rst_n && cu_line_en) begin
      line_t orig;
      orig = lq.pop_front();
      dec_first_line = page_first;
      dec_cu_f = cu_f;
      dec_cu_line = cu_line;
      // same line through the variable-length pair
      vl_first_line = page_first;
      vl_line = orig;
      #1;
      checks++;
      if (dec_line !== orig) begin
        failures++;
        if (failures < 10) $display("round trip mismatch, flag %0b", cu_f);
      end
      if (cu_f) n_comp++; else n_unc++;
      vld_tag = vl_tag;
      vld_c_line = vl_c_line;
      #1;
      checks++;
      if (vld_line !== orig || cu_f !== (vl_tag >= 3'd1 && vl_tag <= 3'd4)) begin
        failures++;
        if (failures < 10) $display("variable-length round trip mismatch, tag %0d", vl_tag);
      end
      vl_hist[vl_tag]++;
    end
  end

  initial begin
    line_t ref_l, l;
    for (int k = 0; k < 6; k++) vl_hist[k] = 0;
    wait (rst_n);
    #1;
    for (int n = 0; n < NLINES; n++) begin
      int k;
      k = n % 128;
      if (k < 4) l = canneal_line(k + 1);
      else l = near_line(ref_l, (n % 4 == 0) ? 50 : 2 << (n % 6));
      if (k == 0) ref_l = l;
      lq.push_back(l);
      for (int i = 0; i < 32; i++) begin
        l_e = l[8*i +: 8];
        @(posedge clk);
        #1;
      end
    end
    repeat (4) @(posedge clk);
    mem_done = 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (mult_done && mem_done);
    #3;
    checks++;
    if (mq.size() != 0 || lq.size() != 0) failures++;
    $display("binary %0d, decimal %0d, idle %0d, mode switches %0d", n_bin, n_dec, n_idle, n_switch);
    $display("page first lines %0d, compressed %0d, uncompressed %0d", n_first, n_comp, n_unc);
    if (n_bin == 0) failures++;
    if (n_dec == 0) failures++;
    if (n_idle == 0) failures++;
    if (n_switch == 0) failures++;
    if (n_first < 2) failures++;
    if (n_comp == 0) failures++;
    if (n_unc == 0) failures++;
    $display("variable-length tags: raw %0d, 3b %0d, 4b %0d, 5b %0d, 6b %0d, 7b %0d",
             vl_hist[0], vl_hist[1], vl_hist[2], vl_hist[3], vl_hist[4], vl_hist[5]);
    for (int k = 0; k < 6; k++) if (vl_hist[k] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
