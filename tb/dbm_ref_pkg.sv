// Reference arithmetic for the multiplier testbenches: BCD conversion and a
// schoolbook BCD multiplier on digit arrays, written independently of the
// design (no recoding, no column trees).
package dbm_ref_pkg;

  // random 16-digit BCD number
  function automatic logic [63:0] rand_bcd16();
    logic [63:0] r;
    for (int i = 0; i < 16; i++) r[4*i +: 4] = 4'($urandom_range(0, 9));
    return r;
  endfunction

  // BCD (up to 20 digits) to binary
  function automatic logic [79:0] bcd_to_bin(logic [79:0] d);
    logic [79:0] v;
    v = '0;
    for (int i = 19; i >= 0; i--) v = v * 10 + 80'(d[4*i +: 4]);
    return v;
  endfunction

  // binary to 20-digit BCD
  function automatic logic [79:0] bin_to_bcd(logic [79:0] v);
    logic [79:0] d;
    for (int i = 0; i < 20; i++) begin
      d[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return d;
  endfunction

  // 16-digit x 16-digit BCD product, 32 digits
  function automatic logic [127:0] bcd_mul(logic [63:0] a, logic [63:0] b);
    int acc [33];
    logic [127:0] r;
    for (int k = 0; k < 33; k++) acc[k] = 0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++)
        acc[i+j] += int'(a[4*i +: 4]) * int'(b[4*j +: 4]);
    for (int k = 0; k < 32; k++) begin
      acc[k+1] += acc[k] / 10;
      r[4*k +: 4] = 4'(acc[k] % 10);
    end
    return r;
  endfunction

endpackage
