// Reference model and test lines for the memory line compression
// testbenches.  The four lines are 32-byte lines of the Canneal benchmark
// data (byte 0 first): line 1 is a page's first line, lines 2 and 4
// compress against it, line 3 does not (0xFF against 0x00 is a delta of
// +255).
package mem_ref_pkg;

  typedef logic [255:0] line_t;

  function automatic line_t from_bytes(byte unsigned b [32]);
    line_t l;
    for (int i = 0; i < 32; i++) l[8*i +: 8] = b[i];
    return l;
  endfunction

  function automatic line_t canneal_line(int k);
    byte unsigned l1 [32] = '{8'h61,8'h02,8'h67,8'h61,8'h68,8'h64,8'h68,8'h62,8'h02,8'h63,8'h6A,8'h67,8'h6A,8'h61,8'h63,8'h02,
                             8'h68,8'h65,8'h63,8'h61,8'h66,8'h64,8'h01,8'h6A,8'h67,8'h62,8'h66,8'h6A,8'h00,8'h00,8'h00,8'h00};
    byte unsigned l2 [32] = '{8'h65,8'h01,8'h69,8'h67,8'h63,8'h64,8'h63,8'h66,8'h01,8'h61,8'h63,8'h6A,8'h61,8'h67,8'h67,8'h02,
                             8'h64,8'h65,8'h62,8'h68,8'h6A,8'h68,8'h01,8'h66,8'h63,8'h65,8'h62,8'h63,8'h00,8'h00,8'h00,8'h00};
    byte unsigned l3 [32] = '{8'h69,8'h01,8'h65,8'h63,8'h69,8'h63,8'h68,8'h6A,8'h02,8'h69,8'h66,8'h68,8'h61,8'h64,8'h61,8'h02,
                             8'h67,8'h61,8'h68,8'h64,8'h68,8'h62,8'h02,8'h63,8'h6A,8'h67,8'h6A,8'h61,8'h00,8'h00,8'hFF,8'h00};
    byte unsigned l4 [32] = '{8'h69,8'h01,8'h65,8'h63,8'h69,8'h63,8'h68,8'h6A,8'h02,8'h69,8'h66,8'h68,8'h61,8'h64,8'h61,8'h02,
                             8'h67,8'h61,8'h68,8'h64,8'h68,8'h62,8'h02,8'h63,8'h6A,8'h67,8'h6A,8'h61,8'h00,8'h00,8'h00,8'h00};
    case (k)
      1:       return from_bytes(l1);
      2:       return from_bytes(l2);
      3:       return from_bytes(l3);
      default: return from_bytes(l4);
    endcase
  endfunction

  // a line whose bytes differ from ref by at most +-spread (saturating at
  // 0 and 255)
  function automatic line_t near_line(line_t ref_l, int spread);
    line_t l;
    for (int i = 0; i < 32; i++) begin
      int d;
      d = int'($urandom_range(0, 2 * spread)) - spread;
      d = d + int'(ref_l[8*i +: 8]);
      l[8*i +: 8] = (d < 0) ? 8'd0 : (d > 255) ? 8'd255 : 8'(d);
    end
    return l;
  endfunction

  // expected compressor output: flag and 257-bit stored form
  function automatic logic compress_ref(line_t f, line_t l, output line_t c);
    logic ok;
    ok = 1'b1;
    c = '0;
    for (int i = 0; i < 32; i++) begin
      int d;
      d = int'(l[8*i +: 8]) - int'(f[8*i +: 8]);
      if (d < -32 || d > 31) ok = 1'b0;
      c[6*i +: 6] = 6'(d);
    end
    if (!ok) c = l;
    return ok;
  endfunction

endpackage
