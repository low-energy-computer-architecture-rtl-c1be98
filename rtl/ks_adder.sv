// Kogge-Stone parallel-prefix adder.
//
// Computes sum = a + b + cin over W bits and the carry out.  Generate and
// propagate signals are combined in ceil(log2 W) prefix levels; at level k
// each bit i merges the group ending at i with the group ending at i-2^k, so
// every node drives at most two nodes of the next level (the low fan-out the
// structure is chosen for).  Purely combinational.
//
// Used as the final binary CPA of the multiplier, as the per-column CPAs of
// its decimal path, and (W = 8) as the byte subtractor / adder of the memory
// line compressor and decompressor.
module ks_adder #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int L = (W > 1) ? $clog2(W) : 1;

  logic [W:0] carry;

  always_comb begin
    logic [W-1:0] g, p, gn, pn;
    g = a & b;
    p = a ^ b;
    // bit 0 absorbs the carry in
    g[0] = (a[0] & b[0]) | (cin & (a[0] ^ b[0]));
    for (int k = 0; k < L; k++) begin
      for (int i = 0; i < W; i++) begin
        if (i >= (1 << k)) begin
          gn[i] = g[i] | (p[i] & g[i-(1<<k)]);
          pn[i] = p[i] & p[i-(1<<k)];
        end else begin
          gn[i] = g[i];
          pn[i] = p[i];
        end
      end
      g = gn;
      p = pn;
    end
    carry = {g, cin};
  end

  assign sum  = (a ^ b) ^ carry[W-1:0];
  assign cout = carry[W];
endmodule
