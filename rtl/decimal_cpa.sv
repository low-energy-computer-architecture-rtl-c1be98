// Decimal carry-propagate adder with a Kogge-Stone carry network.
//
// Adds two ND-digit BCD-8421 numbers and a carry in.  Each digit pair gives
// a decimal generate (a+b >= 10) and propagate (a+b == 9); these are combined
// in ceil(log2 ND) prefix levels exactly like a binary Kogge-Stone adder, and
// each result digit is (a+b+carry) mod 10.  Inputs must be valid BCD.
// Purely combinational.  The final adder of the multiplier's decimal path.
module decimal_cpa #(
  parameter int ND = 32
) (
  input  logic [4*ND-1:0] a,
  input  logic [4*ND-1:0] b,
  input  logic            cin,
  output logic [4*ND-1:0] sum,
  output logic            cout
);
  localparam int L = (ND > 1) ? $clog2(ND) : 1;

  logic [ND-1:0] g0, p0;
  logic [ND:0]   carry;

  always_comb begin
    for (int i = 0; i < ND; i++) begin
      logic [4:0] t;
      t = {1'b0, a[4*i +: 4]} + {1'b0, b[4*i +: 4]};
      g0[i] = (t >= 5'd10);
      p0[i] = (t == 5'd9);
    end
  end

  always_comb begin
    logic [ND-1:0] g, p, gn, pn;
    g = g0;
    p = p0;
    g[0] = g0[0] | (p0[0] & cin);
    for (int k = 0; k < L; k++) begin
      for (int i = 0; i < ND; i++) begin
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

  always_comb begin
    for (int i = 0; i < ND; i++) begin
      logic [4:0] t;
      t = {1'b0, a[4*i +: 4]} + {1'b0, b[4*i +: 4]} + {4'd0, carry[i]};
      sum[4*i +: 4] = (t >= 5'd10) ? 4'(t - 5'd10) : t[3:0];
    end
  end
  assign cout = carry[ND];
endmodule
