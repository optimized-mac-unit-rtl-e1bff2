// ks_adder: W-bit Kogge-Stone parallel-prefix adder with carry in and out.
//
// This is the adder used throughout the MAC unit, both to sum the reduced
// partial-product rows and to add the product into the accumulator. Bit i
// first forms generate g = a&b and propagate p = a^b; the carry in is folded
// into the generate of bit 0. Then $clog2(W) prefix levels follow; at level l
// every bit i >= 2^l combines its (G,P) pair with the pair of bit i-2^l:
//   G = G_hi | P_hi & G_lo,   P = P_hi & P_lo.
// After the last level G of bit i is the carry out of bit i, so
// sum[i] = p[i] ^ carry_into[i] and cout = G of bit W-1. The structure is the
// textbook Kogge-Stone network (minimal depth, fan-out of one per node,
// dense wiring); the design names this adder but does not draw it.
//
// Purely combinational: no clock, result valid one adder delay after inputs.
module ks_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned LVL = $clog2(W);

  if (W < 2) begin : g_bad_width
    $error("ks_adder: W must be at least 2");
  end

  logic [W-1:0] p0;       // bit propagate a ^ b
  logic [W-1:0] gen, prp;  // group generate / propagate, updated level by level
  logic [W-1:0] carry_in;  // carry into each bit

  always_comb begin
    p0     = a ^ b;
    gen    = a & b;
    gen[0] = (a[0] & b[0]) | (p0[0] & cin);
    prp    = p0;
    for (int unsigned l = 0; l < LVL; l++) begin
      // Walk from the top bit down so that bit i-2^l still holds level l.
      for (int i = W - 1; i >= (1 << l); i--) begin
        gen[i] = gen[i] | (prp[i] & gen[i - (1 << l)]);
        prp[i] = prp[i] & prp[i - (1 << l)];
      end
    end
    carry_in = {gen[W-2:0], cin};
    sum      = p0 ^ carry_in;
    cout     = gen[W-1];
  end

endmodule
