// pp_group_reduce: rearranges four partial-product rows into three.
//
// The inputs are four N-bit partial products r0..r3 of a shift-and-add
// multiplier, row i weighted by 2^i. Stacked up, every column from 3 to N-1
// holds four bits and column N three, while every other column holds at most
// three. The block keeps every column at three bits or fewer so that the four
// rows become three rows s0..s2 (each N+3 bits, all of weight 2^0) with
// s0 + s1 + s2 == r0 + 2*r1 + 4*r2 + 8*r3:
//   * column 3: a half adder on r0[3] and r3[0]; its carry moves to column 4;
//   * columns 4..N-1: a full adder on r0[c], r3[c-3] and the incoming carry;
//   * column N: a half adder on r3[N-3] and the incoming carry;
//   * column N+1 takes the last carry, every other bit is only re-routed.
// For the 4 x 4 case this is exactly two AND and two XOR gates (two half
// adders) and saves one of the three row adders of an array multiplier; that
// gate count and the 4-to-3 reduction follow the design. Which bits enter the
// half adders, and the full adders needed when N > 4, are this
// implementation's reading of the scheme.
//
// Purely combinational. N must be at least 4.
module pp_group_reduce #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] r0,
  input  logic [N-1:0] r1,
  input  logic [N-1:0] r2,
  input  logic [N-1:0] r3,
  output logic [N+2:0] s0,
  output logic [N+2:0] s1,
  output logic [N+2:0] s2
);

  if (N < 4) begin : g_bad_width
    $error("pp_group_reduce: N must be at least 4");
  end

  // k[c] is the carry that enters column c from the adder in column c-1.
  logic [N+1:4] k;

  always_comb begin
    s0 = '0;
    s1 = '0;
    s2 = '0;
    k  = '0;

    // Rows r1 and r2 are only re-routed: r1 into s1, r2 into s2.
    s1[N:1]   = r1;
    s2[N+1:2] = r2;

    // Columns 0..2 of r0 pass straight into s0.
    s0[2:0] = r0[2:0];

    // Column 3: half adder on r0[3] and r3[0].
    s0[3] = r0[3] ^ r3[0];
    k[4]  = r0[3] & r3[0];

    // Columns 4..N-1: full adder on r0[c], r3[c-3] and the carry.
    for (int unsigned c = 4; c < N; c++) begin
      s0[c]  = r0[c] ^ r3[c-3] ^ k[c];
      k[c+1] = (r0[c] & r3[c-3]) | (k[c] & (r0[c] ^ r3[c-3]));
    end

    // Column N: half adder on r3[N-3] and the carry.
    s0[N]   = r3[N-3] ^ k[N];
    k[N+1]  = r3[N-3] & k[N];

    // Column N+1 takes the last carry; the top two bits of r3 go to s1,
    // whose own bits end at column N.
    s0[N+1]   = k[N+1];
    s1[N+2:N+1] = r3[N-1:N-2];
  end

endmodule
