// ppr_multiplier: unsigned N x N multiplier with 25% fewer partial products.
//
// The N partial products a & {N{b[i]}} (row i weighted by 2^i) are taken in
// groups of four. Each complete group passes through pp_group_reduce, which
// rearranges its four rows into three with a few half and full adders, so an
// N-row matrix shrinks to 3*(N/4) rows (plus N%4 untouched rows when N is not
// a multiple of four): 8 x 8 leaves 6 rows instead of 8. The rows are then
// summed one after another by a chain of 2N-bit Kogge-Stone adders, as the
// row adders of an array multiplier are, so every removed row removes one
// adder from the critical path. The row reduction and the Kogge-Stone adder
// follow the design; the grouping by four for widths above 4 and the linear
// adder chain are this implementation's reading of it.
//
// Interface: a and b are unsigned N-bit operands, p = a * b (2N bits).
// Purely combinational.
module ppr_multiplier
  import mac_pkg::*;
#(
  parameter int unsigned N = MULT_W_DEF
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned G = N / 4;            // complete groups of four
  localparam int unsigned L = N % 4;            // rows left over
  localparam int unsigned R = reduced_rows(N);  // rows to be summed

  if (N < 4) begin : g_bad_width
    $error("ppr_multiplier: N must be at least 4");
  end

  // Plain partial products.
  logic [N-1:0] pp [N];
  always_comb begin
    for (int unsigned i = 0; i < N; i++) pp[i] = a & {N{b[i]}};
  end

  // Reduced rows, each placed at its weight in a 2N-bit word.
  logic [2*N-1:0] row [R];

  for (genvar g = 0; g < G; g++) begin : g_group
    logic [N+2:0] s0, s1, s2;
    pp_group_reduce #(.N(N)) u_red (
      .r0(pp[4*g]), .r1(pp[4*g+1]), .r2(pp[4*g+2]), .r3(pp[4*g+3]),
      .s0(s0), .s1(s1), .s2(s2)
    );
    // 4g + N + 3 <= 2N for every complete group, so nothing is lost.
    assign row[3*g]   = (2*N)'(s0) << (4*g);
    assign row[3*g+1] = (2*N)'(s1) << (4*g);
    assign row[3*g+2] = (2*N)'(s2) << (4*g);
  end

  for (genvar j = 0; j < L; j++) begin : g_left
    assign row[3*G+j] = (2*N)'(pp[4*G+j]) << (4*G+j);
  end

  // Chain of Kogge-Stone adders: acc[k] = row[0] + ... + row[k].
  logic [2*N-1:0] acc [R];
  assign acc[0] = row[0];

  for (genvar k = 1; k < R; k++) begin : g_add
    logic unused_cout;
    ks_adder #(.W(2*N)) u_add (
      .a(acc[k-1]), .b(row[k]), .cin(1'b0), .sum(acc[k]), .cout(unused_cout)
    );
  end

  assign p = acc[R-1];

endmodule
