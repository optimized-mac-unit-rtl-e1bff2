// mac_unit: multiply-accumulate unit built from a partial-product reducing
// multiplier, a Kogge-Stone adder and an accumulator register.
//
// Each accepted operation computes acc <= acc + a*b (or acc <= a*b when
// clear is high, which starts a new sum). The product comes from
// ppr_multiplier, whose rows are cut by a quarter before they are summed;
// the product is then added to the accumulator by a Kogge-Stone adder and
// stored in acc_reg. These three sub units and the choice of Kogge-Stone are
// the design's; the operand width default (8 x 8) is the configuration it
// evaluates. Unsigned operands, the ACC_W-bit accumulator that wraps modulo
// 2^ACC_W, the valid/clear controls and the reset are this implementation's
// choices.
//
// Timing: the multiply and add are one combinational path, so an operation
// presented with in_valid high is in acc on the next rising edge, with
// out_valid high for that one cycle. One operation per clock, no stalls.
module mac_unit
  import mac_pkg::*;
#(
  parameter int unsigned N     = MULT_W_DEF,
  parameter int unsigned ACC_W = 2 * N + ACC_GUARD_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,   // accept a, b this cycle
  input  logic             clear,      // with in_valid: acc <= a*b
  input  logic [N-1:0]     a,          // unsigned multiplicand
  input  logic [N-1:0]     b,          // unsigned multiplier
  output logic [2*N-1:0]   product,    // a*b of the current inputs
  output logic [ACC_W-1:0] acc,        // accumulator
  output logic             out_valid   // acc was updated at the last edge
);

  if (ACC_W < 2 * N) begin : g_bad_width
    $error("mac_unit: ACC_W must hold a full product");
  end

  ppr_multiplier #(.N(N)) u_mult (
    .a(a), .b(b), .p(product)
  );

  logic [ACC_W-1:0] addend, acc_next;
  logic             unused_cout;

  assign addend = clear ? '0 : acc;

  ks_adder #(.W(ACC_W)) u_acc_add (
    .a(addend), .b(ACC_W'(product)), .cin(1'b0),
    .sum(acc_next), .cout(unused_cout)
  );

  acc_reg #(.W(ACC_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .en(in_valid), .d(acc_next), .q(acc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  // out_valid follows in_valid by exactly one cycle.
  a_valid_latency: assert property (
    @(posedge clk) disable iff (!rst_n) in_valid |=> out_valid
  );

endmodule
