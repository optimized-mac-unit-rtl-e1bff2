// mac_width_driver: drives one MAC unit of operand width N with a random
// stream of operations and checks it, for the wide-operand tests.
//
// It instantiates mac_unit with N-bit operands and the default accumulator
// (2N+4 bits), applies NOPS operations (one in eight with clear, one in five
// cycles idle) with operands that are often all ones in the top bits, and
// after every clock edge compares acc with a reference accumulator computed
// in wide integer arithmetic and the combinational product with a * b. It
// counts checks, failures and accumulator wraps and raises done at the end.
module mac_width_driver #(
  parameter int unsigned N    = 16,
  parameter int unsigned NOPS = 2000
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   wraps,
  output logic done
);

  localparam int unsigned ACC_W = 2 * N + 4;

  logic             in_valid = 1'b0, clear = 1'b0;
  logic [N-1:0]     a = '0, b = '0;
  logic [2*N-1:0]   product;
  logic [ACC_W-1:0] acc;
  logic             out_valid;
  logic [ACC_W-1:0] model = '0;

  mac_unit #(.N(N)) u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .clear(clear),
    .a(a), .b(b), .product(product), .acc(acc), .out_valid(out_valid)
  );

  function automatic logic [N-1:0] rand_operand();
    logic [N-1:0] v;
    v = '0;
    for (int i = 0; i < (N + 31) / 32; i++) v = (v << 32) | N'($urandom);
    if ($urandom % 3 == 0) v |= {2'b11, {(N-2){1'b0}}} | (v << (N / 2));
    if ($urandom % 16 == 0) v = '1;
    return v;
  endfunction

  initial begin
    checks = 0; failures = 0; wraps = 0; done = 1'b0;
    @(posedge rst_n);
    for (int t = 0; t < NOPS; t++) begin
      logic [ACC_W:0] wide;
      logic v, c;
      v = ($urandom % 5) != 0;
      c = ($urandom % 8) == 0;
      @(negedge clk);
      in_valid = v; clear = c; a = rand_operand(); b = rand_operand();
      #1;
      checks++;
      if (product != (2*N)'(a) * (2*N)'(b)) begin
        failures++;
        if (failures < 5) $display("FAIL N=%0d product %h*%h = %h", N, a, b, product);
      end
      if (v) begin
        wide = (c ? '0 : {1'b0, model}) + (ACC_W+1)'(a) * (ACC_W+1)'(b);
        if (wide[ACC_W]) wraps++;
        model = wide[ACC_W-1:0];
      end
      @(posedge clk);
      #1;
      checks++;
      if (acc != model || out_valid != v) begin
        failures++;
        if (failures < 5) $display("FAIL N=%0d acc %h want %h", N, acc, model);
      end
    end
    done = 1'b1;
  end

endmodule
