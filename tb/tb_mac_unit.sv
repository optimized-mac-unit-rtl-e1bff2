// tb_mac_unit: end-to-end test of the MAC unit at its default size
// (8 x 8 multiplier, 20-bit accumulator).
//
// The test first runs one complete operation, a 16-term dot product started
// with clear, and checks the final sum against a value computed here. Then
// it drives a long random stream of operations with random gaps, clears and
// operands (biased towards full scale so that the accumulator wraps), and
// one asynchronous reset in the middle of the run. After every clock edge
// it checks acc against a reference accumulator, the combinational product
// against a * b, and that out_valid follows in_valid by exactly one cycle.
// It counts how often each mechanism occurred: accumulate, clear, idle hold,
// accumulator wrap, reset, and the column-3 half adder of the partial
// product reduction producing a carry; a mechanism that never occurred
// counts as a failure.
module tb_mac_unit;

  localparam int unsigned N     = 8;
  localparam int unsigned ACC_W = 20;

  logic             clk = 1'b0;
  logic             rst_n = 1'b1;
  logic             in_valid = 1'b0;
  logic             clear = 1'b0;
  logic [N-1:0]     a = '0, b = '0;
  logic [2*N-1:0]   product;
  logic [ACC_W-1:0] acc;
  logic             out_valid;

  mac_unit u_dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .clear(clear),
    .a(a), .b(b), .product(product), .acc(acc), .out_valid(out_valid)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;
  int n_acc = 0, n_clear = 0, n_idle = 0, n_wrap = 0, n_reset = 0, n_ha_carry = 0;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 200_000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  logic [ACC_W-1:0] model = '0;

  // Drive one operation for one cycle and check the result after the edge.
  task automatic op(input logic v, input logic c, input logic [N-1:0] x, input logic [N-1:0] y);
    logic [ACC_W:0] wide;
    @(negedge clk);
    in_valid = v; clear = c; a = x; b = y;
    #1;
    check("product", product == (2*N)'(x) * (2*N)'(y));
    if (v) begin
      wide = (c ? '0 : {1'b0, model}) + (ACC_W+1)'(x) * (ACC_W+1)'(y);
      if (wide[ACC_W]) n_wrap++;
      model = wide[ACC_W-1:0];
      if (c) n_clear++; else n_acc++;
      // Column-3 half adder of a reduced group g: a[3]&b[4g] and a[0]&b[4g+3].
      for (int g = 0; g < N / 4; g++)
        if (x[3] && x[0] && y[4*g] && y[4*g+3]) n_ha_carry++;
    end else begin
      n_idle++;
    end
    @(posedge clk);
    #1;
    check("acc", acc == model);
    check("out_valid latency", out_valid == v);
    if (acc != model && failures < 10) $display("  acc=%h model=%h", acc, model);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1;
    n_reset++;
    check("reset clears acc", acc == '0 && out_valid == 1'b0);
    #5 rst_n = 1'b1;

    // One complete operation: sum_{k=0..15} (k+1)*(255-k), first term with clear.
    begin
      int unsigned want = 0;
      for (int k = 0; k < 16; k++) begin
        op(1'b1, k == 0, N'(k + 1), N'(255 - k));
        want += (k + 1) * (255 - k);
      end
      check("dot product", acc == ACC_W'(want));
      $display("dot product of 16 terms: %0d (expected %0d)", acc, want);
    end

    // Random stream.
    for (int t = 0; t < 20000; t++) begin
      logic [N-1:0] x, y;
      x = ($urandom % 4 == 0) ? N'($urandom | 8'hF0) : N'($urandom);
      y = ($urandom % 4 == 0) ? N'($urandom | 8'hF0) : N'($urandom);
      op(($urandom % 5) != 0, ($urandom % 40) == 0, x, y);
      if (t == 10000) begin
        // Asynchronous reset between edges.
        @(negedge clk);
        in_valid = 1'b0;
        #2 rst_n = 1'b0;
        #1;
        model = '0;
        n_reset++;
        check("async reset", acc == '0 && out_valid == 1'b0);
        @(negedge clk) rst_n = 1'b1;
      end
    end

    $display("mechanisms: accumulate=%0d clear=%0d idle=%0d wrap=%0d reset=%0d ha_carry=%0d",
             n_acc, n_clear, n_idle, n_wrap, n_reset, n_ha_carry);
    check("accumulate happened", n_acc > 0);
    check("clear happened", n_clear > 0);
    check("idle hold happened", n_idle > 0);
    check("accumulator wrap happened", n_wrap > 0);
    check("reset happened", n_reset > 1);
    check("reduction half-adder carry happened", n_ha_carry > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
