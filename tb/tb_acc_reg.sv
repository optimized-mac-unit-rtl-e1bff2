// tb_acc_reg: self-checking test of the accumulator register.
//
// Checks the asynchronous reset (the output clears before any clock edge),
// loading with en high, holding with en low, and a reset in the middle of a
// run, against a reference value kept by the testbench. A watchdog ends the
// run if it does not finish.
module tb_acc_reg;

  localparam int unsigned W = 20;

  logic         clk = 1'b0;
  logic         rst_n = 1'b1;
  logic         en = 1'b0;
  logic [W-1:0] d = '0;
  logic [W-1:0] q;
  logic [W-1:0] model;

  acc_reg u_dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycles = 0;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 10000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic expect_q(input string what);
    checks++;
    if (q !== model) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%h want %h", what, q, model);
    end
  endtask

  initial begin
    model = '0;
    #1 rst_n = 1'b0;
    #1;
    expect_q("reset");
    @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = W'($urandom);
      @(posedge clk);
      #1;
      if (en) model = d;
      expect_q(en ? "load" : "hold");
      if (t == 1000) begin
        // Asynchronous reset between clock edges.
        #2 rst_n = 1'b0;
        #1 model = '0;
        expect_q("async reset");
        @(negedge clk) rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
