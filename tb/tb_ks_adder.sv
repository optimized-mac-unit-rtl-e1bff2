// tb_ks_adder: self-checking test of the Kogge-Stone adder.
//
// Two instances are driven: the 16-bit default and an odd 13-bit width, so
// that the prefix levels that reach past the top bit are exercised. Corner
// vectors (all ones plus carry in, alternating patterns) are followed by
// random ones; every sum and carry out is compared with the plain integer sum
// a + b + cin. A watchdog ends the run if it does not finish.
module tb_ks_adder;

  localparam int unsigned W1 = 16;
  localparam int unsigned W2 = 13;

  logic [W1-1:0] a1, b1, s1;
  logic          c1, co1;
  logic [W2-1:0] a2, b2, s2;
  logic          c2, co2;

  ks_adder u_dut1 (.a(a1), .b(b1), .cin(c1), .sum(s1), .cout(co1));
  ks_adder #(.W(W2)) u_dut2 (.a(a2), .b(b2), .cin(c2), .sum(s2), .cout(co2));

  int checks = 0, failures = 0;

  task automatic check1(input logic [W1-1:0] x, input logic [W1-1:0] y, input logic ci);
    logic [W1:0] ref_sum;
    a1 = x; b1 = y; c1 = ci;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + (W1+1)'(ci);
    checks++;
    if ({co1, s1} !== ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d %h+%h+%b: got %b_%h want %h", W1, x, y, ci, co1, s1, ref_sum);
    end
  endtask

  task automatic check2(input logic [W2-1:0] x, input logic [W2-1:0] y, input logic ci);
    logic [W2:0] ref_sum;
    a2 = x; b2 = y; c2 = ci;
    #1;
    ref_sum = {1'b0, x} + {1'b0, y} + (W2+1)'(ci);
    checks++;
    if ({co2, s2} !== ref_sum) begin
      failures++;
      if (failures < 10) $display("FAIL W=%0d %h+%h+%b: got %b_%h want %h", W2, x, y, ci, co2, s2, ref_sum);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check1('1, '0, 1'b1);
    check1('1, '1, 1'b1);
    check1('1, 16'h0001, 1'b0);
    check1(16'h5555, 16'haaaa, 1'b1);
    check1(16'h8000, 16'h8000, 1'b0);
    check2('1, '0, 1'b1);
    check2('1, '1, 1'b0);
    for (int i = 0; i < 20000; i++) begin
      check1(W1'($urandom), W1'($urandom), 1'($urandom));
      check2(W2'($urandom), W2'($urandom), 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
