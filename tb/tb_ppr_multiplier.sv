// tb_ppr_multiplier: self-checking test of the partial-product reducing
// multiplier.
//
// The 8 x 8 default and the 4 x 4 case are checked exhaustively; a 6 x 6
// instance (one reduced group plus two rows left over) and a 16 x 16
// instance with random operands. Every product is compared with the
// integer product a * b.
module tb_ppr_multiplier;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [5:0]  a6, b6;
  logic [11:0] p6;
  logic [15:0] a16, b16;
  logic [31:0] p16;

  ppr_multiplier              u_dut8  (.a(a8),  .b(b8),  .p(p8));
  ppr_multiplier #(.N(4))     u_dut4  (.a(a4),  .b(b4),  .p(p4));
  ppr_multiplier #(.N(6))     u_dut6  (.a(a6),  .b(b6),  .p(p6));
  ppr_multiplier #(.N(16))    u_dut16 (.a(a16), .b(b16), .p(p16));

  int checks = 0, failures = 0;

  task automatic report(input string what, input longint got, input longint want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        a8 = 8'(x); b8 = 8'(y);
        #1;
        report($sformatf("8x8 %0d*%0d", x, y), longint'(p8), longint'(x * y));
      end
    end
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        #1;
        report($sformatf("4x4 %0d*%0d", x, y), longint'(p4), longint'(x * y));
      end
    end
    for (int x = 0; x < 64; x++) begin
      for (int y = 0; y < 64; y++) begin
        a6 = 6'(x); b6 = 6'(y);
        #1;
        report($sformatf("6x6 %0d*%0d", x, y), longint'(p6), longint'(x * y));
      end
    end
    a16 = '1; b16 = '1;
    #1;
    report("16x16 max", longint'(p16), 64'hFFFF * 64'hFFFF);
    for (int t = 0; t < 20000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1;
      report("16x16", longint'(p16), longint'(a16) * longint'(b16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
