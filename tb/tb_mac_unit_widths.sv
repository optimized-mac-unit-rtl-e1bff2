// tb_mac_unit_widths: the MAC unit at the wider operand widths it is
// compared at, 16 x 16 and 64 x 64, plus 32 x 32 in between.
//
// Each width runs in its own mac_width_driver, which applies a random stream
// of multiply-accumulate operations and checks every result against wide
// integer arithmetic. The test fails if any width reports a failure, if an
// accumulator never wrapped, or if the watchdog expires.
module tb_mac_unit_widths;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int   c16, f16, w16, c32, f32, w32, c64, f64, w64;
  logic d16, d32, d64;

  mac_width_driver #(.N(16), .NOPS(4000)) u_w16 (
    .clk(clk), .rst_n(rst_n), .checks(c16), .failures(f16), .wraps(w16), .done(d16));
  mac_width_driver #(.N(32), .NOPS(4000)) u_w32 (
    .clk(clk), .rst_n(rst_n), .checks(c32), .failures(f32), .wraps(w32), .done(d32));
  mac_width_driver #(.N(64), .NOPS(4000)) u_w64 (
    .clk(clk), .rst_n(rst_n), .checks(c64), .failures(f64), .wraps(w64), .done(d64));

  int checks = 0, failures = 0, cycles = 0;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 100_000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    #12 rst_n = 1'b1;
    wait (d16 && d32 && d64);
    #1;
    $display("16x16: %0d checks, %0d wraps; 32x32: %0d checks, %0d wraps; 64x64: %0d checks, %0d wraps",
             c16, w16, c32, w32, c64, w64);
    checks   = c16 + c32 + c64 + 3;
    failures = f16 + f32 + f64;
    if (w16 == 0) failures++;
    if (w32 == 0) failures++;
    if (w64 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
