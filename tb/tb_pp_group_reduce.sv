// tb_pp_group_reduce: self-checking test of the 4-to-3 row rearrangement.
//
// The 4 x 4 case is tested exhaustively over all 2^16 values of the four
// input rows, an 8-bit instance with random rows. In each case the three
// output rows must add up to r0 + 2*r1 + 4*r2 + 8*r3, computed here with
// plain integer arithmetic. For the 4 x 4 case the test also checks that
// rows r1 and r2 reach s1 and s2 unchanged, so that only r0 and r3 take part
// in the half adders. A watchdog ends the run if it does not finish.
module tb_pp_group_reduce;

  localparam int unsigned NA = 4;
  localparam int unsigned NB = 8;

  logic [NA-1:0] ra [4];
  logic [NA+2:0] sa0, sa1, sa2;
  logic [NB-1:0] rb [4];
  logic [NB+2:0] sb0, sb1, sb2;

  pp_group_reduce u_dut4 (
    .r0(ra[0]), .r1(ra[1]), .r2(ra[2]), .r3(ra[3]),
    .s0(sa0), .s1(sa1), .s2(sa2)
  );
  pp_group_reduce #(.N(NB)) u_dut8 (
    .r0(rb[0]), .r1(rb[1]), .r2(rb[2]), .r3(rb[3]),
    .s0(sb0), .s1(sb1), .s2(sb2)
  );

  int checks = 0, failures = 0;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned want, got;
    for (int v = 0; v < (1 << 16); v++) begin
      for (int i = 0; i < 4; i++) ra[i] = NA'(v >> (4 * i));
      #1;
      want = ra[0] + 2 * ra[1] + 4 * ra[2] + 8 * ra[3];
      got  = sa0 + sa1 + sa2;
      checks++;
      if (got != want) begin
        failures++;
        if (failures < 10) $display("FAIL N=4 rows %h: got %0d want %0d", v, got, want);
      end
      // Rows s1 and s2 carry r1 and r2 unchanged.
      checks++;
      if (sa1[NA:1] != ra[1] || sa2[NA+1:2] != ra[2]) begin
        failures++;
        if (failures < 10) $display("FAIL N=4 rows %h: r1/r2 not re-routed", v);
      end
    end
    for (int t = 0; t < 50000; t++) begin
      for (int i = 0; i < 4; i++) rb[i] = NB'($urandom);
      #1;
      want = rb[0] + 2 * rb[1] + 4 * rb[2] + 8 * rb[3];
      got  = sb0 + sb1 + sb2;
      checks++;
      if (got != want) begin
        failures++;
        if (failures < 10) $display("FAIL N=8: got %0d want %0d", got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
