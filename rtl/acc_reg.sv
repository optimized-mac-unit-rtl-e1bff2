// acc_reg: the accumulator register of the MAC unit.
//
// Holds the running sum. On a rising clock edge with en high it loads d (the
// adder's output); otherwise it keeps its value. rst_n clears it to zero
// asynchronously. The register itself is part of the design; the enable and
// the asynchronous active-low reset are this implementation's choices.
module acc_reg #(
  parameter int unsigned W = 20
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
