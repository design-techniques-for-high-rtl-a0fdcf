// sync2: two-flop synchronizer for signals coming from a slow, unrelated
// clock domain (the tester's reset, test id and shift clock).
//
// Each bit of d is sampled on two successive rising edges of clk; q lags d by
// two cycles. The document only says the external control inputs are
// synchronized inside the chip; the two-flop form is this design's choice.
// No reset: the flops settle within two cycles of any input level.
module sync2 #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    meta <= d;
    q    <= meta;
  end
endmodule
