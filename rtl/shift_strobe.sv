// shift_strobe: turns the tester's slow shift clock into one-cycle shift
// strobes in the fast core clock domain.
//
// The shift-register pads carry a complementary pair (shift, shiftb). Both,
// together with the serial data bit, are synchronized with sync2. A strobe
// is produced on the cycle where the synchronized shift has just risen while
// shiftb is low; sdat is the serial bit sampled alongside it. The tester must
// hold the serial bit steady around the rising shift edge, as it would for any
// edge-clocked shift register. The strobe comes three fast cycles after the
// edge. Using the fast clock for the shift registers, instead of clocking
// them from the shift pad, is this design's choice: it keeps one clock
// domain in the core.
module shift_strobe (
  input  logic clk,
  input  logic shift,    // slow shift clock from the pad
  input  logic shiftb,   // its complement
  input  logic sin,      // serial data from the pad
  output logic strobe,   // one fast cycle per rising shift edge
  output logic sdat      // serial bit to shift in on strobe
);
  logic [2:0] s;         // {sin, shiftb, shift} after synchronization
  logic       shift_q;

  sync2 #(.W(3)) u_sync (.clk(clk), .d({sin, shiftb, shift}), .q(s));

  always_ff @(posedge clk) shift_q <= s[0];

  assign strobe = s[0] & ~shift_q & ~s[1];
  assign sdat   = s[2];
endmodule
