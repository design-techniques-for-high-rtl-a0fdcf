// buffer_in: 64-bit input shift register. The tester shifts a word in
// serially at low speed; the core reads it in parallel onto the write-back bus.
//
// Each rising edge of the slow shift clock (shift high, shiftb low) becomes
// one strobe in the core clock domain (shift_strobe); on a strobe the register
// shifts right, taking the serial bit in at the top: q <= {sin, q[63:1]}. After
// 64 shifts the first bit sent sits in q[0] (least significant bit first).
// sout is q[0], the bit that falls out next, so the tester can read back what
// it loaded. q is a plain register output and can be read every core cycle.
// Shifting at the core clock with synchronized strobes, the bit order and the
// serial output are this design's choices; the document gives the function,
// the 64-bit size and the pad names.
module buffer_in #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         shift,
  input  logic         shiftb,
  input  logic         sin,     // shi_in pad
  output logic         sout,    // shi_out pad
  output logic [W-1:0] q        // parallel word for wbus
);
  logic strobe, sdat;

  shift_strobe u_strobe (
    .clk(clk), .shift(shift), .shiftb(shiftb), .sin(sin),
    .strobe(strobe), .sdat(sdat)
  );

  always_ff @(posedge clk)
    if (strobe) q <= {sdat, q[W-1:1]};

  assign sout = q[0];
endmodule
