// buffer_out: 64-bit output shift register. The core loads a word from the
// write-back bus in parallel at full speed; the tester shifts it out serially
// at low speed.
//
// load (one core cycle) copies d into the register; it wins over a shift in
// the same cycle. Each rising edge of the slow shift clock (shift high, shiftb
// low) becomes one strobe in the core clock domain (shift_strobe); on a strobe
// the register shifts right, taking sin in at the top. sout is q[0], so the
// word leaves least significant bit first: bit i is on sout after i shifts.
// Shifting at the core clock with synchronized strobes and the bit order are
// this design's choices; the document gives the function, the 64-bit size and
// the pad names.
module buffer_out #(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         shift,
  input  logic         shiftb,
  input  logic         sin,     // sho_in pad
  output logic         sout,    // sho_out pad
  input  logic         load,    // parallel load from wbus
  input  logic [W-1:0] d
);
  logic         strobe, sdat;
  logic [W-1:0] q;

  shift_strobe u_strobe (
    .clk(clk), .shift(shift), .shiftb(shiftb), .sin(sin),
    .strobe(strobe), .sdat(sdat)
  );

  always_ff @(posedge clk)
    if (load)        q <= d;
    else if (strobe) q <= {sdat, q[W-1:1]};

  assign sout = q[0];
endmodule
