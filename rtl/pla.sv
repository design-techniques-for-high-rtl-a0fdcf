// pla: synchronous programmable logic array, an AND plane of product terms
// feeding an OR plane of outputs, with the outputs latched every cycle.
//
// The personality is given by two parameters. AND_PLANE has one row per
// product term; bit 2*i connects input i and bit 2*i+1 connects its
// complement, so a term is true when every connected literal is true (a row
// with nothing connected is always true). OR_PLANE has one row per term; bit
// j connects the term to output j, which is the OR of its connected terms.
// This mirrors the document's two NOR-based ROM planes, each programmed by the
// presence or absence of one transistor per crossing.
//
// Timing: on the chip the AND plane evaluates in one clock phase, the OR plane
// in the other, and the outputs are latched once per cycle. Here both planes
// are combinational from in and the outputs are registered at the rising
// edge, so out is the function of in one cycle earlier. Feeding some outputs
// back to inputs makes a finite state machine with no extra logic.
// The default sizes are the document's: 10 inputs, 64 terms, 26 outputs.
// The default personality is the datapath controller's (fdp_pkg), so the
// module on its own is the controller's array without the state feedback.
module pla #(
  parameter int unsigned NI = 10,
  parameter int unsigned NM = 64,
  parameter int unsigned NO = 26,
  parameter logic [NM-1:0][2*NI-1:0] AND_PLANE = fdp_pkg::CTRL_AND,
  parameter logic [NM-1:0][NO-1:0]   OR_PLANE  = fdp_pkg::CTRL_OR
) (
  input  logic          clk,
  input  logic [NI-1:0] in,
  output logic [NO-1:0] out
);
  logic [NM-1:0] term;
  logic [NO-1:0] or_d;

  // AND plane: a term is killed by any connected literal that is false.
  always_comb begin
    for (int m = 0; m < int'(NM); m++) begin
      term[m] = 1'b1;
      for (int i = 0; i < int'(NI); i++)
        if ((AND_PLANE[m][2*i] && !in[i]) || (AND_PLANE[m][2*i+1] && in[i]))
          term[m] = 1'b0;
    end
  end

  // OR plane.
  always_comb begin
    or_d = '0;
    for (int m = 0; m < int'(NM); m++)
      if (term[m]) or_d |= OR_PLANE[m];
  end

  always_ff @(posedge clk) out <= or_d;
endmodule
