// fdp_top: the fast 64-bit integer datapath test chip.
//
// A PLA-controlled core (controller, datapath_core with its register file and
// adder) runs continuously on the fast clock, while all data enters and
// leaves through two 64-bit shift registers clocked by a slow tester.
// Operation, as in the document: shift a word into buffer_in through shi_in;
// hold reset, set tid, release reset; the controller runs the selected
// program (load a register from buffer_in, add, shift the file, copy reg[31]
// into buffer_out, ...) and raises done, held until reset returns; shift the
// result out of buffer_out through sho_out. Programs are listed in fdp_pkg.
//
// Ports are the chip's logic pads. clk is the core clock after the on-chip
// clock driver, which is an analog buffer chain and is not part of this RTL;
// the clock monitor output and the power pads are not modelled either.
// shift/shiftb clock both shift registers; they must not be pulsed while a
// program that reads buffer_in or loads buffer_out is running.
module fdp_top
  import fdp_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic [2:0] tid,
  output logic       done,
  input  logic       shift,
  input  logic       shiftb,
  input  logic       shi_in,
  output logic       shi_out,
  input  logic       sho_in,
  output logic       sho_out
);
  ctl_t            ctl;
  logic            rst_sync;
  logic [XLEN-1:0] bufin_q, wbus;
  logic            oload;

  controller u_ctrl (
    .clk(clk), .reset(reset), .tid(tid), .ctl(ctl), .rst_sync(rst_sync)
  );

  datapath_core u_core (
    .clk(clk), .rst(rst_sync), .ctl(ctl), .bufin(bufin_q),
    .wbus(wbus), .oload(oload), .done_o(done)
  );

  buffer_in #(.W(XLEN)) u_bin (
    .clk(clk), .shift(shift), .shiftb(shiftb),
    .sin(shi_in), .sout(shi_out), .q(bufin_q)
  );

  buffer_out #(.W(XLEN)) u_bout (
    .clk(clk), .shift(shift), .shiftb(shiftb),
    .sin(sho_in), .sout(sho_out), .load(oload), .d(wbus)
  );
endmodule
