// regfile: 32 x 64-bit register file with two read ports (A, B) and one
// write port (W), each with its own address decoder.
//
// Following the document, the three ports are not multiplexed onto shared
// decoders: rf_decoder instances turn ra, rb and rw into one-hot row selects.
// A read ANDs each row with its select and ORs the rows together, the logical
// form of a precharged bit-line pulled low by the selected cell; the result is
// registered, so rda/rdb are valid the cycle after ra/rb (the chip decodes in
// the low phase, reads in the high phase and latches at the falling edge,
// one cycle in all). A write stores wd into the selected row at the rising
// edge that ends the cycle in which we is high.
//
// Choices of this design: a read and a write of the same register in the same
// cycle returns the old value; the cells have no reset, as on the chip.
module regfile #(
  parameter int unsigned NREG = 32,
  parameter int unsigned W    = 64,
  localparam int unsigned AW  = $clog2(NREG)
) (
  input  logic          clk,
  input  logic [AW-1:0] ra,
  input  logic [AW-1:0] rb,
  input  logic [AW-1:0] rw,
  input  logic          we,
  input  logic [W-1:0]  wd,
  output logic [W-1:0]  rda,
  output logic [W-1:0]  rdb
);
  logic [W-1:0]     cells [NREG];
  logic [2**AW-1:0] sel_a, sel_b, sel_w;
  logic [W-1:0]     bit_a, bit_b;

  rf_decoder #(.N(AW)) u_dec_a (.addr(ra), .sel(sel_a));
  rf_decoder #(.N(AW)) u_dec_b (.addr(rb), .sel(sel_b));
  rf_decoder #(.N(AW)) u_dec_w (.addr(rw), .sel(sel_w));

  // Wired-OR read bit-lines.
  always_comb begin
    bit_a = '0;
    bit_b = '0;
    for (int r = 0; r < int'(NREG); r++) begin
      bit_a |= {W{sel_a[r]}} & cells[r];
      bit_b |= {W{sel_b[r]}} & cells[r];
    end
  end

  // Sense and latch.
  always_ff @(posedge clk) begin
    rda <= bit_a;
    rdb <= bit_b;
  end

  // Write drivers.
  always_ff @(posedge clk)
    for (int r = 0; r < int'(NREG); r++)
      if (we && sel_w[r]) cells[r] <= wd;
endmodule
