// datapath_core: the four-cycle read / add / write-back pipeline of the fast
// datapath: register file, adder, bypass bus (bbus) and write-back bus (wbus).
//
// One operation is issued per cycle as a ctl_t control word; each takes four
// cycles from register read to register write, so up to four are in flight.
//   cycle 1  read:   ra and rb are decoded and read; the file registers A, B.
//   cycle 2  bbus:   operand A is driven onto bbus, either from port A or,
//                    when byp is set, straight from wbus (the result of the
//                    operation issued two cycles earlier, written back in this
//                    same cycle); operand B is port B. Adder block 1.
//   cycle 3  add:    adder blocks 2 and 3; the sum is registered.
//   cycle 4  wbus:   the selected source (adder sum, the register value read
//                    in cycle 1, or buffer_in) is driven onto wbus and written
//                    into register rw at the end of the cycle; with oload set,
//                    wbus is also loaded into buffer_out.
// The chip spends the same four cycles as eight clock phases (decode, read,
// bbus, adder1, adder2, adder3, wbus, write); this version pairs the phases
// into edge-triggered cycles. Two dependent additions can therefore be issued
// two cycles apart, the second taking the first's result over the bypass; one
// cycle apart is too close, and it is the controller's job not to do that.
// A register value moved to wbus without passing the adder (program shift and
// out31) rides a two-register delay alongside the adder; the document says
// only that wbus carries results "from the adder or the register file".
//
// The control word travels with its operation; rst (synchronous) clears the
// control pipeline so that no stale write happens. done_o is the controller's
// done marker once it reaches the write-back stage, i.e. the cycle after the
// last write of the program.
module datapath_core
  import fdp_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  ctl_t            ctl,        // issue-stage control word
  input  logic [XLEN-1:0] bufin,      // buffer_in parallel word
  output logic [XLEN-1:0] wbus,       // write-back bus
  output logic            oload,      // load buffer_out from wbus
  output logic            done_o
);
  ctl_t            c2, c3, c4;        // control words of stages 2, 3, 4
  logic [XLEN-1:0] rf_a, rf_b;        // register file outputs (stage 2)
  logic [XLEN-1:0] bbus;              // operand A after the bypass
  logic [XLEN-1:0] mv3, mv4;          // register value on its way to wbus
  logic [XLEN-1:0] sum;               // adder result (stage 4)
  logic            cout;
  logic            we;

  // Control pipeline.
  always_ff @(posedge clk)
    if (rst) begin
      c2 <= '0;
      c3 <= '0;
      c4 <= '0;
    end else begin
      c2 <= ctl;
      c3 <= c2;
      c4 <= c3;
    end

  regfile #(.NREG(NREG), .W(XLEN)) u_rf (
    .clk(clk),
    .ra(ctl.ra), .rb(ctl.rb),
    .rw(c4.rw), .we(we), .wd(wbus),
    .rda(rf_a), .rdb(rf_b)
  );

  // Bypass bus.
  assign bbus = c2.byp ? wbus : rf_a;

  ks_adder #(.W(XLEN)) u_add (
    .clk(clk), .a(bbus), .b(rf_b), .sum(sum), .cout(cout)
  );

  // Register-to-register move path.
  always_ff @(posedge clk) begin
    mv3 <= bbus;
    mv4 <= mv3;
  end

  // Write-back bus.
  always_comb
    unique case (c4.wsrc)
      WB_ADDER:   wbus = sum;
      WB_REGFILE: wbus = mv4;
      WB_BUFIN:   wbus = bufin;
      default:    wbus = '0;
    endcase

  assign we     = (c4.wsrc != WB_NONE);
  assign oload  = c4.oload;
  assign done_o = c4.done;

  // The carry out of bit 63 has no destination in this datapath, and the
  // read addresses and bypass select are spent by the time a word reaches
  // the write-back stage.
  logic unused;
  assign unused = ^{cout, c4.ra, c4.rb, c4.byp};
endmodule
