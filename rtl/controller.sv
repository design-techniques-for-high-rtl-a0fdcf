// controller: the PLA-based finite state machine that runs one of eight
// built-in test programs on the datapath, selected by a 3-bit test id.
//
// Protocol (from the document): the tester sets tid while holding reset, the
// program starts when reset is released, and done is raised at the end and
// held until reset is asserted again. reset and tid come from a slow tester,
// so they pass through a two-flop synchronizer first.
//
// How it works: a single pla with inputs {reset, tid, state} and outputs
// {ctl_t, next_state}; the six next-state outputs are fed straight back as
// the state inputs. With reset high no product term fires, so every output,
// the state included, falls to zero. In each (tid, state) of a program the
// matching product terms together issue one control word (register
// addresses, write-back source, bypass, output load) and the next state; the
// last step of every program jumps to state 63, which raises done and holds.
// The PLA has the document's size, 10 inputs, 64 terms and 26 outputs; its
// personality is a 63-term cover of the program table in fdp_pkg (the
// document's own minimized personality is not given). Elaboration stops with
// an error if the cover does not reproduce the table.
//
// Timing: ctl is registered; the first control word of a program appears
// three cycles after reset falls at the pin (two synchronizer cycles, one PLA
// cycle). done here marks the issue slot after the last operation; the
// datapath delays it to the write-back stage.
module controller
  import fdp_pkg::*;
(
  input  logic       clk,
  input  logic       reset,      // from the pad, asynchronous to clk
  input  logic [2:0] tid,        // from the pads, asynchronous to clk
  output ctl_t       ctl,        // control word for the issue stage
  output logic       rst_sync    // synchronized reset for the datapath
);
  logic [2:0]         tid_s;
  logic [PLA_NI-1:0]  pin;
  logic [PLA_NO-1:0]  pout;
  logic [STATE_W-1:0] state;

  sync2 #(.W(4)) u_sync (.clk(clk), .d({reset, tid}), .q({rst_sync, tid_s}));

  assign state = pout[STATE_W-1:0];
  assign ctl   = ctl_t'(pout[PLA_NO-1:STATE_W]);
  assign pin   = {rst_sync, tid_s, state};

  if (!PERSONALITY_OK) begin : g_bad_personality
    $error("controller PLA personality does not reproduce the program table");
  end

  pla #(
    .NI(PLA_NI), .NM(CTRL_TERMS), .NO(PLA_NO),
    .AND_PLANE(CTRL_AND), .OR_PLANE(CTRL_OR)
  ) u_pla (
    .clk(clk), .in(pin), .out(pout)
  );
endmodule
