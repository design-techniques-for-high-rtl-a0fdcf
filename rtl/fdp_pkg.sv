// fdp_pkg: types, sizes and the controller's program table for the fast
// 64-bit datapath.
//
// The datapath is a 32 x 64-bit register file and a pipelined 64-bit adder
// tied together by a write-back bus (wbus) and a bypass bus (bbus), driven
// every cycle by a PLA-based finite state machine. This package holds what
// several modules share:
//   * sizes: 64-bit words, 32 registers, 5-bit register addresses;
//   * ctl_t, the 20 control signals the controller drives every cycle
//     (three register addresses, write-back source, bypass select,
//     output-buffer load and done);
//   * the eight test programs, selected by the 3-bit test id;
//   * the controller's 64-term PLA personality: a two-level cover of that
//     table, checked against it at elaboration time.
//
// The program mnemonics and what each does follow the document's program
// table, and the PLA size (10 inputs, 64 terms, 26 outputs) is the
// document's. How each program is sequenced (register order, issue spacing,
// the shared done state), the bit layout of the PLA inputs and outputs and
// the cover itself are this design's own choices.
package fdp_pkg;

  localparam int unsigned XLEN  = 64;   // datapath width
  localparam int unsigned NREG  = 32;   // registers in the register file
  localparam int unsigned RADDR = 5;    // register address width

  // Source driven onto the write-back bus in the write-back stage. Any
  // source other than WB_NONE also writes the register file.
  typedef enum logic [1:0] {
    WB_NONE    = 2'd0,
    WB_ADDER   = 2'd1,
    WB_REGFILE = 2'd2,
    WB_BUFIN   = 2'd3
  } wsrc_e;

  // The control word issued by the controller each cycle (20 bits).
  typedef struct packed {
    logic [RADDR-1:0] ra;     // read port A address (bypassable operand)
    logic [RADDR-1:0] rb;     // read port B address
    logic [RADDR-1:0] rw;     // write port address
    wsrc_e            wsrc;   // write-back bus source / write enable
    logic             byp;    // operand A taken from wbus instead of port A
    logic             oload;  // load buffer_out from wbus
    logic             done;   // program complete marker
  } ctl_t;

  localparam int unsigned CTL_W = $bits(ctl_t);

  // Test program identifiers.
  typedef enum logic [2:0] {
    TID_SHIFT     = 3'd0,   // reg[n]   = reg[n-1], n = 31 .. 1
    TID_ADD       = 3'd1,   // reg[n]   = reg[n-1] + reg[n-2] (mod 32), n = 2 .. 31, 0, 1
    TID_LOAD1     = 3'd2,   // reg[1]   = buffer_in
    TID_LOAD31    = 3'd3,   // reg[31]  = buffer_in
    TID_ADD_31_1  = 3'd4,   // reg[31]  = reg[1] + reg[31]
    TID_OUT31     = 3'd5,   // buffer_out = reg[31]
    TID_LOAD_EVEN = 3'd6,   // reg[2n]  = buffer_in
    TID_LOAD_ODD  = 3'd7    // reg[2n+1] = buffer_in
  } tid_e;

  // PLA geometry. Inputs are {reset, tid[2:0], state[5:0]}; outputs are
  // {ctl_t, next_state[5:0]}.
  localparam int unsigned STATE_W   = 6;
  localparam int unsigned PLA_NI    = 1 + 3 + STATE_W;       // 10
  localparam int unsigned PLA_NO    = CTL_W + STATE_W;       // 26
  localparam logic [STATE_W-1:0] DONE_STATE = '1;            // 63, shared by all programs

  // One step of a program: whether (tid, state) is a live state, the control
  // word it issues and the state that follows.
  typedef struct packed {
    logic               live;
    ctl_t               ctl;
    logic [STATE_W-1:0] next;
  } step_t;

  function automatic step_t prog_step(input logic [2:0] tid, input logic [STATE_W-1:0] s);
    step_t st;
    int unsigned k, n;
    st = '0;
    st.ctl.wsrc = WB_NONE;
    unique case (tid_e'(tid))
      TID_SHIFT: if (s <= 30) begin
        // Highest register first so every source is read before it is overwritten.
        st.live     = 1'b1;
        st.ctl.ra   = RADDR'(30 - s);
        st.ctl.rw   = RADDR'(31 - s);
        st.ctl.wsrc = WB_REGFILE;
        st.next     = (s == 30) ? DONE_STATE : s + 1'b1;
      end
      TID_ADD: if (s <= 62) begin
        // One dependent add every second cycle; the previous result reaches
        // the adder over the bypass bus, the one before comes from the file.
        st.live = 1'b1;
        st.next = (s == 62) ? DONE_STATE : s + 1'b1;
        if (s[0] == 1'b0) begin
          k = 32'(s) / 2;
          n = (k + 2) % NREG;
          st.ctl.ra   = RADDR'((n + NREG - 1) % NREG);
          st.ctl.rb   = RADDR'((n + NREG - 2) % NREG);
          st.ctl.rw   = RADDR'(n);
          st.ctl.wsrc = WB_ADDER;
          st.ctl.byp  = (k != 0);
        end
      end
      TID_LOAD1, TID_LOAD31: if (s == 0) begin
        st.live     = 1'b1;
        st.ctl.rw   = (tid_e'(tid) == TID_LOAD1) ? RADDR'(1) : RADDR'(31);
        st.ctl.wsrc = WB_BUFIN;
        st.next     = DONE_STATE;
      end
      TID_ADD_31_1: if (s == 0) begin
        st.live     = 1'b1;
        st.ctl.ra   = RADDR'(1);
        st.ctl.rb   = RADDR'(31);
        st.ctl.rw   = RADDR'(31);
        st.ctl.wsrc = WB_ADDER;
        st.next     = DONE_STATE;
      end
      TID_OUT31: if (s == 0) begin
        // reg[31] travels over wbus into buffer_out and is written back onto itself.
        st.live      = 1'b1;
        st.ctl.ra    = RADDR'(31);
        st.ctl.rw    = RADDR'(31);
        st.ctl.wsrc  = WB_REGFILE;
        st.ctl.oload = 1'b1;
        st.next      = DONE_STATE;
      end
      TID_LOAD_EVEN, TID_LOAD_ODD: if (s <= 15) begin
        st.live     = 1'b1;
        st.ctl.rw   = RADDR'(2 * s + ((tid_e'(tid) == TID_LOAD_ODD) ? 1 : 0));
        st.ctl.wsrc = WB_BUFIN;
        st.next     = (s == 15) ? DONE_STATE : s + 1'b1;
      end
      default: ;
    endcase
    return st;
  endfunction

  // ---- PLA personality --------------------------------------------------
  // The controller's 64-term PLA. Each row is one product term:
  //   {mask, value, outputs}
  // mask/value cover the 9 inputs {tid[2:0], state[5:0]}: an input whose mask
  // bit is 1 must equal its value bit, one whose mask bit is 0 is not
  // connected. Every term also needs reset low. outputs (26 bits, order
  // {ctl_t, next_state}) are the OR-plane connections.
  //
  // The terms form a two-level cover of prog_step(): for every (tid, state)
  // the program table uses, and for the done state 63, the OR of the outputs
  // of the matching terms equals the table's control word and next state.
  // The (tid, state) pairs no program ever reaches are don't cares, which is
  // what lets 63 terms replace one term per program step (131). Row 64 is
  // left unprogrammed. PERSONALITY_OK below re-checks the cover against
  // prog_step() at elaboration; any edit to a program must be followed by a
  // new cover of it.
  localparam int unsigned CTRL_TERMS = 64;   // product terms in the controller's PLA
  localparam int unsigned CUBES      = 63;   // rows programmed

  typedef struct packed {
    logic [8:0]        mask;
    logic [8:0]        value;
    logic [PLA_NO-1:0] outs;
  } cube_t;

  localparam cube_t CTRL_CUBES [CUBES] = '{
    '{9'h00f, 9'h001, 26'h0000002},   // tid --- state --0001
    '{9'h007, 9'h003, 26'h0000004},   // tid --- state ---011
    '{9'h007, 9'h005, 26'h0000006},   // tid --- state ---101
    '{9'h00f, 9'h007, 26'h0000008},   // tid --- state --0111
    '{9'h00b, 9'h009, 26'h000000a},   // tid --- state --1-01
    '{9'h00d, 9'h00c, 26'h000000d},   // tid --- state --11-0
    '{9'h03f, 9'h03f, 26'h000007f},   // tid --- state 111111
    '{9'h192, 9'h010, 26'h0000010},   // tid 00- state -1--0-
    '{9'h19a, 9'h012, 26'h0000010},   // tid 00- state -10-1-
    '{9'h19c, 9'h018, 26'h0000018},   // tid 00- state -110--
    '{9'h1e3, 9'h000, 26'h0401c01},   // tid 000 state 0---00
    '{9'h1e6, 9'h000, 26'h0803400},   // tid 000 state 0--00-
    '{9'h1ea, 9'h000, 26'h1005400},   // tid 000 state 0-0-0-
    '{9'h1f8, 9'h000, 26'h200c400},   // tid 000 state 000---
    '{9'h1e1, 9'h001, 26'h0200400},   // tid 000 state 0----1
    '{9'h1e7, 9'h002, 26'h0802c03},   // tid 000 state 0--010
    '{9'h1eb, 9'h002, 26'h1004c03},   // tid 000 state 0-0-10
    '{9'h1ef, 9'h003, 26'h1606404},   // tid 000 state 0-0011
    '{9'h1f5, 9'h004, 26'h2008c05},   // tid 000 state 00-1-0
    '{9'h1e7, 9'h006, 26'h0000c07},   // tid 000 state 0--110
    '{9'h1e7, 9'h007, 26'h0e00400},   // tid 000 state 0--111
    '{9'h1fc, 9'h008, 26'h200a408},   // tid 000 state 0010--
    '{9'h1ef, 9'h00b, 26'h060240c},   // tid 000 state 0-1011
    '{9'h1ff, 9'h00d, 26'h220940e},   // tid 000 state 001101
    '{9'h1ff, 9'h00f, 26'h1e08410},   // tid 000 state 001111
    '{9'h1f6, 9'h014, 26'h0001414},   // tid 000 state 01-10-
    '{9'h1ff, 9'h017, 26'h0e04418},   // tid 000 state 010111
    '{9'h1ff, 9'h01e, 26'h0000c3f},   // tid 000 state 011110
    '{9'h1cf, 9'h040, 26'h0201201},   // tid 001 state --0000
    '{9'h1c7, 9'h042, 26'h0411b03},   // tid 001 state ---010
    '{9'h1c7, 9'h044, 26'h0620305},   // tid 001 state ---100
    '{9'h1ff, 9'h044, 26'h0622305},   // tid 001 state 000100
    '{9'h1cf, 9'h046, 26'h0832b07},   // tid 001 state --0110
    '{9'h1cb, 9'h048, 26'h0a40309},   // tid 001 state --1-00
    '{9'h1cd, 9'h048, 26'h0843309},   // tid 001 state --10-0
    '{9'h1df, 9'h04b, 26'h000000c},   // tid 001 state -01011
    '{9'h1ff, 9'h04c, 26'h0e6430d},   // tid 001 state 001100
    '{9'h1df, 9'h04e, 26'h1074b0f},   // tid 001 state -01110
    '{9'h1df, 9'h04f, 26'h0000010},   // tid 001 state -01111
    '{9'h1d5, 9'h050, 26'h1085311},   // tid 001 state -1-0-0
    '{9'h1dd, 9'h054, 26'h10a6315},   // tid 001 state -101-0
    '{9'h1ff, 9'h05c, 26'h1ee831d},   // tid 001 state 011100
    '{9'h1ff, 9'h05e, 26'h20f8b1f},   // tid 001 state 011110
    '{9'h1ff, 9'h05f, 26'h0000020},   // tid 001 state 011111
    '{9'h1e0, 9'h060, 26'h0000020},   // tid 001 state 1-----
    '{9'h1e5, 9'h060, 26'h2109321},   // tid 001 state 1--0-0
    '{9'h1ed, 9'h064, 26'h212a325},   // tid 001 state 1-01-0
    '{9'h1fd, 9'h06c, 26'h216c32d},   // tid 001 state 1011-0
    '{9'h1ff, 9'h07c, 26'h3fe033d},   // tid 001 state 111100
    '{9'h1ff, 9'h07e, 26'h01f0b3f},   // tid 001 state 111110
    '{9'h1bf, 9'h080, 26'h0000e3f},   // tid 01- state 000000
    '{9'h0f0, 9'h0c0, 26'h0000e00},   // tid -11 state 00----
    '{9'h1ff, 9'h0c0, 26'h000fe3f},   // tid 011 state 000000
    '{9'h1ff, 9'h100, 26'h03ffa3f},   // tid 100 state 000000
    '{9'h1ff, 9'h140, 26'h3e0fcbf},   // tid 101 state 000000
    '{9'h1b7, 9'h180, 26'h0000601},   // tid 11- state 00-000
    '{9'h1b1, 9'h181, 26'h0001600},   // tid 11- state 00---1
    '{9'h1b3, 9'h182, 26'h0002603},   // tid 11- state 00--10
    '{9'h1b3, 9'h183, 26'h0003600},   // tid 11- state 00--11
    '{9'h1b5, 9'h184, 26'h0004605},   // tid 11- state 00-1-0
    '{9'h1b5, 9'h185, 26'h0005600},   // tid 11- state 00-1-1
    '{9'h1b8, 9'h188, 26'h0008608},   // tid 11- state 001---
    '{9'h1bf, 9'h18f, 26'h000f63f}    // tid 11- state 001111
  };

  // Output of the programmed planes for one input vector (reset low).
  function automatic logic [PLA_NO-1:0] cover_eval(input logic [8:0] x);
    logic [PLA_NO-1:0] o;
    o = '0;
    for (int m = 0; m < int'(CUBES); m++)
      if ((x & CTRL_CUBES[m].mask) == CTRL_CUBES[m].value) o |= CTRL_CUBES[m].outs;
    return o;
  endfunction

  // 1 when the cover reproduces prog_step() on every reachable (tid, state).
  function automatic bit personality_ok();
    step_t st;
    ctl_t  dc;
    for (int t = 0; t < 8; t++)
      for (int s = 0; s < 64; s++) begin
        st = prog_step(3'(t), STATE_W'(s));
        if (st.live) begin
          if (cover_eval({3'(t), STATE_W'(s)}) != {st.ctl, st.next}) return 1'b0;
        end else if (s == 63) begin
          dc = '0;
          dc.done = 1'b1;
          if (cover_eval({3'(t), STATE_W'(s)}) != {dc, DONE_STATE}) return 1'b0;
        end
      end
    return 1'b1;
  endfunction

  localparam bit PERSONALITY_OK = personality_ok();

  // AND plane: bit 2*i selects input i, bit 2*i+1 selects its complement.
  // Input bit order: [9] reset, [8:6] tid, [5:0] state.
  function automatic logic [CTRL_TERMS-1:0][2*PLA_NI-1:0] and_plane();
    logic [CTRL_TERMS-1:0][2*PLA_NI-1:0] ap;
    ap = '0;
    for (int m = 0; m < int'(CUBES); m++) begin
      for (int i = 0; i < 9; i++)
        if (CTRL_CUBES[m].mask[i]) ap[m][2*i + (CTRL_CUBES[m].value[i] ? 0 : 1)] = 1'b1;
      ap[m][2*(PLA_NI-1) + 1] = 1'b1;          // reset low
    end
    return ap;
  endfunction

  // OR plane: output bit order {ctl_t, next_state}.
  function automatic logic [CTRL_TERMS-1:0][PLA_NO-1:0] or_plane();
    logic [CTRL_TERMS-1:0][PLA_NO-1:0] op;
    op = '0;
    for (int m = 0; m < int'(CUBES); m++) op[m] = CTRL_CUBES[m].outs;
    return op;
  endfunction

  localparam logic [CTRL_TERMS-1:0][2*PLA_NI-1:0] CTRL_AND = and_plane();
  localparam logic [CTRL_TERMS-1:0][PLA_NO-1:0]   CTRL_OR  = or_plane();

endpackage
