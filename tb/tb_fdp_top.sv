// tb_fdp_top: end-to-end test of the fast datapath through its pads only,
// the way a slow tester drives the chip.
//
// The tester shifts words in through shi_in, runs programs by setting tid
// under reset and releasing reset, waits for done and shifts results out of
// sho_out. A reference model of the 32 registers in the testbench follows
// each program's definition. The sequence:
//   1. load_even / load_odd / load1 / load31, checked through out31;
//   2. 32 rounds of "load31 a fresh random word, then shift", which gives
//      every register a distinct value;
//   3. add_31_1, then the full add program (each register the sum of the two
//      below it, modulo 32, in order, needing the bypass bus), with reg[31]
//      read out after each;
//   4. a read-back of registers 31 down to 1 by alternating out31 and shift.
// Each run checks the cycle count from reset release to done (three cycles
// into the controller, one issue slot per program step, three more to the
// write-back stage) and that done holds until reset. The number of bypassed
// operands, of each write-back source, of buffer_out loads, of shift strobes
// and of runs of each program is counted, and each must be nonzero.
module tb_fdp_top;
  localparam int HALF = 6;        // half period of the slow shift clock, in core cycles

  logic       clk = 1'b0;
  logic       reset, done, shift, shiftb, shi_in, shi_out, sho_in, sho_out;
  logic [2:0] tid;
  int         checks = 0, failures = 0;

  fdp_top dut (
    .clk(clk), .reset(reset), .tid(tid), .done(done),
    .shift(shift), .shiftb(shiftb), .shi_in(shi_in), .shi_out(shi_out),
    .sho_in(sho_in), .sho_out(sho_out)
  );

  always #2 clk = ~clk;

  initial begin
    #(4 * 400000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ------------------------------------------------
  int n_byp = 0, n_add = 0, n_mov = 0, n_bin = 0, n_oload = 0, n_strobe = 0;
  int n_runs [8];

  always @(posedge clk) begin
    if (dut.u_core.c2.byp) n_byp++;
    if (dut.u_core.c4.wsrc == fdp_pkg::WB_ADDER) n_add++;
    if (dut.u_core.c4.wsrc == fdp_pkg::WB_REGFILE) n_mov++;
    if (dut.u_core.c4.wsrc == fdp_pkg::WB_BUFIN) n_bin++;
    if (dut.u_core.oload) n_oload++;
    if (dut.u_bin.strobe) n_strobe++;
  end

  // ---- reference model ---------------------------------------------------
  logic [63:0] rf [32];
  logic [63:0] bin_word, bout_word;

  function automatic int steps(input int t);
    case (t)
      0: return 31;
      1: return 63;
      6, 7: return 16;
      default: return 1;
    endcase
  endfunction

  task automatic apply(input int t);
    logic [63:0] old [32];
    old = rf;
    case (t)
      0: for (int n = 31; n >= 1; n--) rf[n] = old[n-1];
      1: for (int k = 0; k < 32; k++) begin
           int n;
           n = (k + 2) % 32;
           rf[n] = rf[(n + 31) % 32] + rf[(n + 30) % 32];
         end
      2: rf[1] = bin_word;
      3: rf[31] = bin_word;
      4: rf[31] = old[1] + old[31];
      5: bout_word = old[31];
      6: for (int n = 0; n < 16; n++) rf[2*n] = bin_word;
      7: for (int n = 0; n < 16; n++) rf[2*n+1] = bin_word;
      default: ;
    endcase
  endtask

  // ---- tester tasks --------------------------------------------------------
  task automatic slow_edge(input logic bi, input logic bo);
    shi_in = bi; sho_in = bo;
    repeat (HALF) @(negedge clk);
    shift = 1'b1; shiftb = 1'b0;
    repeat (HALF) @(negedge clk);
    shift = 1'b0; shiftb = 1'b1;
  endtask

  // Shift a word in (LSB first), checking the previous one falls out of shi_out.
  task automatic shift_in(input logic [63:0] w);
    for (int i = 0; i < 64; i++) begin
      checks++;
      if (shi_out !== bin_word[i]) begin failures++; $display("FAIL shi_out bit %0d", i); end
      slow_edge(w[i], 1'b0);
    end
    repeat (HALF) @(negedge clk);
    bin_word = w;
  endtask

  // Both shift registers share the shift clock: reading buffer_out also
  // shifts zeros into buffer_in.
  task automatic shift_out(output logic [63:0] w);
    for (int i = 0; i < 64; i++) begin
      w[i] = sho_out;
      slow_edge(1'b0, 1'b0);
      bin_word = {1'b0, bin_word[63:1]};
    end
  endtask

  task automatic run(input int t);
    int cyc;
    reset = 1'b1; tid = 3'(t);
    repeat (5) @(negedge clk);
    checks++;
    if (done !== 1'b0) begin failures++; $display("FAIL tid %0d: done high in reset", t); end
    reset = 1'b0;
    cyc = 0;
    while (done !== 1'b1 && cyc < 200) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != steps(t) + 6) begin
      failures++;
      $display("FAIL tid %0d: done after %0d cycles, expected %0d", t, cyc, steps(t) + 6);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (done !== 1'b1) begin failures++; $display("FAIL tid %0d: done not held", t); end
    apply(t);
    n_runs[t]++;
    reset = 1'b1;
    repeat (4) @(negedge clk);
  endtask

  task automatic check_r31(input string what);
    logic [63:0] got;
    run(5);
    shift_out(got);
    checks++;
    if (got !== bout_word || got !== rf[31]) begin
      failures++;
      $display("FAIL %s: reg[31] read %h expected %h", what, got, rf[31]);
    end
  endtask

  initial begin
    logic [63:0] w;
    for (int t = 0; t < 8; t++) n_runs[t] = 0;
    reset = 1'b1; tid = '0; shift = 1'b0; shiftb = 1'b1; shi_in = 1'b0; sho_in = 1'b0;
    repeat (10) @(negedge clk);
    // Prime buffer_in so shi_out has a known previous word.
    bin_word = '0;
    for (int i = 0; i < 64; i++) slow_edge(1'b0, 1'b0);
    repeat (HALF) @(negedge clk);

    // 1. loads
    shift_in(64'h0123_4567_89ab_cdef); run(6);
    shift_in(64'hfedc_ba98_7654_3210); run(7);
    check_r31("load_odd");
    shift_in({$urandom(), $urandom()}); run(2);
    shift_in({$urandom(), $urandom()}); run(3);
    check_r31("load31");

    // 2. distinct values everywhere
    for (int k = 0; k < 32; k++) begin
      shift_in({$urandom(), $urandom()});
      run(3);
      run(0);
    end
    check_r31("fill");

    // 3. arithmetic
    run(4);
    check_r31("add_31_1");
    run(1);
    check_r31("add");

    // 4. read back the rest of the file
    for (int k = 0; k < 30; k++) begin
      run(0);
      check_r31("readback");
    end

    // Every mechanism must have occurred.
    checks += 7;
    if (n_byp == 0)    begin failures++; $display("FAIL: no bypass"); end
    if (n_add == 0)    begin failures++; $display("FAIL: no adder write-back"); end
    if (n_mov == 0)    begin failures++; $display("FAIL: no register move"); end
    if (n_bin == 0)    begin failures++; $display("FAIL: no buffer_in write-back"); end
    if (n_oload == 0)  begin failures++; $display("FAIL: no buffer_out load"); end
    if (n_strobe == 0) begin failures++; $display("FAIL: no shift strobe"); end
    if (n_runs[0] == 0 || n_runs[1] == 0 || n_runs[2] == 0 || n_runs[3] == 0 ||
        n_runs[4] == 0 || n_runs[5] == 0 || n_runs[6] == 0 || n_runs[7] == 0) begin
      failures++; $display("FAIL: a program never ran");
    end
    $display("bypass %0d adder %0d move %0d bufin %0d oload %0d strobes %0d",
             n_byp, n_add, n_mov, n_bin, n_oload, n_strobe);
    $display("program runs %0d %0d %0d %0d %0d %0d %0d %0d", n_runs[0], n_runs[1], n_runs[2],
             n_runs[3], n_runs[4], n_runs[5], n_runs[6], n_runs[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
