// tb_datapath_core: self-checking test of the four-cycle datapath pipeline.
//
// The testbench issues one control word per cycle and keeps a cycle-exact
// reference of the register file:
//   * an operation issued in cycle t reads the file as it stands after the
//     writes of operations issued up to t-4 (a same-cycle write is not seen);
//   * with byp set, operand A is the write-back bus value of the operation
//     issued at t-2;
//   * its result must be on wbus, and written, in cycle t+3 (four cycles from
//     read to write), with oload and done arriving in that same cycle.
// After filling all 32 registers from buffer_in, random operations of every
// kind are issued back to back, including reads of registers still in flight
// (they must return the stale value) and bypassed dependent adds. Each
// mechanism (bypass, the three write-back sources, buffer_out load, done) is
// counted and must occur.
module tb_datapath_core;
  import fdp_pkg::*;
  localparam int N = 3000;

  logic            clk = 1'b0;
  logic            rst;
  ctl_t            ctl;
  logic [XLEN-1:0] bufin, wbus;
  logic            oload, done_o;
  int              checks = 0, failures = 0;

  datapath_core dut (.clk(clk), .rst(rst), .ctl(ctl), .bufin(bufin),
                     .wbus(wbus), .oload(oload), .done_o(done_o));

  always #5 clk = ~clk;

  initial begin
    #(10 * (N + 500));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [XLEN-1:0] ref_rf [NREG];
  logic [XLEN-1:0] bufin_at [N + 80];     // buffer_in value in each cycle
  ctl_t            issued [N + 80];
  logic [XLEN-1:0] res [N + 80];          // expected wbus value of each op
  int              n_byp = 0, n_add = 0, n_mov = 0, n_bin = 0, n_out = 0, n_done = 0;

  initial begin
    ctl_t c;
    int   total;
    logic [XLEN-1:0] a, b;
    for (int i = 0; i < N + 80; i++) begin
      bufin_at[i] = {$urandom(), $urandom()};
      issued[i]   = '0;
      res[i]      = '0;
    end
    rst = 1'b1; ctl = '0; bufin = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    total = N + 40;
    for (int t = 0; t < total + 4; t++) begin
      // ---- check the write-back stage of cycle t (op issued at t-3)
      bufin = bufin_at[t];
      #1;
      if (t >= 3) begin
        c = issued[t-3];
        if (c.wsrc != WB_NONE) begin
          checks++;
          if (wbus !== res[t-3]) begin
            failures++;
            if (failures < 10) $display("FAIL cycle %0d: wbus %h exp %h (op %0d src %0d)",
                                         t, wbus, res[t-3], t - 3, c.wsrc);
          end
        end
        checks++;
        if (oload !== c.oload || done_o !== c.done) begin failures++; $display("FAIL cycle %0d: oload/done", t); end
        if (c.oload) n_out++;
        if (c.done) n_done++;
      end
      // ---- issue op t
      c = '0;
      if (t < total) begin
        if (t < 32) begin
          c.rw = 5'(t); c.wsrc = WB_BUFIN;
        end else if (t >= 36) begin
          c.ra = 5'($urandom_range(0, NREG - 1));
          c.rb = 5'($urandom_range(0, NREG - 1));
          c.rw = 5'($urandom_range(0, NREG - 1));
          c.wsrc = wsrc_e'($urandom_range(0, 3));
          c.byp = ($urandom_range(0, 2) == 0);
          c.oload = ($urandom_range(0, 5) == 0);
          c.done = ($urandom_range(0, 30) == 0);
          // Bias toward reading registers written one to three ops earlier.
          if ($urandom_range(0, 2) == 0) c.ra = issued[t - 1 - $urandom_range(0, 2)].rw;
        end
        // Operands as the file holds them now (writes of ops up to t-4).
        a = c.byp ? res[t-2] : ref_rf[c.ra];
        b = ref_rf[c.rb];
        unique case (c.wsrc)
          WB_ADDER:   res[t] = a + b;
          WB_REGFILE: res[t] = a;
          WB_BUFIN:   res[t] = bufin_at[t+3];
          default:    res[t] = '0;
        endcase
        if (c.byp && t >= 36) n_byp++;
        if (c.wsrc == WB_ADDER) n_add++;
        if (c.wsrc == WB_REGFILE) n_mov++;
        if (c.wsrc == WB_BUFIN) n_bin++;
      end
      issued[t] = c;
      ctl = c;
      // ---- the write of op t-3 lands at the end of this cycle
      if (t >= 3 && issued[t-3].wsrc != WB_NONE) ref_rf[issued[t-3].rw] = res[t-3];
      @(negedge clk);
    end
    checks += 6;
    if (n_byp == 0) failures++;
    if (n_add == 0) failures++;
    if (n_mov == 0) failures++;
    if (n_bin == 0) failures++;
    if (n_out == 0) failures++;
    if (n_done == 0) failures++;
    $display("bypass %0d add %0d move %0d bufin %0d oload %0d done %0d",
             n_byp, n_add, n_mov, n_bin, n_out, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
