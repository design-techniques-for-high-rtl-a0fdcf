// tb_controller: self-checking test of the PLA controller and its eight
// programs.
//
// For every test id the testbench holds reset, sets tid, releases reset and
// records the control word issued each cycle. The stream is compared with an
// expected program written out here from the program table: the first word
// must come exactly three cycles after reset falls (two synchronizer cycles
// and one PLA cycle), each program must take its expected number of issue
// slots, done must follow the last slot and stay high until reset returns,
// and reset must bring the control word back to all zero. It also checks
// that the personality fits the 10-input, 64-term, 26-output array.
module tb_controller;
  import fdp_pkg::*;

  logic       clk = 1'b0;
  logic       reset;
  logic [2:0] tid;
  ctl_t       ctl;
  logic       rst_sync;
  int         checks = 0, failures = 0;

  controller dut (.clk(clk), .reset(reset), .tid(tid), .ctl(ctl), .rst_sync(rst_sync));

  always #5 clk = ~clk;

  initial begin
    #(10 * 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic ctl_t op(input int ra, input int rb, input int rw, input wsrc_e src,
                              input bit byp, input bit oload);
    ctl_t c;
    c = '0;
    c.ra = 5'(ra); c.rb = 5'(rb); c.rw = 5'(rw);
    c.wsrc = src; c.byp = byp; c.oload = oload;
    return c;
  endfunction

  // Expected control stream of one program.
  task automatic expected(input int t, output ctl_t q [$]);
    q = {};
    case (t)
      0: for (int n = 31; n >= 1; n--) q.push_back(op(n - 1, 0, n, WB_REGFILE, 0, 0));
      1: for (int k = 0; k < 32; k++) begin
           int n;
           n = (k + 2) % 32;
           q.push_back(op((n + 31) % 32, (n + 30) % 32, n, WB_ADDER, k != 0, 0));
           if (k != 31) q.push_back('0);
         end
      2: q.push_back(op(0, 0, 1, WB_BUFIN, 0, 0));
      3: q.push_back(op(0, 0, 31, WB_BUFIN, 0, 0));
      4: q.push_back(op(1, 31, 31, WB_ADDER, 0, 0));
      5: q.push_back(op(31, 0, 31, WB_REGFILE, 0, 1));
      6: for (int n = 0; n < 16; n++) q.push_back(op(0, 0, 2 * n, WB_BUFIN, 0, 0));
      7: for (int n = 0; n < 16; n++) q.push_back(op(0, 0, 2 * n + 1, WB_BUFIN, 0, 0));
      default: ;
    endcase
  endtask

  initial begin
    ctl_t q [$];
    ctl_t d;
    reset = 1'b1; tid = '0;
    // The personality must fit the 10 x 64 x 26 array.
    checks++;
    if (CTRL_TERMS != 64 || CUBES > CTRL_TERMS || PLA_NI != 10 || PLA_NO != 26) begin
      failures++;
      $display("FAIL PLA size %0d x %0d (%0d terms used) x %0d", PLA_NI, CTRL_TERMS, CUBES, PLA_NO);
    end
    repeat (6) @(negedge clk);
    for (int pass = 0; pass < 2; pass++)
      for (int t = 0; t < 8; t++) begin
        int tt;
        tt = (pass == 0) ? t : 7 - t;
        tid = 3'(tt);
        repeat (4) @(negedge clk);
        checks++;
        if (ctl !== '0) begin failures++; $display("FAIL tid %0d: control word not idle in reset", tt); end
        reset = 1'b0;
        expected(tt, q);
        // Two synchronizer cycles, then the PLA output register.
        repeat (3) @(negedge clk);
        foreach (q[j]) begin
          checks++;
          if (ctl !== q[j]) begin
            failures++;
            $display("FAIL tid %0d slot %0d: got %h exp %h", tt, j, ctl, q[j]);
          end
          @(negedge clk);
        end
        d = '0; d.done = 1'b1;
        for (int h = 0; h < 5; h++) begin
          checks++;
          if (ctl !== d) begin failures++; $display("FAIL tid %0d: done word %h", tt, ctl); end
          @(negedge clk);
        end
        reset = 1'b1;
        repeat (3) @(negedge clk);
        checks++;
        if (ctl !== '0 || rst_sync !== 1'b1) begin failures++; $display("FAIL tid %0d: reset did not clear", tt); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
