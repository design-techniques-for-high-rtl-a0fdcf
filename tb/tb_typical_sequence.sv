// tb_typical_sequence: the chip's typical test sequence, through the pins.
//
// Load reg[1] (load1) and reg[31] (load31) from the input shift register, add
// them into reg[31] (add_31_1), copy reg[31] into the output shift register
// (out31) and shift the result out. The operand pairs include the adder's
// slowest case, one operand all ones and the other exactly one, where the
// carry has to ripple through every position of the lookahead tree. Results
// are compared with the 64-bit sum (carry out discarded), and each program
// must raise done exactly (issue slots + 6) cycles after reset is released.
module tb_typical_sequence;
  localparam int HALF = 6;

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
    #(4 * 200000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic slow_edge(input logic b);
    shi_in = b;
    repeat (HALF) @(negedge clk);
    shift = 1'b1; shiftb = 1'b0;
    repeat (HALF) @(negedge clk);
    shift = 1'b0; shiftb = 1'b1;
  endtask

  task automatic shift_in(input logic [63:0] w);
    for (int i = 0; i < 64; i++) slow_edge(w[i]);
    repeat (HALF) @(negedge clk);
  endtask

  task automatic shift_out(output logic [63:0] w);
    for (int i = 0; i < 64; i++) begin
      w[i] = sho_out;
      slow_edge(1'b0);
    end
  endtask

  // Every program of this sequence has a single issue slot.
  task automatic run(input int t);
    int cyc;
    reset = 1'b1; tid = 3'(t);
    repeat (5) @(negedge clk);
    reset = 1'b0;
    cyc = 0;
    while (done !== 1'b1 && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != 7) begin failures++; $display("FAIL tid %0d: done after %0d cycles", t, cyc); end
    reset = 1'b1;
    repeat (4) @(negedge clk);
  endtask

  initial begin
    logic [63:0] x, y, got;
    reset = 1'b1; tid = '0; shift = 1'b0; shiftb = 1'b1; shi_in = 1'b0; sho_in = 1'b0;
    repeat (10) @(negedge clk);
    for (int k = 0; k < 8; k++) begin
      unique case (k)
        0: begin x = '1; y = 64'd1; end
        1: begin x = 64'd1; y = '1; end
        2: begin x = 64'h7fff_ffff_ffff_ffff; y = 64'd1; end
        3: begin x = '1; y = '1; end
        default: begin x = {$urandom(), $urandom()}; y = {$urandom(), $urandom()}; end
      endcase
      shift_in(x); run(2);     // load1
      shift_in(y); run(3);     // load31
      run(4);                  // add_31_1
      run(5);                  // out31
      shift_out(got);
      checks++;
      if (got !== x + y) begin
        failures++;
        $display("FAIL %h + %h: read %h expected %h", x, y, got, x + y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
