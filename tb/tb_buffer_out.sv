// tb_buffer_out: self-checking test of the 64-bit output shift register.
//
// Random words are loaded in parallel (a one-cycle load pulse) and shifted
// out with a slow shift/shiftb clock of 24 core cycles: sho_out must give bit
// i of the word after i shifts, and the bits fed in at sho_in must follow the
// word out (checked over 64 more shifts). A load in the very cycle of a shift
// strobe must win; the strobe is observed inside the block to hit that cycle.
module tb_buffer_out;
  localparam int W = 64, HALF = 12, WORDS = 4;

  logic         clk = 1'b0;
  logic         shift, shiftb, sin, sout, load;
  logic [W-1:0] d, word, fill;
  int           checks = 0, failures = 0;

  buffer_out #(.W(W)) dut (.clk(clk), .shift(shift), .shiftb(shiftb), .sin(sin), .sout(sout),
                           .load(load), .d(d));

  always #5 clk = ~clk;

  initial begin
    #(10 * (WORDS * W * 4 * HALF + 4000));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic slow_edge(input logic bitv);
    sin = bitv;
    repeat (HALF) @(negedge clk);
    shift = 1'b1; shiftb = 1'b0;
    repeat (HALF) @(negedge clk);
    shift = 1'b0; shiftb = 1'b1;
  endtask

  task automatic do_load(input logic [W-1:0] v);
    @(negedge clk);
    d = v; load = 1'b1;
    @(negedge clk);
    load = 1'b0; d = '0;
  endtask

  initial begin
    shift = 1'b0; shiftb = 1'b1; sin = 1'b0; load = 1'b0; d = '0;
    repeat (10) @(negedge clk);
    for (int w = 0; w < WORDS; w++) begin
      word = {$urandom(), $urandom()};
      fill = {$urandom(), $urandom()};
      do_load(word);
      for (int i = 0; i < W; i++) begin
        checks++;
        if (sout !== word[i]) begin failures++; $display("FAIL word %0d bit %0d", w, i); end
        slow_edge(fill[i]);
      end
      for (int i = 0; i < W; i++) begin
        checks++;
        if (sout !== fill[i]) begin failures++; $display("FAIL fill %0d bit %0d", w, i); end
        slow_edge(1'b0);
      end
    end
    // Load in the very cycle of a shift strobe: the load must win.
    for (int k = 0; k < 4; k++) begin
      word = {$urandom(), $urandom()};
      do_load(~word);
      shift = 1'b1; shiftb = 1'b0;
      while (dut.strobe !== 1'b1) @(negedge clk);
      d = word; load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      repeat (HALF) @(negedge clk);
      shift = 1'b0; shiftb = 1'b1;
      repeat (HALF) @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (sout !== word[i]) begin failures++; $display("FAIL load priority bit %0d", i); end
        slow_edge(1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
