// tb_buffer_in: self-checking test of the 64-bit input shift register.
//
// The slow tester clock is modelled as shift/shiftb with a period of 24 core
// cycles. Several random words are shifted in least significant bit first;
// after each, the parallel output must equal the word, and while shifting,
// shi_out must present the bits of the previous word in order.
module tb_buffer_in;
  localparam int W = 64, HALF = 12, WORDS = 6;

  logic         clk = 1'b0;
  logic         shift, shiftb, sin, sout;
  logic [W-1:0] q, word, prev;
  int           checks = 0, failures = 0;

  buffer_in #(.W(W)) dut (.clk(clk), .shift(shift), .shiftb(shiftb), .sin(sin), .sout(sout), .q(q));

  always #5 clk = ~clk;

  initial begin
    #(10 * (WORDS * W * 2 * HALF + 1000));
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

  initial begin
    shift = 1'b0; shiftb = 1'b1; sin = 1'b0;
    repeat (10) @(negedge clk);
    prev = '0;
    for (int w = 0; w < WORDS; w++) begin
      word = (w == 0) ? 64'h8000_0000_0000_0001 : {$urandom(), $urandom()};
      for (int i = 0; i < W; i++) begin
        if (w > 0) begin
          checks++;
          if (sout !== prev[i]) begin failures++; $display("FAIL sout word %0d bit %0d", w, i); end
        end
        slow_edge(word[i]);
      end
      repeat (HALF) @(negedge clk);
      checks++;
      if (q !== word) begin failures++; $display("FAIL q=%h exp %h", q, word); end
      prev = word;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
