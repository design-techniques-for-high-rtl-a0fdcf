// tb_ks_adder: self-checking test of the pipelined 64-bit adder.
//
// A new pair of operands is applied every cycle (corner cases, then random
// words); each sum and carry out is compared with the built-in 65-bit
// addition exactly two cycles after its operands were applied, which checks
// both the result and the latency and that one addition can start per cycle.
module tb_ks_adder;
  localparam int W = 64;
  localparam int N = 3000;
  localparam int LAT = 2;

  logic         clk = 1'b0;
  logic [W-1:0] a, b, sum;
  logic         cout;
  int           checks = 0, failures = 0;
  logic [W:0]   expq [$];

  ks_adder #(.W(W)) dut (.clk(clk), .a(a), .b(b), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    #(10 * (N + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  initial begin
    logic [W:0] e;
    a = '0; b = '0;
    for (int i = 0; i < N + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        e = expq.pop_front();
        checks++;
        if ({cout, sum} !== e) begin
          failures++;
          if (failures < 10)
            $display("FAIL op %0d: got %h_%h expected %h", i - LAT, cout, sum, e);
        end
      end
      if (i < N) begin
        unique case (i)
          0: begin a = '1; b = 64'd1; end            // longest carry ripple
          1: begin a = 64'd1; b = '1; end
          2: begin a = '1; b = '1; end
          3: begin a = '0; b = '0; end
          4: begin a = 64'h5555_5555_5555_5555; b = 64'haaaa_aaaa_aaaa_aaab; end
          5: begin a = 64'h7fff_ffff_ffff_ffff; b = 64'd1; end
          6: begin a = 64'h0000_0000_ffff_ffff; b = 64'h0000_0000_0000_0001; end
          default: begin
            a = rnd64();
            b = (i % 7 == 0) ? ~a + 64'(i % 3) : rnd64();
            if (i % 11 == 0) b = a;
          end
        endcase
        expq.push_back({1'b0, a} + {1'b0, b});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
