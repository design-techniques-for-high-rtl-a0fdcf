// tb_pla: self-checking test of the generic PLA.
//
// Two instances are checked every cycle against expected values computed
// independently of the PLA's plane structure:
//   * a small hand-programmed array whose outputs are a XOR b and the
//     majority of a, b, c, compared with those Boolean formulas;
//   * an array of the default size (10 inputs, 64 terms, 26 outputs) with a
//     pseudo-random sparse personality, compared with a sum-of-products
//     evaluation written with masks.
// Outputs are registered, so each check is against the inputs of the
// previous cycle.
module tb_pla;
  localparam int NI = 10, NM = 64, NO = 26, N = 3000;

  // Small array: inputs {c, b, a}, literal bits {~c, c, ~b, b, ~a, a}.
  localparam logic [4:0][5:0] SM_AND = '{
    6'b00_01_01,    // t4: a & b  (listed high to low: t4 .. t0)
    6'b01_00_01,    // t3: a & c
    6'b01_01_00,    // t2: b & c
    6'b00_01_10,    // t1: ~a & b
    6'b00_10_01     // t0: a & ~b
  };
  localparam logic [4:0][1:0] SM_OR = '{2'b10, 2'b10, 2'b10, 2'b01, 2'b01};

  function automatic logic [31:0] lcg(input logic [31:0] x);
    return x * 32'd1664525 + 32'd1013904223;
  endfunction

  function automatic logic [NM-1:0][2*NI-1:0] rand_and();
    logic [NM-1:0][2*NI-1:0] ap;
    logic [31:0] x;
    x = 32'd12345;
    ap = '0;
    for (int m = 0; m < NM; m++)
      for (int lit = 0; lit < 3; lit++) begin   // up to three literals per term
        x = lcg(x);
        ap[m][32'(x[20:16]) % (2 * NI)] = 1'b1;
      end
    return ap;
  endfunction

  function automatic logic [NM-1:0][NO-1:0] rand_or();
    logic [NM-1:0][NO-1:0] op;
    logic [31:0] x;
    x = 32'd777;
    for (int m = 0; m < NM; m++) begin
      x = lcg(x);
      op[m] = NO'(x) & NO'(lcg(x ^ 32'h5a5a_5a5a)) ;
    end
    return op;
  endfunction

  localparam logic [NM-1:0][2*NI-1:0] BIG_AND = rand_and();
  localparam logic [NM-1:0][NO-1:0]   BIG_OR  = rand_or();

  logic          clk = 1'b0;
  logic [2:0]    sin;
  logic [1:0]    sout;
  logic [NI-1:0] bin;
  logic [NO-1:0] bout, bexp;
  logic [1:0]    sexp;
  int            checks = 0, failures = 0;

  pla #(.NI(3), .NM(5), .NO(2), .AND_PLANE(SM_AND), .OR_PLANE(SM_OR))
    dut_small (.clk(clk), .in(sin), .out(sout));
  pla #(.NI(NI), .NM(NM), .NO(NO), .AND_PLANE(BIG_AND), .OR_PLANE(BIG_OR))
    dut_big (.clk(clk), .in(bin), .out(bout));

  always #5 clk = ~clk;

  initial begin
    #(10 * (N + 100));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NO-1:0] sop(input logic [NI-1:0] x);
    logic [NI-1:0] tmask, cmask;
    logic [NO-1:0] r;
    r = '0;
    for (int m = 0; m < NM; m++) begin
      for (int i = 0; i < NI; i++) begin
        tmask[i] = BIG_AND[m][2*i];
        cmask[i] = BIG_AND[m][2*i+1];
      end
      if (((x & tmask) == tmask) && ((~x & cmask) == cmask)) r |= BIG_OR[m];
    end
    return r;
  endfunction

  int fired = 0;

  initial begin
    sin = '0; bin = '0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      sin  = 3'(i);
      bin  = NI'($urandom());
      sexp = {(sin[0] & sin[1]) | (sin[0] & sin[2]) | (sin[1] & sin[2]), sin[0] ^ sin[1]};
      bexp = sop(bin);
      if (bexp != '0) fired++;
      @(negedge clk);
      checks += 2;
      if (sout !== sexp) begin failures++; $display("FAIL small in=%b got %b exp %b", sin, sout, sexp); end
      if (bout !== bexp) begin failures++; if (failures < 10) $display("FAIL big in=%h got %h exp %h", bin, bout, bexp); end
    end
    // The random personality must actually exercise the planes.
    checks++;
    if (fired < N / 4) begin failures++; $display("FAIL: random personality fired only %0d times", fired); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
