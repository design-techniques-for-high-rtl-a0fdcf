// tb_regfile: self-checking test of the 32 x 64-bit two-read one-write
// register file.
//
// A reference array is kept in the testbench. Every register is first written
// with a known word; then each cycle does a random write and two random reads.
// Read data must equal the reference contents at the edge the addresses were
// sampled (one-cycle read latency, old data when reading the register being
// written in the same cycle).
module tb_regfile;
  localparam int W = 64, NREG = 32, N = 4000;

  logic         clk = 1'b0;
  logic [4:0]   ra, rb, rw;
  logic         we;
  logic [W-1:0] wd, rda, rdb;
  logic [W-1:0] ref_mem [NREG];
  logic [W-1:0] exp_a, exp_b;
  logic         chk;
  int           checks = 0, failures = 0;

  regfile #(.NREG(NREG), .W(W)) dut (
    .clk(clk), .ra(ra), .rb(rb), .rw(rw), .we(we), .wd(wd), .rda(rda), .rdb(rdb)
  );

  always #5 clk = ~clk;

  initial begin
    #(10 * (N + 200));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    chk = 1'b0;
    ra = '0; rb = '0; rw = '0; we = 1'b0; wd = '0;
    // Fill.
    for (int r = 0; r < NREG; r++) begin
      @(negedge clk);
      rw = 5'(r); we = 1'b1; wd = {32'(r) * 32'h0101_0101, ~32'(r)};
      ref_mem[r] = wd;
    end
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      if (chk) begin
        checks += 2;
        if (rda !== exp_a) begin failures++; $display("FAIL A: got %h exp %h", rda, exp_a); end
        if (rdb !== exp_b) begin failures++; $display("FAIL B: got %h exp %h", rdb, exp_b); end
      end
      ra = 5'($urandom_range(0, NREG - 1));
      rb = (i % 5 == 0) ? ra : 5'($urandom_range(0, NREG - 1));
      rw = (i % 9 == 0) ? ra : 5'($urandom_range(0, NREG - 1));
      we = ($urandom_range(0, 3) != 0);
      wd = {$urandom(), $urandom()};
      exp_a = ref_mem[ra];
      exp_b = ref_mem[rb];
      chk = 1'b1;
      @(posedge clk);
      if (we) ref_mem[rw] = wd;
    end
    @(negedge clk);
    checks += 2;
    if (rda !== exp_a) failures++;
    if (rdb !== exp_b) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
