// rf_decoder: one register-file address decoder, 5-bit address to 32 row
// selects, one hot.
//
// The document's decoder is a precharged pass-transistor tree: one address
// bit per level steers a single discharge path to the selected row. This
// module builds the same tree logically: level k splits every partial select
// of level k-1 into two, using address bit (N-1-k) and its complement, so
// each row select is the AND of the five true or complemented address bits
// along its path. Purely combinational; the register file registers what it
// reads.
module rf_decoder #(
  parameter int unsigned N = 5            // address bits
) (
  input  logic [N-1:0]    addr,
  output logic [2**N-1:0] sel
);
  // tree[k] holds the 2**k partial selects after k levels.
  logic [2**N-1:0] tree [N+1];

  always_comb begin
    for (int k = 0; k <= int'(N); k++) tree[k] = '0;
    tree[0][0] = 1'b1;
    for (int k = 1; k <= int'(N); k++)
      for (int j = 0; j < (1 << (k - 1)); j++) begin
        tree[k][2*j]     = tree[k-1][j] & ~addr[N-k];
        tree[k][2*j + 1] = tree[k-1][j] &  addr[N-k];
      end
    sel = tree[N];
  end
endmodule
