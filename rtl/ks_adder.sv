// ks_adder: pipelined 64-bit adder built from a Despain-deDood 2:1 carry-chain
// reduction and a Kogge-Stone lookahead tree over the reduced chain.
//
// How it works. With bit generate G_i = A_i.B_i and propagate P_i = A_i + B_i,
// the even carries are rewritten as C_2n = P_2n.(G_2n + C_2n-1). Adjacent
// ANDs and ORs then pair up into P'_n = P_2n+1.P_2n and G'_n = G_2n + G_2n-1,
// which gives a chain half as long:
//     C'_n = P'_n.(G'_n + C'_n-1)
// It is solved for all 32 positions at once by a Kogge-Stone tree on
// (generate P'_n.G'_n, propagate P'_n), five levels for 32 positions. The
// real carries are then rebuilt from it:
//     C_2n+1 = G_2n+1 + C'_n        C_2n = P_2n.(G'_n + C'_n-1)
// and the sum is S_i = (A_i xor B_i) xor C_i-1, with no carry in.
// These equations, the tree and the three-block split follow the document.
//
// Pipeline, as in the document's three blocks:
//   block 1: bit g/p/half-sum, the P'/G' pairing, the tree's leaf terms;
//   block 2: Kogge-Stone levels 1 to 4 (spans 1, 2, 4, 8);
//   block 3: level 5 (span 16), carry reconstitution, sum.
// The chip latches after each block on alternating clock phases, giving
// 1.5 cycles of latency. This edge-triggered version keeps the register after
// block 1 and registers the sum after block 3, merging blocks 2 and 3 into
// one cycle: a and b are sampled at a rising edge and sum/cout appear after
// the next one (valid two cycles after a/b are presented). A new addition can
// start every cycle. The terms block 3 needs from block 1 (odd generates,
// even propagates, G' and the half sums) ride along the pipeline, as the
// document's forwarding bus does.
module ks_adder #(
  parameter int unsigned W = 64,          // width, even
  localparam int unsigned H = W / 2,      // reduced chain length
  localparam int unsigned L = $clog2(H)   // tree levels
) (
  input  logic         clk,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum,
  output logic         cout
);
  // ---- block 1 ----------------------------------------------------------
  logic [W-1:0] g, p, hs;
  logic [H-1:0] pp, gp, kg0;

  always_comb begin
    g  = a & b;
    p  = a | b;
    hs = a ^ b;
    for (int n = 0; n < int'(H); n++) begin
      pp[n]  = p[2*n+1] & p[2*n];
      gp[n]  = g[2*n] | ((n > 0) ? g[2*n-1] : 1'b0);
      kg0[n] = pp[n] & gp[n];
    end
  end

  // Block 1 / block 2 pipeline register, with the forwarding terms.
  logic [H-1:0] kg_r, kp_r, gp_r, godd_r, peven_r;
  logic [W-1:0] hs_r;

  always_ff @(posedge clk) begin
    kg_r <= kg0;
    kp_r <= pp;
    gp_r <= gp;
    hs_r <= hs;
    for (int n = 0; n < int'(H); n++) begin
      godd_r[n]  <= g[2*n+1];
      peven_r[n] <= p[2*n];
    end
  end

  // ---- blocks 2 and 3: Kogge-Stone tree ---------------------------------
  // lg[k]/lp[k]: group generate/propagate after k levels, spanning 2**k positions.
  logic [H-1:0] lg [L+1];
  logic [H-1:0] lp [L+1];

  always_comb begin
    lg[0] = kg_r;
    lp[0] = kp_r;
    for (int k = 1; k <= int'(L); k++)
      for (int n = 0; n < int'(H); n++)
        if (n >= (1 << (k - 1))) begin
          lg[k][n] = lg[k-1][n] | (lp[k-1][n] & lg[k-1][n - (1 << (k - 1))]);
          lp[k][n] = lp[k-1][n] & lp[k-1][n - (1 << (k - 1))];
        end else begin
          lg[k][n] = lg[k-1][n];
          lp[k][n] = lp[k-1][n];
        end
  end

  // ---- block 3: carry reconstitution and sum ----------------------------
  logic [H-1:0] cr;          // reduced carries C'_n
  logic [W-1:0] c;           // real carries C_i
  logic [W-1:0] s_d;

  always_comb begin
    cr = lg[L];
    for (int n = 0; n < int'(H); n++) begin
      c[2*n+1] = godd_r[n] | cr[n];
      c[2*n]   = peven_r[n] & (gp_r[n] | ((n > 0) ? cr[(n > 0) ? n - 1 : 0] : 1'b0));
    end
    s_d = hs_r ^ {c[W-2:0], 1'b0};
  end

  always_ff @(posedge clk) begin
    sum  <= s_d;
    cout <= c[W-1];
  end
endmodule
