// ling_adder: parallel-prefix Ling adder, sum = a + b + cin.
//
// Ling's adder computes pseudo-carries H(i) = g(i) + c(i-1) instead of the
// carries c(i) themselves; H(i) is simpler at the first prefix level and
// the real carry is recovered as c(i) = t(i) & H(i), with g = a & b and
// t = a | b. Written out, H(i) is the ordinary prefix "generate" over the
// pairs (g(j), t(j-1)): the propagate of every position is taken from the
// position below it. The carry-in enters as an extra node -1 with generate
// cin and propagate 0; node 0's propagate is 1, so H(0) = g(0) + cin.
//
// The prefix network is Kogge-Stone: ceil(log2(W+1)) levels of
// (G, P) o (G', P') = (G + P G', P P') with span doubling at each level.
// The sum bit is s(i) = x(i) ^ c(i-1) = H(i-1) ? x(i) ^ t(i-1) : x(i),
// x = a ^ b, so the last Ling step hides in a multiplexer.
//
// In the multiplier this adder is the RB-to-NB converter: it is fed
// X+ and ~X- with cin = 1. The Ling/parallel-prefix choice follows the
// source; the Kogge-Stone topology is this design's own. Purely
// combinational.
module ling_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned NN     = W + 1;          // nodes -1 .. W-1
  localparam int unsigned LEVELS = $clog2(NN);

  logic [W-1:0] g, t, x;
  assign g = a & b;
  assign t = a | b;
  assign x = a ^ b;

  // Node n stands for bit position n-1 (node 0 is the carry-in).
  logic [LEVELS:0][NN-1:0] gg, pp;
  logic [NN-1:0]           h;      // h[n] = H(n-1), h[0] = cin

  assign gg[0][0] = cin;
  assign pp[0][0] = 1'b0;
  assign gg[0][1] = g[0];
  assign pp[0][1] = 1'b1;
  for (genvar n = 2; n < NN; n++) begin : g_in
    assign gg[0][n] = g[n-1];
    assign pp[0][n] = t[n-2];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    for (genvar n = 0; n < NN; n++) begin : g_node
      if (n >= (1 << l)) begin : g_op
        assign gg[l+1][n] = gg[l][n] | (pp[l][n] & gg[l][n - (1 << l)]);
        assign pp[l+1][n] = pp[l][n] & pp[l][n - (1 << l)];
      end else begin : g_pass
        assign gg[l+1][n] = gg[l][n];
        assign pp[l+1][n] = pp[l][n];
      end
    end
  end

  // Only the generates of the last level are needed; its propagates are
  // left unused.
  assign h = gg[LEVELS];

  // c(i-1) for bit i: cin for i = 0, else t(i-1) & H(i-1).
  always_comb begin
    sum[0] = x[0] ^ cin;
    for (int i = 1; i < W; i++) begin
      sum[i] = h[i] ? (x[i] ^ t[i-1]) : x[i];
    end
    cout = t[W-1] & h[W];
  end

endmodule
