// mbe_multiplier: N x N redundant-binary modified Booth multiplier.
//
// Multiplies two N-bit two's complement numbers into their exact 2N-bit
// product in four steps, all combinational:
//   1. booth_encoder: radix-4 MBE turns b into N/2 digits in {-2..2}.
//   2. rb_ppg: the N/2 NB partial-product rows are paired into N/4
//      redundant-binary (RB) rows, the even row as positive vector and the
//      negated odd row as negative vector, with inverted sign bits and
//      without an error-correcting word (N/4, not N/4 + 1, rows).
//   3. rb_cancel on every row ((1,1) digits become (0,0)), then rb_tree:
//      log2(N/4) levels of carry-free RB adders reduce the rows to one RB
//      number (X+, X-).
//   4. ling_adder: p = X+ - X- = X+ + ~X- + 1, the RB-to-NB conversion,
//      in a parallel-prefix Ling adder; the only carry chain of the design.
// With the default N = 32: 16 Booth digits, 8 RB rows, 3 RBA levels, a
// 64-bit final adder.
//
// Ports: a, b (N bits, two's complement in), p (2N bits, two's complement
// out). No clock: the product is valid one combinational delay after the
// operands; registers, if wanted, go around this module.
// The structure follows the source description; the RB digit code, the
// RBA cell, where the neg bits go and the prefix topology are this
// design's own choices (see each submodule).
module mbe_multiplier #(
  parameter int unsigned N = 32    // operand width; N/4 a power of two
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned R = N / 4;
  localparam int unsigned W = 2 * N;

  mbe_pkg::booth_t [N/2-1:0] dig;
  logic [R-1:0][W-1:0]       pp_p, pp_n;     // RB rows from the generator
  logic [R-1:0][W-1:0]       cz_p, cz_n;     // after (1,1) -> (0,0)
  logic [W-1:0]              sum_p, sum_n;   // tree output
  logic                      cout_unused;

  booth_encoder #(.N(N)) u_enc (
    .b(b), .dig(dig)
  );

  rb_ppg #(.N(N)) u_ppg (
    .a(a), .dig(dig), .xp(pp_p), .xn(pp_n)
  );

  for (genvar k = 0; k < R; k++) begin : g_cancel
    rb_cancel #(.W(W)) u_cancel (
      .xp_i(pp_p[k]), .xn_i(pp_n[k]), .xp_o(cz_p[k]), .xn_o(cz_n[k])
    );
  end

  rb_tree #(.ROWS(R), .W(W)) u_tree (
    .xp(cz_p), .xn(cz_n), .sp(sum_p), .sn(sum_n)
  );

  // RB -> NB: X+ - X- modulo 2^(2N); the carry out has no meaning here.
  ling_adder #(.W(W)) u_conv (
    .a(sum_p), .b(~sum_n), .cin(1'b1), .sum(p), .cout(cout_unused)
  );

endmodule
