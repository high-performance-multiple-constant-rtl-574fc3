// rb_ppg: modified redundant-binary partial-product generator.
//
// Turns the N/2 radix-4 Booth digits of the multiplier and the multiplicand
// a into N/4 redundant-binary (RB) partial-product rows, each 2N digits
// wide, whose sum is a*b modulo 2^(2N); no error-correcting word (extra
// row) is needed.
//
// Pairing. RB row k stands for NB rows 2k and 2k+1:
//     X+(k) - X-(k) = P(2k)*4^(2k) + P(2k+1)*4^(2k+1),  P(j) = d(j)*a.
// X+ carries the even row; X- carries the odd row negated, which costs
// nothing: the odd digit's sign is flipped before decoding.
//
// Sign bits. Instead of sign-extending each (N+2)-bit row to 2N bits, a
// row keeps its sign bit inverted and the constants this leaves behind
// (-2^p for the positive vector, +2^(p+2) for the negative one, p being
// the position of the positive vector's sign bit) are folded into the
// positive vector: its three top bits become {~s, s, s}. The negative
// vector's top bit is its inverted sign bit alone.
//
// Neg bits. A negative Booth digit is decoded as a one's complement plus a
// +1 (the "neg" bit) at the row's LSB weight. The two neg bits of RB row k
// are placed in row k+1, in positions 4k (X+) and 4k+2 (X-), which that
// row leaves empty. The last RB row has no row after it; it selects exact
// multiples 0, +-a, +-2a instead, using -a computed once in parallel with
// the Booth encoding, so it has no neg bits. This is what removes the
// extra row: N/4 rows rather than N/4 + 1.
//
// Bit map of row k (o = 4k, RW = N+2, p = o + RW - 1, bits at or above 2N
// dropped):
//     X+ : [o +: RW-1] = q(2k) low bits, [p +: 3] = {~s, s, s},
//          [4k-4] = neg(2k-2)                    (k >= 1)
//     X- : [o+2 +: RW-1] = q'(2k+1) low bits, [p+2] = ~s',
//          [4k-2] = neg'(2k-1)                   (k >= 1)
//
// The pairing by negating one row of each pair and the inversion of the
// sign bits follow the source description; where the neg bits go and the
// exact last row are this design's own way of removing the extra row.
// Purely combinational. N must be a multiple of 4 (of 8 for the tree).
module rb_ppg #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]                     a,
  input  mbe_pkg::booth_t [N/2-1:0]        dig,
  output logic [N/4-1:0][2*N-1:0]          xp,
  output logic [N/4-1:0][2*N-1:0]          xn
);

  localparam int unsigned R  = N / 4;     // RB rows
  localparam int unsigned RW = N + 2;     // NB row width
  localparam int unsigned W  = 2 * N;     // product width

  // Decoded rows: q_e/ne for the even digit, q_o/no for the negated odd
  // digit. Entry R-1 holds the exact last pair, with its neg bits zero.
  logic [R-1:0][RW-1:0] q_e, q_o;
  logic [R-1:0]         n_e, n_o;

  for (genvar k = 0; k < R - 1; k++) begin : g_dec
    mbe_pkg::booth_t dig_o_neg;
    assign dig_o_neg = '{neg: ~dig[2*k+1].neg, two: dig[2*k+1].two,
                         one: dig[2*k+1].one};

    booth_decoder #(.N(N)) u_dec_e (
      .a(a), .dig(dig[2*k]), .q(q_e[k]), .neg(n_e[k])
    );
    booth_decoder #(.N(N)) u_dec_o (
      .a(a), .dig(dig_o_neg), .q(q_o[k]), .neg(n_o[k])
    );
  end

  // Last RB row: exact two's complement multiples, no neg bit.
  logic [N:0]   neg_a;      // -a, N+1 bits (holds -(-2^(N-1)))
  assign neg_a = -{a[N-1], a};

  function automatic logic [RW-1:0] exact_row(logic [N-1:0] av,
                                              logic [N:0] nav,
                                              logic negd, logic two,
                                              logic one);
    logic [RW-1:0] r;
    unique case ({negd, two, one})
      3'b001:  r = {{2{av[N-1]}}, av};          // +a
      3'b010:  r = {av[N-1], av, 1'b0};         // +2a
      3'b101:  r = {nav[N], nav};               // -a
      3'b110:  r = {nav, 1'b0};                 // -2a
      default: r = '0;                          // 0 (either sign)
    endcase
    return r;
  endfunction

  always_comb begin
    q_e[R-1] = exact_row(a, neg_a, dig[N/2-2].neg, dig[N/2-2].two,
                         dig[N/2-2].one);
    // X- holds -P(odd): flip the digit's sign.
    q_o[R-1] = exact_row(a, neg_a, ~dig[N/2-1].neg, dig[N/2-1].two,
                         dig[N/2-1].one);
    n_e[R-1] = 1'b0;
    n_o[R-1] = 1'b0;
  end

  // Row assembly. Rows are built in vectors wider than 2N and cut to 2N:
  // the top row's sign pattern runs past bit 2N-1, and those bits are
  // dropped on purpose (arithmetic is modulo 2^(2N)), hence the unused
  // upper bits of vp and vn.
  always_comb begin
    for (int k = 0; k < R; k++) begin
      logic [W+RW+4:0] vp, vn;
      logic            se, so;
      se = q_e[k][RW-1];
      so = q_o[k][RW-1];
      vp = '0;
      vn = '0;
      vp[4*k +: RW+2] = {~se, se, se, q_e[k][RW-2:0]};
      vn[4*k+2 +: RW] = {~so, q_o[k][RW-2:0]};
      if (k >= 1) begin
        vp[4*k-4] = n_e[k-1];
        vn[4*k-2] = n_o[k-1];
      end
      xp[k] = vp[W-1:0];
      xn[k] = vn[W-1:0];
    end
  end

  if (N % 4 != 0) begin : g_bad_n
    $error("rb_ppg: N must be a multiple of 4");
  end

endmodule
