// booth_decoder: one partial-product row of a radix-4 Booth multiplier.
//
// From the multiplicand a (N-bit two's complement) and one Booth digit d it
// forms the row d*a in the split form used by MBE arrays:
//     d*a = q + neg
// where q (N+2 bits, two's complement) is the selected multiple |d|*a
// (0, a or 2a, sign-extended) passed through an XOR with neg, i.e. its one's
// complement when the digit is negative, and neg is the +1 that completes
// the two's complement negation. The caller places neg at the row's LSB
// weight, normally in a free position of another row.
//
// N+2 bits hold +-2a for every N-bit a. Purely combinational.
module booth_decoder #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]      a,
  input  mbe_pkg::booth_t   dig,
  output logic [N+1:0]      q,
  output logic              neg
);

  logic [N+1:0] mag;   // |d| * a, sign-extended to N+2 bits

  always_comb begin
    unique case ({dig.two, dig.one})
      2'b01:   mag = {{2{a[N-1]}}, a};
      2'b10:   mag = {a[N-1], a, 1'b0};
      default: mag = '0;                 // 00: zero; 11 never produced
    endcase
    q   = mag ^ {(N+2){dig.neg}};
    neg = dig.neg;
  end

endmodule
