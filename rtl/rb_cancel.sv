// rb_cancel: canonical coding of a redundant-binary (RB) number.
//
// An RB digit is a bit pair (p, n) worth p - n. The pair (1,1) is a second
// code for 0; it is rewritten as (0,0) so that a set n bit always means the
// digit -1. The RB adder cell (rba) decides its transfer digit from the n
// bits of the next lower position and is only correct on canonical inputs,
// so every RB row passes through this block before the summing tree.
//
// W digits, purely combinational, one AND gate per bit.
module rb_cancel #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] xp_i,
  input  logic [W-1:0] xn_i,
  output logic [W-1:0] xp_o,
  output logic [W-1:0] xn_o
);

  assign xp_o = xp_i & ~xn_i;
  assign xn_o = xn_i & ~xp_i;

endmodule
