// rba: redundant-binary adder (RBA), the unit cell of the summing tree.
//
// Adds two W-digit RB numbers X = xp - xn and Y = yp - yn, digits in
// {-1, 0, +1}, into one W-digit RB number S = sp - sn, with no carry
// propagation: every output digit depends only on the input digits at its
// own position and the two positions below it.
//
// Per position i the digit sum z = x(i) + y(i) in [-2, 2] is split as
// z = 2*c(i) + w(i). For z = +-2 the choice is forced (c = +-1, w = 0). For
// z = +-1 the cell looks at position i-1: if both digits there are
// non-negative, the transfer c(i-1) coming up can only be 0 or +1, so the
// cell picks w(i) in {-1, 0} (z=+1: c=1, w=-1; z=-1: c=0, w=-1); otherwise
// c(i-1) is 0 or -1 and it picks w(i) in {0, +1} (z=+1: c=0, w=1; z=-1:
// c=-1, w=1). The final digit s(i) = w(i) + c(i-1) then always lies in
// {-1, 0, +1}. The transfer out of the top digit is dropped: the sum is
// exact modulo 2^W.
//
// Inputs must be canonical (no (1,1) pair, see rb_cancel): "non-negative"
// is read from the n bits alone. Outputs are canonical. The cell's
// decision rule is the classic two-step RB addition; its gate-level form is
// this design's own. Purely combinational.
module rba #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] xp,
  input  logic [W-1:0] xn,
  input  logic [W-1:0] yp,
  input  logic [W-1:0] yn,
  output logic [W-1:0] sp,
  output logic [W-1:0] sn
);

  // Transfer digit out of each position, (cp, cn) worth cp - cn; and the
  // interim digit (wp, wn).
  logic [W-1:0] cp, cn, wp, wn;
  // Both digits at position i-1 are non-negative (position -1 counts as 0).
  logic [W-1:0] low_nonneg;

  assign low_nonneg = ~({xn[W-2:0], 1'b0} | {yn[W-2:0], 1'b0});

  always_comb begin
    for (int i = 0; i < W; i++) begin
      logic [1:0] npos, nneg;   // how many +1 and -1 digits at position i
      npos = {1'b0, xp[i]} + {1'b0, yp[i]};
      nneg = {1'b0, xn[i]} + {1'b0, yn[i]};
      cp[i] = 1'b0; cn[i] = 1'b0; wp[i] = 1'b0; wn[i] = 1'b0;
      if (npos == 2'd2) begin                       // z = +2
        cp[i] = 1'b1;
      end else if (nneg == 2'd2) begin              // z = -2
        cn[i] = 1'b1;
      end else if (npos == 2'd1 && nneg == 2'd0) begin  // z = +1
        if (low_nonneg[i]) begin cp[i] = 1'b1; wn[i] = 1'b1; end
        else               begin wp[i] = 1'b1; end
      end else if (nneg == 2'd1 && npos == 2'd0) begin  // z = -1
        if (low_nonneg[i]) begin wn[i] = 1'b1; end
        else               begin cn[i] = 1'b1; wp[i] = 1'b1; end
      end
      // z = 0 (including +1 with -1): c = 0, w = 0
    end
  end

  // The transfer out of digit W-1 (cp/cn bit W-1) is left unused: the
  // sum is modulo 2^W.
  // s(i) = w(i) + c(i-1); the rule above keeps it in {-1, 0, +1}, so the
  // pair can be formed without cancellation logic beyond an AND.
  logic [W-1:0] cpu, cnu;   // transfers moved up one position
  assign cpu = {cp[W-2:0], 1'b0};
  assign cnu = {cn[W-2:0], 1'b0};
  assign sp  = (wp | cpu) & ~(wn | cnu);
  assign sn  = (wn | cnu) & ~(wp | cpu);

endmodule
