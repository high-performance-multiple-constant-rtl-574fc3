// mbe_pkg: types shared by the radix-4 redundant-binary Booth multiplier.
//
// booth_t is one radix-4 modified Booth digit d in {-2,-1,0,+1,+2} in the
// usual one-hot magnitude form: `one` selects |d| = 1, `two` selects |d| = 2,
// neither selects 0, and `neg` marks a negative digit. The code (neg=1,
// one=0, two=0) is a valid "negative zero" (multiplier triplet 111); every
// consumer in this design gives it the value 0.
package mbe_pkg;

  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } booth_t;

  // Value of a Booth digit, for assertions and testbenches.
  function automatic int booth_value(booth_t d);
    int mag;
    mag = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -mag : mag;
  endfunction

endpackage
