// booth_encoder: radix-4 modified Booth encoding of an N-bit two's complement
// multiplier.
//
// The multiplier b is cut into N/2 overlapping triplets
// {b[2j+1], b[2j], b[2j-1]} (b[-1] = 0). Digit j has the value
// -2*b[2j+1] + b[2j] + b[2j-1], so that b = sum_j d(j) * 4^j and an N x N
// product needs only N/2 partial-product rows instead of N. Each digit is
// given as the select signals (neg, two, one) of mbe_pkg::booth_t.
//
// Purely combinational. The digit code is the common one for MBE decoders;
// the source of this design only says that MBE halves the number of rows.
module booth_encoder #(
  parameter int unsigned N = 32           // multiplier width, must be even
) (
  input  logic [N-1:0]                  b,
  output mbe_pkg::booth_t [N/2-1:0]     dig
);

  // b with the implicit 0 appended below the LSB: bx[i+1] = b[i].
  logic [N:0] bx;
  assign bx = {b, 1'b0};

  always_comb begin
    for (int j = 0; j < N/2; j++) begin
      // bx[2j+2] = b[2j+1], bx[2j+1] = b[2j], bx[2j] = b[2j-1]
      dig[j].neg = bx[2*j+2];
      dig[j].one = bx[2*j+1] ^ bx[2*j];
      dig[j].two = (bx[2*j+2] & ~bx[2*j+1] & ~bx[2*j])
                 | (~bx[2*j+2] & bx[2*j+1] & bx[2*j]);
    end
  end

  if (N % 2 != 0) begin : g_bad_n
    $error("booth_encoder: N must be even");
  end

endmodule
