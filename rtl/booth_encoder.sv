// booth_encoder: radix-4 modified Booth encoding (MBE) of one multiplier digit.
//
// The multiplier is scanned in overlapping 3-bit groups {b[2k+1], b[2k],
// b[2k-1]}; each group becomes one signed digit in {-2,-1,0,+1,+2}, so an
// n-bit multiplier needs n/2 partial-product rows instead of n. The digit is
// given as three one-hot-style controls: neg (digit is negative), one
// (|digit| = 1) and two (|digit| = 2). The group 111 gives neg=1 with a zero
// magnitude, which the partial-product row turns into zero.
//
// Interface: grp = {b[2k+1], b[2k], b[2k-1]}, dig = the digit. Combinational.
// MBE is the encoding the source names; this is the standard MBE truth table.
module booth_encoder
  import quant_pkg::*;
(
  input  logic [2:0]   grp,
  output booth_digit_t dig
);

  always_comb begin
    dig.neg = grp[2] & ~(grp[1] & grp[0]);
    dig.one = grp[1] ^ grp[0];
    dig.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
  end

endmodule
