// booth_pp_row: one modified-Booth partial-product row without the extra
// "negative" correction bit.
//
// A Booth digit selects 0, M or 2M of the signed multiplicand M. In the usual
// MBE multiplier a negative digit is formed by inverting the row and adding a
// separate '1' at the row's least significant position; those '1's make an
// extra row for the carry-save adder array. Here the negative row is instead
// formed exactly by the carry-free two's complement unit (twos_comp_fast), so
// the row already holds -M or -2M and no correction row exists.
//
// Interface: m (signed multiplicand, M_W bits), dig (Booth digit), pp (signed
// row value digit*M, M_W+2 bits so that -2*min(M) still fits). Combinational.
// Removing the correction row with the fast two's complement follows the
// source; the row width is this design's choice.
module booth_pp_row
  import quant_pkg::*;
#(
  parameter int unsigned M_W = 13
) (
  input  logic signed [M_W-1:0] m,
  input  booth_digit_t          dig,
  output logic signed [M_W+1:0] pp
);

  logic signed [M_W+1:0] mag;

  always_comb begin
    if (dig.one)      mag = (M_W+2)'(m);
    else if (dig.two) mag = (M_W+2)'(m) <<< 1;
    else              mag = '0;
  end

  logic [M_W+1:0] mag_neg;

  twos_comp_fast #(.WIDTH(M_W+2)) u_neg (
    .a (mag),
    .s (mag_neg)
  );

  assign pp = dig.neg ? signed'(mag_neg) : mag;

endmodule
