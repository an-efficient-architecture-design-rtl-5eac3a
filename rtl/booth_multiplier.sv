// booth_multiplier: signed x unsigned multiplier built from modified Booth
// encoding, carry-free negated partial products and an adder tree.
//
// The unsigned multiplier (the multiplication factor MF) is zero-extended to
// an even width and cut into MBE digits; the signed multiplicand (the
// transform coefficient W) is turned into one partial-product row per digit.
// Negative digits are formed with the carry-free two's complement, so there
// is no extra correction row: a 15-bit MF gives exactly 8 rows, because the
// top digit of a zero-extended unsigned number is never negative. The rows
// are summed by a balanced adder tree.
//
// Interface: a (signed, A_W bits), b (unsigned, B_W bits), p = a*b (signed,
// A_W+B_W+1 bits, exact). Combinational. Booth encoding with the negative
// rows made by the fast two's complement follows the source; the choice of
// MF as the Booth-encoded operand is this design's.
module booth_multiplier
  import quant_pkg::*;
#(
  parameter int unsigned A_W = 13,
  parameter int unsigned B_W = 15
) (
  input  logic signed [A_W-1:0]     a,
  input  logic        [B_W-1:0]     b,
  output logic signed [A_W+B_W:0]   p
);

  // Zero-extend b by at least one bit so the top digit is non-negative,
  // rounded up to an even number of bits.
  localparam int unsigned BE_W  = ((B_W + 2) / 2) * 2;
  localparam int unsigned NDIG  = BE_W / 2;
  localparam int unsigned PP_W  = A_W + 2;
  localparam int unsigned P_W   = A_W + B_W + 1;

  logic [BE_W:0] bx;  // {zero-extended b, implicit 0 below bit 0}
  assign bx = {(BE_W-B_W)'(0), b, 1'b0};

  logic signed [PP_W-1:0] rows [NDIG];

  for (genvar k = 0; k < NDIG; k++) begin : g_digit
    booth_digit_t dig;

    booth_encoder u_enc (
      .grp (bx[2*k+2 -: 3]),
      .dig (dig)
    );

    booth_pp_row #(.M_W(A_W)) u_row (
      .m   (a),
      .dig (dig),
      .pp  (rows[k])
    );
  end

  pp_adder_tree #(
    .ROWS  (NDIG),
    .IN_W  (PP_W),
    .STEP  (2),
    .OUT_W (P_W)
  ) u_tree (
    .rows (rows),
    .sum  (p)
  );

endmodule
