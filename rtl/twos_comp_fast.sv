// twos_comp_fast: carry-free two's complement (negation) of a WIDTH-bit word.
//
// Negating a word by "invert and add one" needs a carry that ripples across
// the whole word. This unit uses the equivalent rule that the two's complement
// keeps every bit up to and including the rightmost '1' and inverts every bit
// to its left. Bit i is therefore inverted when any lower bit is '1': the
// "conversion signal" c[i] = a[i-1] | ... | a[0], and s[i] = a[i] ^ c[i],
// with s[0] = a[0]. The conversion signals are found by a binary tree: first
// inside groups of 2 bits, then 4, then 8 and so on, so the depth grows with
// log2(WIDTH) instead of WIDTH (a Sklansky prefix-OR tree).
//
// Interface: a (input word), s (its two's complement, modulo 2**WIDTH; zero
// maps to zero and the most negative value maps to itself). Purely
// combinational. The rule and the grouping by 2, 4, 8 bits follow the source
// description; the default WIDTH of 4 is the 4-bit unit it draws. The prefix
// network shape is this design's choice.
module twos_comp_fast #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  output logic [WIDTH-1:0] s
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  // p[l][i]: OR of a[i] and the bits below it inside its aligned group of
  // 2**l bits. p[LEVELS][i] is the inclusive prefix OR of a[i:0].
  logic [WIDTH-1:0] p [LEVELS+1];

  assign p[0] = a;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    for (genvar i = 0; i < WIDTH; i++) begin : g_bit
      // Upper half of a group of 2**(l+1) bits takes the OR of the top of
      // the lower half; the lower half passes through.
      if (((i >> l) & 1) == 1) begin : g_merge
        assign p[l+1][i] = p[l][i] | p[l][((i >> l) << l) - 1];
      end else begin : g_pass
        assign p[l+1][i] = p[l][i];
      end
    end
  end

  // Conversion signal: some bit below i is '1'.
  logic [WIDTH-1:0] conv;
  assign conv = {p[LEVELS][WIDTH-2:0], 1'b0};
  assign s    = a ^ conv;

endmodule
