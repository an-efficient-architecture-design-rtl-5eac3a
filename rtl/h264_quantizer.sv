// h264_quantizer: forward quantizer for H.264/AVC 4x4 transform coefficients.
//
// For each coefficient W of the integer core transform it computes
//   |Z| = (|W| * MF + f) >> qbits,   sign(Z) = sign(W)
// with MF the standard multiplication factor for (QP mod 6, position),
// qbits = 15 + floor(QP/6) and f the intra or inter rounding offset.
//
// How it works: the sign is handled before the multiplication instead of
// around it. W is multiplied as a signed number, and the offset added to the
// product is chosen by the sign bit of W (f for W >= 0, 2**qbits - 1 - f for
// W < 0), so an arithmetic right shift by qbits gives the signed result with
// no absolute value and no final negation. The multiplier is a modified Booth
// multiplier whose negative partial products come from a carry-free two's
// complement, so it has one row per Booth digit and no correction row, and
// its rows are summed by a balanced adder tree. The 27-bit sum W*MF + offset
// is registered; Z is bits [qbits+11 .. qbits] of the registered sum.
//
// Interface: in_valid, w (13-bit signed), qp (0..51), pos_i/pos_j (coefficient
// row/column in the 4x4 block), intra (1: intra offset, 0: inter offset);
// out_valid, z (12-bit signed). One coefficient per clock; z and out_valid
// appear one clock after the inputs are sampled (latency 1). rst_n is an
// asynchronous active-low reset that clears out_valid and the register.
//
// Follows the source: the 13/15/27/12-bit datapath widths, a combinational
// multiply and add followed by one register stage, the unchanged standard
// factors, the sign handling before multiplication and the Booth multiplier
// with carry-free negation. This design's own choices: the valid flag, the
// reset, the variable shift after the register, the intra/inter offsets and
// clamping QP above 51.
module h264_quantizer
  import quant_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic signed [W_W-1:0]  w,
  input  logic [QP_W-1:0]        qp,
  input  logic [1:0]             pos_i,
  input  logic [1:0]             pos_j,
  input  logic                   intra,
  output logic                   out_valid,
  output logic signed [Z_W-1:0]  z
);

  // Parameter decode and factor lookup.
  logic [2:0]         qp_mod6;
  logic [QBITS_W-1:0] qbits;
  logic [SUM_W-1:0]   f_pos, f_neg;
  pos_class_e         pos_class;  // used by the factor lookup only
  logic [MF_W-1:0]    mf;

  qp_decode u_qp (
    .qp      (qp),
    .intra   (intra),
    .qp_mod6 (qp_mod6),
    .qbits   (qbits),
    .f_pos   (f_pos),
    .f_neg   (f_neg)
  );

  mf_table u_mf (
    .qp_mod6   (qp_mod6),
    .pos_i     (pos_i),
    .pos_j     (pos_j),
    .pos_class (pos_class),
    .mf        (mf)
  );

  // W * MF. The exact product has W_W+MF_W+1 bits; with the standard factors
  // (at most 13107 < 2**14) it always fits the 27-bit sum word.
  logic signed [W_W+MF_W:0] prod;

  booth_multiplier #(.A_W(W_W), .B_W(MF_W)) u_mul (
    .a (w),
    .b (mf),
    .p (prod)
  );

  // Sign-selected rounding offset and the single adder.
  logic signed [SUM_W-1:0] offset, sum;

  assign offset = w[W_W-1] ? signed'(f_neg) : signed'(f_pos);
  assign sum    = SUM_W'(prod) + offset;

  // Register stage.
  logic signed [SUM_W-1:0] sum_q;
  logic [QBITS_W-1:0]      qbits_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      sum_q     <= '0;
      qbits_q   <= QBITS_W'(QBITS_BASE);
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sum_q   <= sum;
        qbits_q <= qbits;
      end
    end
  end

  // Level = registered sum shifted right arithmetically by qbits.
  logic signed [SUM_W-1:0] shifted;

  assign shifted = sum_q >>> qbits_q;
  assign z       = shifted[Z_W-1:0];

  // The product must fit the sum word and the level must fit Z.
  a_prod_fits: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> (prod[W_W+MF_W:SUM_W-1] == {(W_W+MF_W-SUM_W+2){prod[SUM_W-1]}}))
    else $error("product W*MF overflows the %0d-bit sum word", SUM_W);

  a_level_fits: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> (shifted[SUM_W-1:Z_W-1] == {(SUM_W-Z_W+1){shifted[Z_W-1]}}))
    else $error("quantized level overflows %0d bits", Z_W);

endmodule
