// qp_decode: splits the quantization parameter and forms the rounding offsets.
//
// QP (0..51; larger values are clamped to 51) gives QP mod 6, which selects
// the multiplication factor, and qbits = 15 + floor(QP/6), the right shift
// that ends the quantization. The rounding offset f is 2**qbits/3 for intra
// and 2**qbits/6 for inter coding (rounded down).
//
// So that the quantizer never forms |W| and never restores the sign, the
// offset is given in two forms, one for each sign of W:
//   W >= 0: Z = (W*MF + f) >> qbits
//   W <  0: Z = (W*MF + (2**qbits - 1 - f)) >>> qbits   (arithmetic shift)
// For W < 0 the second form equals -((|W|*MF + f) >> qbits) exactly, because
// floor((-a + 2**q - 1) / 2**q) = -floor(a / 2**q). The quantizer picks one of
// the two offsets with the sign bit of W.
//
// Interface: qp, intra -> qp_mod6, qbits, f_pos, f_neg. Combinational. The
// qbits formula and the signed offset idea follow the source; the values of f
// and the exact negative-side offset are this design's (standard practice).
module qp_decode
  import quant_pkg::*;
(
  input  logic [QP_W-1:0]    qp,
  input  logic               intra,
  output logic [2:0]         qp_mod6,
  output logic [QBITS_W-1:0] qbits,
  output logic [SUM_W-1:0]   f_pos,
  output logic [SUM_W-1:0]   f_neg
);

  localparam int unsigned NDIV = QP_MAX / 6 + 1;  // floor(QP/6) = 0..8

  function automatic logic [SUM_W-1:0] offset(input int unsigned div6, input bit is_intra);
    longint unsigned one_q;
    one_q = longint'(1) << (QBITS_BASE + div6);
    return SUM_W'(is_intra ? one_q / 3 : one_q / 6);
  endfunction

  function automatic logic [SUM_W-1:0] offset_neg(input int unsigned div6, input bit is_intra);
    longint unsigned one_q;
    one_q = longint'(1) << (QBITS_BASE + div6);
    return SUM_W'(one_q - 1 - (is_intra ? one_q / 3 : one_q / 6));
  endfunction

  logic [QP_W-1:0] qp_c;
  logic [3:0]      div6;

  assign qp_c = (qp > QP_W'(QP_MAX)) ? QP_W'(QP_MAX) : qp;

  // floor(QP/6) by comparison with the multiples of 6.
  always_comb begin
    div6 = '0;
    for (int k = 1; k < NDIV; k++) begin
      if (qp_c >= QP_W'(6 * k)) div6 = 4'(k);
    end
  end

  assign qp_mod6 = 3'(qp_c - QP_W'(6 * div6));
  assign qbits   = QBITS_W'(QBITS_BASE) + QBITS_W'(div6);

  always_comb begin
    f_pos = '0;
    f_neg = '0;
    for (int k = 0; k < NDIV; k++) begin
      if (div6 == 4'(k)) begin
        f_pos = intra ? offset(k, 1'b1) : offset(k, 1'b0);
        f_neg = intra ? offset_neg(k, 1'b1) : offset_neg(k, 1'b0);
      end
    end
  end

endmodule
