// mf_table: multiplication-factor lookup of the H.264/AVC forward quantizer.
//
// The factor MF depends on QP mod 6 and on where the coefficient sits in the
// 4x4 block: positions with both indices even, both indices odd, or mixed
// use three different columns. This module classifies the position (i,j) and
// returns the factor. The 18 values are those of the H.264/AVC standard
// (the design keeps the standard factors unchanged rather than approximating
// them). Combinational.
//
// Interface: qp_mod6 (0..5; 6 and 7 read as 5), pos_i/pos_j (row, column of
// the coefficient, 0..3; only their parity matters, so bit 1 of each is
// unused), pos_class (the class found), mf (15-bit factor).
module mf_table
  import quant_pkg::*;
(
  input  logic [2:0]      qp_mod6,
  input  logic [1:0]      pos_i,
  input  logic [1:0]      pos_j,
  output pos_class_e      pos_class,
  output logic [MF_W-1:0] mf
);

  always_comb begin
    if (!pos_i[0] && !pos_j[0])     pos_class = POS_EVEN_EVEN;
    else if (pos_i[0] && pos_j[0])  pos_class = POS_ODD_ODD;
    else                            pos_class = POS_OTHER;
  end

  // One row per QP mod 6: {even/even, odd/odd, other}.
  logic [MF_W-1:0] col_ee, col_oo, col_ot;

  always_comb begin
    unique case (qp_mod6)
      3'd0:    begin col_ee = 15'd13107; col_oo = 15'd5243; col_ot = 15'd8066; end
      3'd1:    begin col_ee = 15'd11916; col_oo = 15'd4660; col_ot = 15'd7490; end
      3'd2:    begin col_ee = 15'd10082; col_oo = 15'd4194; col_ot = 15'd6554; end
      3'd3:    begin col_ee = 15'd9362;  col_oo = 15'd3647; col_ot = 15'd5825; end
      3'd4:    begin col_ee = 15'd8192;  col_oo = 15'd3355; col_ot = 15'd5243; end
      default: begin col_ee = 15'd7282;  col_oo = 15'd2893; col_ot = 15'd4559; end
    endcase
  end

  always_comb begin
    unique case (pos_class)
      POS_EVEN_EVEN: mf = col_ee;
      POS_ODD_ODD:   mf = col_oo;
      default:       mf = col_ot;
    endcase
  end

endmodule
