// quant_pkg: widths, types and constants shared by the H.264/AVC forward
// quantizer. The datapath widths are those of the quantization unit: a 13-bit
// signed transform coefficient W, a 15-bit multiplication factor MF, a 27-bit
// product-plus-offset word and a 12-bit quantized level Z. The quantization
// parameter QP runs from 0 to 51 and sets qbits = 15 + floor(QP/6). The
// Booth digit struct and the position-class enumeration (which of the three
// multiplication-factor columns a coefficient uses) are this design's own.
package quant_pkg;

  localparam int unsigned W_W   = 13;  // transform coefficient W[12..0]
  localparam int unsigned MF_W  = 15;  // multiplication factor MF[14..0]
  localparam int unsigned SUM_W = 27;  // W*MF + f, [26..0]
  localparam int unsigned Z_W   = 12;  // quantized level Z[11..0]
  localparam int unsigned QP_W  = 6;   // QP, 0..51
  localparam int unsigned QP_MAX = 51;
  localparam int unsigned QBITS_BASE = 15;  // qbits = 15 + floor(QP/6)
  localparam int unsigned QBITS_W = 5;      // holds 15..23

  // Position class of coefficient (i,j) in the 4x4 block.
  typedef enum logic [1:0] {
    POS_EVEN_EVEN = 2'd0,  // (0,0) (0,2) (2,0) (2,2)
    POS_ODD_ODD   = 2'd1,  // (1,1) (1,3) (3,1) (3,3)
    POS_OTHER     = 2'd2   // the remaining eight positions
  } pos_class_e;

  // One radix-4 modified Booth digit: value = (neg ? -1 : 1) * (one ? 1 : two ? 2 : 0).
  typedef struct packed {
    logic neg;
    logic one;
    logic two;
  } booth_digit_t;

endpackage
