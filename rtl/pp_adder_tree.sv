// pp_adder_tree: balanced adder tree that sums the partial-product rows.
//
// Row k is sign-extended to OUT_W bits, shifted left by STEP*k (its weight)
// and the rows are then added pairwise, level by level: ROWS rows need
// ceil(log2(ROWS)) adder levels instead of the ROWS-1 adders in series of a
// chained accumulation. With the default 8 Booth rows that is 4, then 2, then
// 1 adder. The arrangement of pairs added in parallel before a final adder is
// the one the source shows for its proposed architecture; the generic depth
// and the use of plain two-input adders at every node are this design's.
//
// Interface: rows (ROWS signed rows of IN_W bits, row 0 least significant),
// sum (signed OUT_W-bit total, modulo 2**OUT_W). Combinational.
module pp_adder_tree #(
  parameter int unsigned ROWS  = 8,
  parameter int unsigned IN_W  = 15,
  parameter int unsigned STEP  = 2,
  parameter int unsigned OUT_W = 28
) (
  input  logic signed [IN_W-1:0]  rows [ROWS],
  output logic signed [OUT_W-1:0] sum
);

  localparam int unsigned LEVELS = (ROWS > 1) ? $clog2(ROWS) : 0;
  localparam int unsigned LEAVES = 1 << LEVELS;

  // Level 0: the rows, sign-extended and weighted, padded with zero rows to a
  // power of two.
  logic signed [OUT_W-1:0] leaf [LEAVES];

  for (genvar n = 0; n < LEAVES; n++) begin : g_leaf
    if (n < ROWS) begin : g_row
      assign leaf[n] = OUT_W'(rows[n]) <<< (STEP * n);
    end else begin : g_pad
      assign leaf[n] = '0;
    end
  end

  // Level l+1 holds LEAVES >> (l+1) sums of pairs from level l.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned N = LEAVES >> (l + 1);
    logic signed [OUT_W-1:0] s [N];
    for (genvar n = 0; n < N; n++) begin : g_node
      if (l == 0) begin : g_first
        assign s[n] = leaf[2*n] + leaf[2*n+1];
      end else begin : g_next
        assign s[n] = g_level[l-1].s[2*n] + g_level[l-1].s[2*n+1];
      end
    end
  end

  if (LEVELS == 0) begin : g_single
    assign sum = leaf[0];
  end else begin : g_root
    assign sum = g_level[LEVELS-1].s[0];
  end

endmodule
