// tb_mf_table: all 6 values of QP mod 6 (and the out-of-range codes 6, 7)
// with all 16 positions of the 4x4 block, against the H.264/AVC factor table.
module tb_mf_table;
  import quant_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0]  qp_mod6;
  logic [1:0]  pos_i, pos_j;
  pos_class_e  pos_class;
  logic [14:0] mf;

  mf_table dut (.qp_mod6(qp_mod6), .pos_i(pos_i), .pos_j(pos_j), .pos_class(pos_class), .mf(mf));

  // Reference: [m][0] both even, [m][1] both odd, [m][2] mixed.
  int ref_mf [6][3] = '{
    '{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
    '{ 9362, 3647, 5825}, '{ 8192, 3355, 5243}, '{ 7282, 2893, 4559}};

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int col, row;
    for (int m = 0; m < 8; m++) begin
      for (int i = 0; i < 4; i++) begin
        for (int j = 0; j < 4; j++) begin
          qp_mod6 = 3'(m); pos_i = 2'(i); pos_j = 2'(j); #1;
          col = ((i % 2) == 0 && (j % 2) == 0) ? 0 : ((i % 2) == 1 && (j % 2) == 1) ? 1 : 2;
          row = (m > 5) ? 5 : m;
          checks++;
          if (int'(mf) != ref_mf[row][col] || int'(pos_class) != col) begin
            failures++;
            $display("m=%0d (%0d,%0d) mf=%0d exp %0d class=%0d", m, i, j, mf, ref_mf[row][col], pos_class);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
