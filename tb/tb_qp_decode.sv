// tb_qp_decode: every 6-bit QP code with intra and inter. Expected values:
// QP clamped to 51, qbits = 15 + QP/6, f = 2**qbits/3 (intra) or /6 (inter),
// negative-side offset 2**qbits - 1 - f.
module tb_qp_decode;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [5:0]  qp;
  logic        intra;
  logic [2:0]  qp_mod6;
  logic [4:0]  qbits;
  logic [26:0] f_pos, f_neg;

  qp_decode dut (.qp(qp), .intra(intra), .qp_mod6(qp_mod6), .qbits(qbits), .f_pos(f_pos), .f_neg(f_neg));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int q, eq; longint one_q, ef, en;
    for (int v = 0; v < 64; v++) begin
      for (int it = 0; it < 2; it++) begin
        qp = 6'(v); intra = it[0]; #1;
        q = (v > 51) ? 51 : v;
        eq = 15 + q / 6;
        one_q = longint'(1) << eq;
        ef = (it != 0) ? one_q / 3 : one_q / 6;
        en = one_q - 1 - ef;
        checks++;
        if (int'(qp_mod6) != q % 6 || int'(qbits) != eq || longint'(f_pos) != ef || longint'(f_neg) != en) begin
          failures++;
          $display("qp=%0d intra=%0d: mod6=%0d qbits=%0d f=%0d fn=%0d; exp %0d %0d %0d %0d",
                   v, it, qp_mod6, qbits, f_pos, f_neg, q % 6, eq, ef, en);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
