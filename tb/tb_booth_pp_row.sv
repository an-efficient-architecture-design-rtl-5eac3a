// tb_booth_pp_row: every 13-bit signed multiplicand with every Booth digit
// (including the negative zero digit); the row must equal digit * m.
module tb_booth_pp_row;
  import quant_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [12:0] m;
  booth_digit_t       dig;
  logic signed [14:0] pp;

  booth_pp_row dut (.m(m), .dig(dig), .pp(pp));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, exp_v;
    for (int v = -4096; v < 4096; v++) begin
      for (int k = 0; k < 6; k++) begin
        // k: 0 -> 0, 1 -> +1, 2 -> +2, 3 -> -1, 4 -> -2, 5 -> negative zero
        dig.neg = (k >= 3);
        dig.one = (k == 1 || k == 3);
        dig.two = (k == 2 || k == 4);
        d = (k == 1) ? 1 : (k == 2) ? 2 : (k == 3) ? -1 : (k == 4) ? -2 : 0;
        m = 13'(v); #1;
        exp_v = d * v;
        checks++;
        if (int'(pp) != exp_v) begin
          failures++;
          if (failures < 10) $display("m=%0d d=%0d pp=%0d exp=%0d", v, d, pp, exp_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
