// tb_booth_encoder: all eight 3-bit groups; the digit encoded by {neg, one,
// two} must equal -2*g[2] + g[1] + g[0], and a zero digit must have neither
// one nor two set.
module tb_booth_encoder;
  import quant_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [2:0]   grp;
  booth_digit_t dig;

  booth_encoder dut (.grp(grp), .dig(dig));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v, got_v;
    for (int g = 0; g < 8; g++) begin
      grp = 3'(g); #1;
      exp_v = -2 * ((g >> 2) & 1) + ((g >> 1) & 1) + (g & 1);
      got_v = dig.one ? 1 : dig.two ? 2 : 0;
      if (dig.neg) got_v = -got_v;
      checks++;
      if (got_v != exp_v || (dig.one && dig.two)) begin
        failures++;
        $display("grp=%b neg=%b one=%b two=%b expected %0d", grp, dig.neg, dig.one, dig.two, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
