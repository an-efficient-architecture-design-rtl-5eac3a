// tb_twos_comp_fast: exhaustive check of the carry-free two's complement at
// the default 4-bit width, at 8 bits (including the worked example
// 00101100 -> 11010100) and at the 15-bit width the multiplier uses. The
// expected value is (-a) mod 2**WIDTH computed by plain arithmetic.
module tb_twos_comp_fast;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [3:0]  a4, s4;
  logic [7:0]  a8, s8;
  logic [14:0] a15, s15;

  twos_comp_fast                  dut4  (.a(a4),  .s(s4));
  twos_comp_fast #(.WIDTH(8))     dut8  (.a(a8),  .s(s8));
  twos_comp_fast #(.WIDTH(15))    dut15 (.a(a15), .s(s15));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      a4 = 4'(v); #1;
      checks++;
      if (s4 !== 4'(-v)) begin failures++; $display("W4 a=%h s=%h", a4, s4); end
    end
    for (int v = 0; v < 256; v++) begin
      a8 = 8'(v); #1;
      checks++;
      if (s8 !== 8'(-v)) begin failures++; $display("W8 a=%h s=%h", a8, s8); end
    end
    a8 = 8'b00101100; #1;
    checks++;
    if (s8 !== 8'b11010100) begin failures++; $display("example failed: %b", s8); end
    for (int v = 0; v < 32768; v++) begin
      a15 = 15'(v); #1;
      checks++;
      if (s15 !== 15'(-v)) begin failures++; if (failures < 10) $display("W15 a=%h s=%h", a15, s15); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
