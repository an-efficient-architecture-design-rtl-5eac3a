// tb_booth_multiplier: the 13-bit signed x 15-bit unsigned Booth multiplier
// against integer multiplication: every W with a set of corner factors (0, 1,
// 2, 3, all ones, powers of two, alternating bits) and random pairs.
module tb_booth_multiplier;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [12:0] a;
  logic        [14:0] b;
  logic signed [28:0] p;

  booth_multiplier dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    longint e;
    #1;
    e = longint'(a) * longint'(b);
    checks++;
    if (longint'(p) != e) begin
      failures++;
      if (failures < 10) $display("a=%0d b=%0d p=%0d exp=%0d", a, b, p, e);
    end
  endtask

  initial begin
    automatic int unsigned corner [10] = '{0, 1, 2, 3, 32767, 16384, 21845, 10922, 13107, 8192};
    for (int v = -4096; v < 4096; v++) begin
      for (int c = 0; c < 10; c++) begin
        a = 13'(v); b = 15'(corner[c]);
        check();
      end
    end
    for (int t = 0; t < 100000; t++) begin
      a = 13'($urandom); b = 15'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
