// tb_pp_adder_tree: random signed rows into the default 8-row tree and into a
// 5-row tree (padding path); the sum must equal sum(row[k] * 4**k), computed
// with 64-bit integers and reduced to the output width.
module tb_pp_adder_tree;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [14:0] rows8 [8];
  logic signed [27:0] sum8;
  logic signed [14:0] rows5 [5];
  logic signed [24:0] sum5;

  pp_adder_tree                                        dut8 (.rows(rows8), .sum(sum8));
  pp_adder_tree #(.ROWS(5), .IN_W(15), .OUT_W(25))     dut5 (.rows(rows5), .sum(sum5));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e8, e5;
    for (int t = 0; t < 20000; t++) begin
      e8 = 0; e5 = 0;
      for (int k = 0; k < 8; k++) begin
        // mix random values with the extremes
        case ($urandom_range(0, 3))
          0: rows8[k] = 15'sh4000;
          1: rows8[k] = 15'sh3fff;
          default: rows8[k] = 15'($urandom);
        endcase
        e8 += longint'(rows8[k]) * (longint'(1) << (2 * k));
      end
      for (int k = 0; k < 5; k++) begin
        rows5[k] = 15'($urandom);
        e5 += longint'(rows5[k]) * (longint'(1) << (2 * k));
      end
      #1;
      checks += 2;
      if (sum8 !== 28'(e8)) begin failures++; if (failures < 10) $display("8-row sum %0d exp %0d", sum8, e8); end
      if (sum5 !== 25'(e5)) begin failures++; if (failures < 10) $display("5-row sum %0d exp %0d", sum5, e5); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
