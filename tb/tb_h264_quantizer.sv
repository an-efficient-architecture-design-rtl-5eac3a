// tb_h264_quantizer: end-to-end test of the quantizer at its default sizes.
//
// Streams every 13-bit coefficient W for every QP code 0..63 (52..63 must act
// as 51), intra and inter rounding, and the three position classes (a random
// position of each class), with random idle cycles between coefficients.
// Each result is compared, one clock after its input, with
//   Z = sign(W) * ((|W| * MF + f) >> qbits)
// computed here from |W| with 64-bit integers and an independent factor
// table. It also checks that reset clears out_valid, and counts how often each
// mechanism occurred (negative W through the sign-selected offset, negative
// Booth digits, each qbits shift, intra/inter, each position class, QP
// clamping, idle cycles); one that never occurred counts as a failure.
module tb_h264_quantizer;
  int checks = 0, failures = 0;

  logic               clk = 0;
  logic               rst_n;
  logic               in_valid;
  logic signed [12:0] w;
  logic [5:0]         qp;
  logic [1:0]         pos_i, pos_j;
  logic               intra;
  logic               out_valid;
  logic signed [11:0] z;

  always #5 clk = ~clk;

  h264_quantizer dut (
    .clk, .rst_n, .in_valid, .w, .qp, .pos_i, .pos_j, .intra, .out_valid, .z
  );

  int ref_mf [6][3] = '{
    '{13107, 5243, 8066}, '{11916, 4660, 7490}, '{10082, 4194, 6554},
    '{ 9362, 3647, 5825}, '{ 8192, 3355, 5243}, '{ 7282, 2893, 4559}};

  // Mechanism counters.
  int n_neg_w, n_pos_w, n_neg_digit, n_intra, n_inter, n_clamp, n_idle;
  int n_class [3];
  int n_shift [9];

  // Expected result of the input accepted at the last clock edge.
  logic       exp_valid;
  int         exp_z;

  initial begin : watchdog
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int quantize(int wv, int qpv, int cls, bit is_intra);
    int q, m, qb; longint mf, f, a, mag;
    q   = (qpv > 51) ? 51 : qpv;
    m   = q % 6;
    qb  = 15 + q / 6;
    mf  = longint'(ref_mf[m][cls]);
    f   = is_intra ? (longint'(1) << qb) / 3 : (longint'(1) << qb) / 6;
    a   = (wv < 0) ? -longint'(wv) : longint'(wv);
    mag = (a * mf + f) >> qb;
    return (wv < 0) ? -int'(mag) : int'(mag);
  endfunction

  function automatic bit has_neg_digit(int mfv);
    // a radix-4 Booth digit is negative where bits {2k+1, 2k, 2k-1} = 10x
    int x; x = mfv << 1;
    for (int k = 0; k < 8; k++) begin
      if (((x >> (2 * k)) & 7) inside {4, 5}) return 1'b1;
    end
    return 1'b0;
  endfunction

  // Compare the output with the expectation formed one clock earlier.
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        if (failures < 20) $display("out_valid=%b expected %b", out_valid, exp_valid);
      end else if (exp_valid && int'(z) != exp_z) begin
        failures++;
        if (failures < 20) $display("z=%0d expected %0d", z, exp_z);
      end
    end
  end

  task automatic drive(int wv, int qpv, int cls, bit is_intra);
    int i, j, q;
    // random position of the requested class
    case (cls)
      0: begin i = 2 * $urandom_range(0, 1);     j = 2 * $urandom_range(0, 1);     end
      1: begin i = 2 * $urandom_range(0, 1) + 1; j = 2 * $urandom_range(0, 1) + 1; end
      default: begin
        i = $urandom_range(0, 3);
        j = 2 * $urandom_range(0, 1) + ((i % 2 == 0) ? 1 : 0);
      end
    endcase
    in_valid = 1'b1; w = 13'(wv); qp = 6'(qpv); pos_i = 2'(i); pos_j = 2'(j); intra = is_intra;
    @(posedge clk);
    exp_valid <= 1'b1;
    exp_z     <= quantize(wv, qpv, cls, is_intra);
    q = (qpv > 51) ? 51 : qpv;
    if (wv < 0) n_neg_w++; else n_pos_w++;
    if (has_neg_digit(ref_mf[q % 6][cls])) n_neg_digit++;
    if (is_intra) n_intra++; else n_inter++;
    if (qpv > 51) n_clamp++;
    n_class[cls]++;
    n_shift[q / 6]++;
    #1;
    if ($urandom_range(0, 63) == 0) begin
      in_valid = 1'b0; w = 13'($urandom);
      @(posedge clk);
      exp_valid <= 1'b0;
      n_idle++;
      #1;
    end
  endtask

  initial begin
    exp_valid = 1'b0; exp_z = 0;
    in_valid = 1'b0; w = '0; qp = '0; pos_i = '0; pos_j = '0; intra = 1'b0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("out_valid not cleared by reset"); end
    rst_n = 1'b1;

    // A known value: W = 100, QP = 0, position (0,0), intra:
    // (100*13107 + 10922) >> 15 = 40.
    checks++;
    if (quantize(100, 0, 0, 1'b1) != 40) begin failures++; $display("reference model wrong"); end

    for (int qpv = 0; qpv < 64; qpv++) begin
      for (int it = 0; it < 2; it++) begin
        for (int cls = 0; cls < 3; cls++) begin
          for (int wv = -4096; wv < 4096; wv++) begin
            drive(wv, qpv, cls, it[0]);
          end
        end
      end
    end
    in_valid = 1'b0;
    @(posedge clk);
    exp_valid <= 1'b0;
    @(posedge clk);
    #1;

    // Reset in the middle of traffic clears the output valid.
    in_valid = 1'b1;
    @(posedge clk); #1;
    rst_n = 1'b0; #1;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("asynchronous reset did not clear out_valid"); end

    begin : mechanisms
      automatic int counts [14];
      automatic string names [14] = '{"negative W", "non-negative W", "negative Booth digit", "intra", "inter",
                            "QP clamp", "idle cycle", "class even/even", "class odd/odd", "class mixed",
                            "qbits 15", "qbits 19", "qbits 23", "qbits all"};
      automatic int all_shifts;
      all_shifts = 1;
      for (int s = 0; s < 9; s++) if (n_shift[s] == 0) all_shifts = 0;
      counts = '{n_neg_w, n_pos_w, n_neg_digit, n_intra, n_inter, n_clamp, n_idle,
                 n_class[0], n_class[1], n_class[2], n_shift[0], n_shift[4], n_shift[8], all_shifts};
      for (int k = 0; k < 14; k++) begin
        $display("mechanism %-22s : %0d", names[k], counts[k]);
        checks++;
        if (counts[k] == 0) begin failures++; $display("mechanism %s never occurred", names[k]); end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
