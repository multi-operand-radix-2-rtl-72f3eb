// tb_sd_madd6: end-to-end self-checking test of the six-operand SD adder at
// its default size (8-digit operands, 11-digit result).
//
// 1. The worked 8-digit example (operands 149, 93, 153, 78, 134, -23): the
//    even-part sum must be the digits 0 0 0 1 0 -1 0 1 -1 0 (value 50), the
//    odd-part sum must have value 534 and the result value 584.
// 2. Random operand sets, a quarter of them biased towards all +1 or all -1
//    digits: the values of the result and of both part sums must equal the
//    integer sums, and every digit must be a legal code.
// 3. Coverage of the mechanisms, each of which must occur at least once:
//    a column sum of +-6 (six operands at once), a carry d of +1 and of -1
//    to place i+2 in each part adder, an odd column sum resolved with
//    e_{i-2} = 1 and with e_{i-2} = 0, and a carry of +1 and -1 in the
//    final two-operand adder. Column sums and e are recomputed here from
//    the operands; the carries are read from inside the design.
module tb_sd_madd6;
  import sd_pkg::*;

  localparam int N = 8;

  sd_digit_t op     [NUM_OPS][N] = '{default: '{default: SD_ZERO}};
  sd_digit_t s_even [N+2];
  sd_digit_t s_odd  [N+2];
  sd_digit_t sum    [N+3];

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int cov_z6, cov_d_pos_even, cov_d_neg_even, cov_d_pos_odd, cov_d_neg_odd;
  int cov_sel_e1, cov_sel_e0, cov_c2_pos, cov_c2_neg;

  sd_madd6 dut (.op(op), .s_even(s_even), .s_odd(s_odd), .sum(sum));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint val_part(sd_digit_t s [N+2]);
    longint r = 0;
    for (int i = 0; i < N + 2; i++) r += longint'(s[i]) <<< i;
    return r;
  endfunction

  function automatic longint val_sum(sd_digit_t s [N+3]);
    longint r = 0;
    for (int i = 0; i < N + 3; i++) r += longint'(s[i]) <<< i;
    return r;
  endfunction

  task automatic set_op(int j, int d7, int d6, int d5, int d4, int d3, int d2, int d1, int d0);
    int v [8];
    v = '{d0, d1, d2, d3, d4, d5, d6, d7};
    for (int i = 0; i < N; i++) op[j][i] = sd_digit_t'(v[i]);
  endtask

  // check values and digit legality of the current outputs, and count the
  // mechanisms the current operands exercise
  task automatic check_and_cover();
    longint ev, od;
    int z [N];
    bit legal;
    ev = 0;
    od = 0;
    for (int i = 0; i < N; i++) begin
      z[i] = 0;
      for (int j = 0; j < NUM_OPS; j++) begin
        z[i] += int'(op[j][i]);
        if (i % 2 == 0) ev += longint'(op[j][i]) <<< i;
        else            od += longint'(op[j][i]) <<< i;
      end
    end
    check("even part value", val_part(s_even), ev);
    check("odd part value", val_part(s_odd), od);
    check("sum value", val_sum(sum), ev + od);
    legal = 1'b1;
    for (int i = 0; i < N + 2; i++) legal &= sd_valid(s_even[i]) && sd_valid(s_odd[i]);
    for (int i = 0; i < N + 3; i++) legal &= sd_valid(sum[i]);
    check("legal digits", longint'(legal), 1);
    for (int i = 0; i < N; i++) begin
      if (z[i] == 6 || z[i] == -6) cov_z6++;
      if (z[i] % 2 != 0) begin
        if (i >= 2 && z[i - 2] > 0) cov_sel_e1++;
        else                        cov_sel_e0++;
      end
      if (dut.u_even.d[i] == SD_POS) cov_d_pos_even++;
      if (dut.u_even.d[i] == SD_NEG) cov_d_neg_even++;
      if (dut.u_odd.d[i]  == SD_POS) cov_d_pos_odd++;
      if (dut.u_odd.d[i]  == SD_NEG) cov_d_neg_odd++;
    end
    for (int i = 0; i < N + 2; i++) begin
      if (dut.u_final.c[i] == SD_POS) cov_c2_pos++;
      if (dut.u_final.c[i] == SD_NEG) cov_c2_neg++;
    end
  endtask

  task automatic need(string what, int count);
    checks++;
    $display("mechanism %-32s occurred %0d times", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never occurred: %s", what);
    end
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int exp_even [N+2];
    int bias, r;
    {cov_z6, cov_d_pos_even, cov_d_neg_even, cov_d_pos_odd, cov_d_neg_odd} = '0;
    {cov_sel_e1, cov_sel_e0, cov_c2_pos, cov_c2_neg} = '0;

    // 1. the worked example: K, L, M, N, O, P, most significant digit first
    set_op(0,  1,  1, -1, -1,  1,  0, -1, -1);  // 149
    set_op(1,  1, -1,  1,  0,  0,  0, -1, -1);  //  93
    set_op(2,  1,  0,  1,  0, -1,  0,  0,  1);  // 153
    set_op(3,  0,  1,  0,  0,  1,  1,  1,  0);  //  78
    set_op(4,  1,  0,  0,  1, -1,  0, -1,  0);  // 134
    set_op(5,  0,  0,  0, -1, -1,  0,  1, -1);  // -23
    #1;
    exp_even = '{0, -1, 1, 0, -1, 0, 1, 0, 0, 0};  // index = place
    for (int i = 0; i < N + 2; i++)
      check($sformatf("example even digit %0d", i), longint'(s_even[i]), exp_even[i]);
    check("example even value", val_part(s_even), 50);
    check("example odd value", val_part(s_odd), 534);
    check("example result", val_sum(sum), 584);
    check_and_cover();

    // 2. random operand sets
    for (int t = 0; t < 20000; t++) begin
      bias = (t % 4 != 3) ? 0 : (((t / 4) % 2 == 0) ? 1 : -1);
      for (int j = 0; j < NUM_OPS; j++)
        for (int i = 0; i < N; i++) begin
          r = int'($urandom_range(0, 9));
          if (bias == 0)     op[j][i] = sd_digit_t'(int'($urandom_range(0, 2)) - 1);
          else if (r < 8)    op[j][i] = sd_digit_t'(bias);
          else               op[j][i] = sd_digit_t'(r - 9);  // -1 or 0
        end
      #1;
      check_and_cover();
    end

    // 3. every mechanism must have occurred
    need("column sum of +-6", cov_z6);
    need("even part: carry d = +1 to i+2", cov_d_pos_even);
    need("even part: carry d = -1 to i+2", cov_d_neg_even);
    need("odd part: carry d = +1 to i+2", cov_d_pos_odd);
    need("odd part: carry d = -1 to i+2", cov_d_neg_odd);
    need("odd column sum with e_{i-2} = 1", cov_sel_e1);
    need("odd column sum with e_{i-2} = 0", cov_sel_e0);
    need("final adder carry +1", cov_c2_pos);
    need("final adder carry -1", cov_c2_neg);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
