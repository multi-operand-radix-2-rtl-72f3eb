// tb_sd_madd_part: self-checking test of the one-parity multi-operand adder.
//
// Runs random operand sets through four instances (8 and 7 digits, even and
// odd places) via sd_madd_part_harness, which compares the value of the
// (N+2)-digit result with the integer sum. It then applies the 8-digit
// six-operand example worked in the published description (operands of
// value 149, 93, 153, 78, 134 and -23) to the even-place adder and checks
// the exact digits 0 0 0 1 0 -1 0 1 -1 0 (value 50) given there, and checks
// the odd-place result against its value 534 (584 - 50).
module tb_sd_madd_part;
  import sd_pkg::*;

  localparam int N = 8;

  logic start = 1'b0;
  logic done [4];
  int   hchecks [4];
  int   hfail [4];
  int   checks = 0;
  int   failures = 0;

  sd_madd_part_harness #(.N(8), .PARITY(1'b0)) h0 (.start(start), .done(done[0]), .checks(hchecks[0]), .failures(hfail[0]));
  sd_madd_part_harness #(.N(8), .PARITY(1'b1)) h1 (.start(start), .done(done[1]), .checks(hchecks[1]), .failures(hfail[1]));
  sd_madd_part_harness #(.N(7), .PARITY(1'b0)) h2 (.start(start), .done(done[2]), .checks(hchecks[2]), .failures(hfail[2]));
  sd_madd_part_harness #(.N(7), .PARITY(1'b1)) h3 (.start(start), .done(done[3]), .checks(hchecks[3]), .failures(hfail[3]));

  // example vectors, most significant digit first
  sd_digit_t ex_op [NUM_OPS][N];
  sd_digit_t ev_op [NUM_OPS][N] = '{default: '{default: SD_ZERO}};
  sd_digit_t od_op [NUM_OPS][N] = '{default: '{default: SD_ZERO}};
  sd_digit_t ev_sum [N+2];
  sd_digit_t od_sum [N+2];

  sd_madd_part #(.N(N), .PARITY(1'b0)) u_even (.op(ev_op), .sum(ev_sum));
  sd_madd_part #(.N(N), .PARITY(1'b1)) u_odd  (.op(od_op), .sum(od_sum));

  task automatic set_op(int j, int d7, int d6, int d5, int d4, int d3, int d2, int d1, int d0);
    int v [8];
    v = '{d0, d1, d2, d3, d4, d5, d6, d7};
    for (int i = 0; i < N; i++) ex_op[j][i] = sd_digit_t'(v[i]);
  endtask

  function automatic longint value(sd_digit_t s [N+2]);
    longint r = 0;
    for (int i = 0; i < N + 2; i++) r += longint'(s[i]) <<< i;
    return r;
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    // the example: K, L, M, N, O, P
    set_op(0,  1,  1, -1, -1,  1,  0, -1, -1);  // 149
    set_op(1,  1, -1,  1,  0,  0,  0, -1, -1);  //  93
    set_op(2,  1,  0,  1,  0, -1,  0,  0,  1);  // 153
    set_op(3,  0,  1,  0,  0,  1,  1,  1,  0);  //  78
    set_op(4,  1,  0,  0,  1, -1,  0, -1,  0);  // 134
    set_op(5,  0,  0,  0, -1, -1,  0,  1, -1);  // -23
    for (int j = 0; j < NUM_OPS; j++)
      for (int i = 0; i < N; i++) begin
        ev_op[j][i] = (i % 2 == 0) ? ex_op[j][i] : SD_ZERO;
        od_op[j][i] = (i % 2 == 1) ? ex_op[j][i] : SD_ZERO;
      end
    #1;
    exp_even = '{0, -1, 1, 0, -1, 0, 1, 0, 0, 0};  // index = place
    for (int i = 0; i < N + 2; i++) check($sformatf("example even digit %0d", i), longint'(ev_sum[i]), exp_even[i]);
    check("example even value", value(ev_sum), 50);
    check("example odd value", value(od_sum), 534);

    start = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int h = 0; h < 4; h++) begin
      checks += hchecks[h];
      failures += hfail[h];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
