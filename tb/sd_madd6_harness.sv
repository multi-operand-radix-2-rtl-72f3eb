// sd_madd6_harness: drives one sd_madd6 instance of size N with random
// operands and checks the values of both part sums and of the result
// against integer sums; used by tb_sd_madd6_sizes.
module sd_madd6_harness
  import sd_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter int unsigned TRIALS = 3000
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);

  sd_digit_t op     [NUM_OPS][N] = '{default: '{default: SD_ZERO}};
  sd_digit_t s_even [N+2];
  sd_digit_t s_odd  [N+2];
  sd_digit_t sum    [N+3];

  sd_madd6 #(.N(N)) dut (.op(op), .s_even(s_even), .s_odd(s_odd), .sum(sum));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 5) $display("FAIL N=%0d %s: got %0d expected %0d", N, what, got, exp);
    end
  endtask

  initial begin
    longint ev, od, ge, go, gs;
    int v, r;
    done = 1'b0;
    checks = 0;
    failures = 0;
    for (int j = 0; j < NUM_OPS; j++)
      for (int i = 0; i < int'(N); i++) op[j][i] = SD_ZERO;
    wait (start);
    for (int t = 0; t < int'(TRIALS); t++) begin
      ev = 0;
      od = 0;
      for (int j = 0; j < NUM_OPS; j++)
        for (int i = 0; i < int'(N); i++) begin
          r = int'($urandom_range(0, 9));
          case (t % 3)
            0:       v = int'($urandom_range(0, 2)) - 1;
            1:       v = (r < 8) ? 1 : r - 9;      // mostly +1
            default: v = (r < 8) ? -1 : 9 - r;     // mostly -1
          endcase
          op[j][i] = sd_digit_t'(v);
          if (i % 2 == 0) ev += longint'(v) <<< i;
          else            od += longint'(v) <<< i;
        end
      #1;
      ge = 0;
      go = 0;
      gs = 0;
      for (int i = 0; i < int'(N) + 2; i++) begin
        ge += longint'(s_even[i]) <<< i;
        go += longint'(s_odd[i]) <<< i;
      end
      for (int i = 0; i < int'(N) + 3; i++) begin
        gs += longint'(sum[i]) <<< i;
        check("legal result digit", longint'(sd_valid(sum[i])), 1);
      end
      check("even part", ge, ev);
      check("odd part", go, od);
      check("result", gs, ev + od);
    end
    done = 1'b1;
  end

endmodule
