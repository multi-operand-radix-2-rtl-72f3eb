// sd_madd_part_harness: drives one sd_madd_part instance with random
// operands and checks it; used by tb_sd_madd_part at several sizes.
//
// On each of TRIALS vectors the six operands get random digits at the
// places of the adder's parity (zeros elsewhere, as the split operands
// have). The result must be an (N+2)-digit SD number whose value equals the
// integer sum of the six operands, and every result digit must be a legal
// digit code. Every fourth vector draws digits biased towards all +1 or
// all -1, to reach the column sums +-6 and +-5.
module sd_madd_part_harness
  import sd_pkg::*;
#(
  parameter int unsigned N      = 8,
  parameter bit          PARITY = 0,
  parameter int unsigned TRIALS = 2000
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);

  sd_digit_t op  [NUM_OPS][N] = '{default: '{default: SD_ZERO}};
  sd_digit_t sum [N+2];

  sd_madd_part #(.N(N), .PARITY(PARITY)) dut (.op(op), .sum(sum));

  function automatic int rand_digit(int bias);
    int r;
    r = int'($urandom_range(0, 9));
    if (bias > 0) return (r < 8) ? 1 : (r - 8) - 0;        // mostly +1
    if (bias < 0) return (r < 8) ? -1 : -((r - 8) - 0);    // mostly -1
    return int'($urandom_range(0, 2)) - 1;
  endfunction

  initial begin
    longint exp_val, got_val;
    int bias;
    done = 1'b0;
    checks = 0;
    failures = 0;
    for (int j = 0; j < NUM_OPS; j++)
      for (int i = 0; i < int'(N); i++) op[j][i] = SD_ZERO;
    wait (start);
    for (int t = 0; t < int'(TRIALS); t++) begin
      bias = (t % 4 != 3) ? 0 : (((t / 4) % 2 == 0) ? 1 : -1);
      exp_val = 0;
      for (int j = 0; j < NUM_OPS; j++)
        for (int i = 0; i < int'(N); i++) begin
          if ((i % 2) == int'(PARITY)) begin
            int v;
            v = rand_digit(bias);
            op[j][i] = sd_digit_t'(v);
            exp_val += longint'(v) <<< i;
          end else begin
            op[j][i] = SD_ZERO;
          end
        end
      #1;
      got_val = 0;
      for (int i = 0; i < int'(N) + 2; i++) begin
        checks++;
        if (!sd_valid(sum[i])) begin
          failures++;
          $display("FAIL N=%0d P=%0d: illegal digit code at place %0d", N, PARITY, i);
        end
        got_val += longint'(sum[i]) <<< i;
      end
      checks++;
      if (got_val != exp_val) begin
        failures++;
        if (failures <= 5)
          $display("FAIL N=%0d P=%0d: sum value %0d expected %0d", N, PARITY, got_val, exp_val);
      end
    end
    done = 1'b1;
  end

endmodule
