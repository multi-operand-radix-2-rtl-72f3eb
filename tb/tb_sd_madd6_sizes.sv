// tb_sd_madd6_sizes: checks the six-operand adder at word lengths other
// than its default: 1, 2, 7 and 16 digits (odd and even N, and the
// smallest sizes, where the part adders hold one full adder or none at all
// for the odd places). Each size gets random, mostly-+1 and mostly--1
// operand sets through sd_madd6_harness, which compares the part sums and
// the result with integer sums.
module tb_sd_madd6_sizes;

  logic start = 1'b0;
  logic done [4];
  int   hchecks [4];
  int   hfail [4];
  int   checks = 0;
  int   failures = 0;

  sd_madd6_harness #(.N(1))  h0 (.start(start), .done(done[0]), .checks(hchecks[0]), .failures(hfail[0]));
  sd_madd6_harness #(.N(2))  h1 (.start(start), .done(done[1]), .checks(hchecks[1]), .failures(hfail[1]));
  sd_madd6_harness #(.N(7))  h2 (.start(start), .done(done[2]), .checks(hchecks[2]), .failures(hfail[2]));
  sd_madd6_harness #(.N(16)) h3 (.start(start), .done(done[3]), .checks(hchecks[3]), .failures(hfail[3]));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    #1 start = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int h = 0; h < 4; h++) begin
      checks += hchecks[h];
      failures += hfail[h];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
