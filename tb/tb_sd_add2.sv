// tb_sd_add2: self-checking test of the two-operand carry-free SD adder.
//
// Exhaustive over all pairs of 4-digit operands (3^8 = 6561 cases) on a
// 4-digit instance, then random pairs on a 10-digit instance (the size the
// 8-digit six-operand adder uses). The expected result is the integer sum
// of the operand values; every result digit must also be a legal code.
// Two further cases pin down the digit selection: with x = y = 1 at place 0
// only, the sum must be the digits (1, 0) with the carry at place 1; with
// x_0 = 1, y_0 = 0 and x_1 = 1, y_1 = 0 (z_0 > 0 below a z_1 of 1), place 1
// must take w_1 = -1 and a carry of +1 into place 2.
module tb_sd_add2;
  import sd_pkg::*;

  localparam int WS = 4;
  localparam int WL = 10;

  sd_digit_t xs [WS] = '{default: SD_ZERO};
  sd_digit_t ys [WS] = '{default: SD_ZERO};
  sd_digit_t ss [WS+1];
  sd_digit_t xl [WL] = '{default: SD_ZERO};
  sd_digit_t yl [WL] = '{default: SD_ZERO};
  sd_digit_t sl [WL+1];

  int checks = 0;
  int failures = 0;

  sd_add2 #(.W(WS)) u_small (.x(xs), .y(ys), .s(ss));
  sd_add2 #(.W(WL)) u_large (.x(xl), .y(yl), .s(sl));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
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
    longint ev, gv;
    int t, v;
    bit legal;
    // exhaustive, 4 digits
    for (int code = 0; code < 6561; code++) begin
      t = code;
      ev = 0;
      for (int i = 0; i < WS; i++) begin
        v = (t % 3) - 1; t /= 3; xs[i] = sd_digit_t'(v); ev += longint'(v) <<< i;
        v = (t % 3) - 1; t /= 3; ys[i] = sd_digit_t'(v); ev += longint'(v) <<< i;
      end
      #1;
      gv = 0;
      legal = 1'b1;
      for (int i = 0; i <= WS; i++) begin
        gv += longint'(ss[i]) <<< i;
        legal &= sd_valid(ss[i]);
      end
      check("small sum", gv, ev);
      check("small legal digits", longint'(legal), 1);
    end
    // random, 10 digits
    for (int n = 0; n < 5000; n++) begin
      ev = 0;
      for (int i = 0; i < WL; i++) begin
        v = int'($urandom_range(0, 2)) - 1; xl[i] = sd_digit_t'(v); ev += longint'(v) <<< i;
        v = int'($urandom_range(0, 2)) - 1; yl[i] = sd_digit_t'(v); ev += longint'(v) <<< i;
      end
      #1;
      gv = 0;
      legal = 1'b1;
      for (int i = 0; i <= WL; i++) begin
        gv += longint'(sl[i]) <<< i;
        legal &= sd_valid(sl[i]);
      end
      check("large sum", gv, ev);
      check("large legal digits", longint'(legal), 1);
    end
    // digit-level cases
    xs = '{default: SD_ZERO};
    ys = '{default: SD_ZERO};
    xs[0] = SD_POS; ys[0] = SD_POS;
    #1;
    check("1+1 digit 0", longint'(ss[0]), 0);
    check("1+1 digit 1", longint'(ss[1]), 1);
    xs[0] = SD_POS; ys[0] = SD_ZERO; xs[1] = SD_POS;
    #1;
    // z_0 = 1 (place 0 sees z_{-1} = 0: w_0 = 1, c_0 = 0);
    // z_1 = 1 with z_0 > 0: w_1 = -1, c_1 = 1
    check("3 digit 0", longint'(ss[0]), 1);
    check("3 digit 1", longint'(ss[1]), -1);
    check("3 digit 2", longint'(ss[2]), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
