// tb_sdfa6: exhaustive self-checking test of the six-input SD full adder.
//
// Drives all 3^6 operand digit combinations with both values of e_{i-2}
// and each carry d_{i-2} that agrees with it (2916 cases). The expected
// outputs come from arithmetic, not from the selection table: w_i is the
// odd part of z_i, taken as -1 when e_{i-2} = 1 and +1 when it is 0; the
// remaining even part q = (z_i - w_i)/2 is split as 2*d_i + c_i with
// d_i = sign(q) when |q| >= 2. The test checks s_i, c_i, d_i, e_i and the
// identity 4*d_i + 2*c_i + w_i = z_i.
module tb_sdfa6;
  import sd_pkg::*;

  // initialised so that the inputs are legal from time 0
  sd_digit_t x [NUM_OPS] = '{default: SD_ZERO};
  logic      e_im2 = 1'b0;
  sd_digit_t d_im2 = SD_ZERO;
  sd_digit_t s, c, d;
  logic      e;

  int checks = 0;
  int failures = 0;

  sdfa6 dut (.x(x), .e_im2(e_im2), .d_im2(d_im2), .s(s), .c(c), .d(d), .e(e));

  function automatic sd_digit_t to_digit(int v);
    return sd_digit_t'(v);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s: got %0d expected %0d (z case x=%0d %0d %0d %0d %0d %0d e=%0b d=%0d)",
                 what, got, exp, x[0], x[1], x[2], x[3], x[4], x[5], e_im2, d_im2);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int z, w_exp, q, d_exp, c_exp, s_exp, dd, w_got;
    for (int code = 0; code < 729; code++) begin
      int t;
      t = code;
      z = 0;
      for (int j = 0; j < NUM_OPS; j++) begin
        x[j] = to_digit((t % 3) - 1);
        z += (t % 3) - 1;
        t /= 3;
      end
      for (int ep = 0; ep < 2; ep++) begin
        for (int dsel = 0; dsel < 2; dsel++) begin
          e_im2 = ep[0];
          dd    = (ep == 1) ? dsel : -dsel;  // carry agrees with e_{i-2}
          d_im2 = to_digit(dd);
          #1;
          w_exp = (z % 2 == 0) ? 0 : ((ep == 1) ? -1 : 1);
          q     = (z - w_exp) / 2;
          d_exp = (q >= 2) ? 1 : ((q <= -2) ? -1 : 0);
          c_exp = q - 2 * d_exp;
          s_exp = w_exp + dd;
          check("e", int'(e), (z > 0) ? 1 : 0);
          check("d", int'(d), d_exp);
          check("c", int'(c), c_exp);
          check("s", int'(s), s_exp);
          w_got = int'(s) - dd;
          check("4d+2c+w=z", 4 * int'(d) + 2 * int'(c) + w_got, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
