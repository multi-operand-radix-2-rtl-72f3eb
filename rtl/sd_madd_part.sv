// sd_madd_part: multi-operand SD adder for one parity (even or odd places).
//
// Function. Adds six N-digit radix-2 SD operands whose digits are all zero
// at the places of the other parity, giving an (N+2)-digit SD sum. This is
// the "Multi-Operand Adder [even]" / "[odd]" box of the design: PARITY = 0
// takes the even places, PARITY = 1 the odd places.
//
// How it works. One sdfa6 sits at every place i of the chosen parity
// (i < N). Each rewrites its column sum z_i as 4*d_i + 2*c_i + w_i. Because
// the places in between hold only zeros:
//   * place i keeps s_i = w_i + d_{i-2} (no c arrives from place i-1);
//   * place i+1 has nothing of its own, so its digit is just c_i;
//   * d_i and e_i go to the sdfa6 two places up.
// Above the last sdfa6 the leftover d and c fill the top two digits, which
// is why the result has N+2 digits. The lowest sdfa6 sees no carry and
// e_{i-2} = 0. The wiring follows the published block diagram of the
// multi-operand adder; tying the chain's bottom inputs to zero, ignoring
// the digits of the other parity (they are asserted to be zero) and the
// generic handling of the top digits are this design's choices.
//
// Timing: combinational, one sdfa6 deep plus the final-sum stage; no
// carry ripples beyond two places, so the delay does not grow with N.
module sd_madd_part
  import sd_pkg::*;
#(
  parameter int unsigned N      = 8,  // operand digits
  parameter bit          PARITY = 0   // 0: even places, 1: odd places
) (
  input  sd_digit_t op  [NUM_OPS][N],  // op[j][i]: digit i of operand j
  output sd_digit_t sum [N+2]          // sum[i]: digit i of the result
);

  sd_digit_t c [N];   // carry to place i+1, at places of this parity
  sd_digit_t d [N];   // carry to place i+2
  logic      e [N];   // z_i > 0
  sd_digit_t s [N];   // final sum digit of the sdfa6 at place i

  for (genvar i = 0; i < N + 2; i++) begin : g_place
    if ((i % 2) == int'(PARITY)) begin : g_own
      if (i < N) begin : g_fa
        sd_digit_t col [NUM_OPS];
        for (genvar j = 0; j < NUM_OPS; j++) begin : g_col
          assign col[j] = op[j][i];
        end
        sdfa6 u_fa (
          .x     (col),
          .e_im2 ((i >= 2) ? e[(i >= 2) ? i - 2 : 0] : 1'b0),
          .d_im2 ((i >= 2) ? d[(i >= 2) ? i - 2 : 0] : SD_ZERO),
          .s     (s[i]),
          .c     (c[i]),
          .d     (d[i]),
          .e     (e[i])
        );
        assign sum[i] = s[i];
      end else if (i >= 2) begin : g_top
        // no operand digits here: only the carry d from two places down
        assign sum[i] = d[i - 2];
      end else begin : g_empty
        // only when N = 1 and PARITY = 1: no digit of this parity at all
        assign sum[i] = SD_ZERO;
      end
    end else begin : g_other
      if (i < N) begin : g_zero
        // places of the other parity carry no sdfa6
        assign c[i] = SD_ZERO;
        assign d[i] = SD_ZERO;
        assign e[i] = 1'b0;
        assign s[i] = SD_ZERO;
      end
      if (i >= 1 && i - 1 < N) begin : g_c
        assign sum[i] = c[i - 1];
      end else begin : g_none
        assign sum[i] = SD_ZERO;
      end
    end
  end

  // The operand digits of the other parity must be zero (the split operands
  // of the parity-split scheme).
  always_comb begin
    for (int j = 0; j < NUM_OPS; j++)
      for (int i = 0; i < int'(N); i++)
        if ((i % 2) != int'(PARITY))
          assert (op[j][i] == SD_ZERO)
            else $error("sd_madd_part: nonzero digit at a place of the other parity");
  end

endmodule
