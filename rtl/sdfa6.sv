// sdfa6: six-input signed-digit full adder (6I-SDFA) for one digit place i.
//
// Function. The six operand digits k_i..p_i (each in {-1,0,1}) are summed
// into z_i in [-6, 6]. z_i is rewritten as 4*d_i + 2*c_i + w_i with
// d_i, c_i, w_i in {-1,0,1}, where d_i is the carry to place i+2 and c_i the
// carry to place i+1. Of the ways to write z_i like this, the one taken is
// fixed by e_{i-2}, which says whether z_{i-2} was positive:
//   e_{i-2} = 1 : the carry d_{i-2} that arrives is 0 or +1, so w_i is taken
//                 from {-1, 0};
//   e_{i-2} = 0 : d_{i-2} is 0 or -1, so w_i is taken from {0, +1}.
// Either way s_i = w_i + d_{i-2} stays in {-1,0,1}, so no carry ripples
// beyond two places. The module also gives e_i = (z_i > 0) to place i+2.
// The selection table, the rule for e_i and the three steps follow the
// published scheme. The module's ports are those of the published
// six-input SD full adder (6I-SDFA): six digits, e_{i-2} and d_{i-2} in; s_i, c_i,
// e_i and d_i out.
//
// In the parity-split adder (sd_madd_part) the carry c_{i-1} into this place
// is always zero, because place i-1 holds no operand digits; so the final sum
// here does not add a c input, and c_i leaves as digit i+1 of the result.
//
// Timing: purely combinational; the depth does not depend on the word
// length because only neighbouring places two apart are connected.
module sdfa6
  import sd_pkg::*;
(
  input  sd_digit_t x [NUM_OPS],  // operand digits k_i, l_i, m_i, n_i, o_i, p_i
  input  logic      e_im2,        // e_{i-2}: z_{i-2} > 0
  input  sd_digit_t d_im2,        // d_{i-2}: carry from place i-2
  output sd_digit_t s,            // s_i = w_i + d_{i-2}
  output sd_digit_t c,            // c_i: carry to place i+1
  output sd_digit_t d,            // d_i: carry to place i+2
  output logic      e             // e_i = (z_i > 0)
);

  logic signed [3:0] z;           // arithmetic sum, -6..6
  sd_digit_t         w;           // interim sum

  // step 1: arithmetic sum of the six digits
  always_comb begin
    z = '0;
    for (int j = 0; j < NUM_OPS; j++) z += 4'(x[j]);
  end

  // equation (1)
  assign e = (z > 0);

  // step 2: selection of (d_i, c_i, w_i), Table 2
  always_comb begin
    if (e_im2) begin
      unique case (z)
         4'sd6 : {d, c, w} = {SD_POS , SD_POS , SD_ZERO};
         4'sd5 : {d, c, w} = {SD_POS , SD_POS , SD_NEG };
         4'sd4 : {d, c, w} = {SD_POS , SD_ZERO, SD_ZERO};
         4'sd3 : {d, c, w} = {SD_POS , SD_ZERO, SD_NEG };
         4'sd2 : {d, c, w} = {SD_ZERO, SD_POS , SD_ZERO};
         4'sd1 : {d, c, w} = {SD_ZERO, SD_POS , SD_NEG };
         4'sd0 : {d, c, w} = {SD_ZERO, SD_ZERO, SD_ZERO};
        -4'sd1 : {d, c, w} = {SD_ZERO, SD_ZERO, SD_NEG };
        -4'sd2 : {d, c, w} = {SD_ZERO, SD_NEG , SD_ZERO};
        -4'sd3 : {d, c, w} = {SD_ZERO, SD_NEG , SD_NEG };
        -4'sd4 : {d, c, w} = {SD_NEG , SD_ZERO, SD_ZERO};
        -4'sd5 : {d, c, w} = {SD_NEG , SD_ZERO, SD_NEG };
        -4'sd6 : {d, c, w} = {SD_NEG , SD_NEG , SD_ZERO};
        default: {d, c, w} = {SD_ZERO, SD_ZERO, SD_ZERO};  // unreachable
      endcase
    end else begin
      unique case (z)
         4'sd6 : {d, c, w} = {SD_POS , SD_POS , SD_ZERO};
         4'sd5 : {d, c, w} = {SD_POS , SD_ZERO, SD_POS };
         4'sd4 : {d, c, w} = {SD_POS , SD_ZERO, SD_ZERO};
         4'sd3 : {d, c, w} = {SD_ZERO, SD_POS , SD_POS };
         4'sd2 : {d, c, w} = {SD_ZERO, SD_POS , SD_ZERO};
         4'sd1 : {d, c, w} = {SD_ZERO, SD_ZERO, SD_POS };
         4'sd0 : {d, c, w} = {SD_ZERO, SD_ZERO, SD_ZERO};
        -4'sd1 : {d, c, w} = {SD_ZERO, SD_NEG , SD_POS };
        -4'sd2 : {d, c, w} = {SD_ZERO, SD_NEG , SD_ZERO};
        -4'sd3 : {d, c, w} = {SD_NEG , SD_ZERO, SD_POS };
        -4'sd4 : {d, c, w} = {SD_NEG , SD_ZERO, SD_ZERO};
        -4'sd5 : {d, c, w} = {SD_NEG , SD_NEG , SD_POS };
        -4'sd6 : {d, c, w} = {SD_NEG , SD_NEG , SD_ZERO};
        default: {d, c, w} = {SD_ZERO, SD_ZERO, SD_ZERO};  // unreachable
      endcase
    end
  end

  // step 3: final sum
  // in range by construction: w_i and d_{i-2} never share a nonzero sign
  assign s = w + d_im2;

  // Operand digits and the incoming carry must be legal digits, and the
  // incoming carry must agree with e_{i-2} (the rule that keeps s_i a digit).
  always_comb begin
    for (int j = 0; j < NUM_OPS; j++)
      assert (sd_valid(x[j])) else $error("sdfa6: illegal operand digit code");
    assert (!(e_im2 && d_im2 == SD_NEG) && !(!e_im2 && d_im2 == SD_POS))
      else $error("sdfa6: d_{i-2} disagrees with e_{i-2}");
  end

endmodule
