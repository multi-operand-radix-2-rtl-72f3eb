// sd_add2: two-operand radix-2 signed-digit adder without carry propagation.
//
// Function. s = x + y for W-digit SD operands, giving a (W+1)-digit SD sum.
//
// How it works, at every place i in parallel:
//   step 1  z_i = x_i + y_i                       (z_i in -2..2)
//   step 2  z_i = 2*c_i + w_i, choosing (c_i, w_i) by the sign of z_{i-1}:
//           if z_{i-1} > 0 the carry c_{i-1} coming in is 0 or +1, so a
//           z_i of +-1 is written with w_i = -1; otherwise c_{i-1} is 0 or
//           -1 and w_i = +1 is chosen. z_i = +-2 and 0 have one choice.
//   step 3  s_i = w_i + c_{i-1}, always a digit.
// Each sum digit depends on places i, i-1 and i-2 only. The top digit s_W
// is the carry c_{W-1}; place 0 sees no carry and takes z_{-1} = 0. The
// three steps and the selection rule follow the published two-operand
// scheme (its Table 1); the handling of the two ends is this design's.
//
// Timing: combinational, constant depth in W.
module sd_add2
  import sd_pkg::*;
#(
  parameter int unsigned W = 10   // operand digits (N+2 for the 8-digit adder)
) (
  input  sd_digit_t x [W],
  input  sd_digit_t y [W],
  output sd_digit_t s [W+1]
);

  logic signed [2:0] z [W];   // arithmetic sum per place
  sd_digit_t         c [W];   // carry to place i+1
  sd_digit_t         w [W];   // interim sum
  logic              pos [W]; // z_{i} > 0

  for (genvar i = 0; i < W; i++) begin : g_place
    logic prev_pos;  // z_{i-1} > 0

    assign z[i]   = 3'(x[i]) + 3'(y[i]);
    assign pos[i] = (z[i] > 0);
    if (i == 0) begin : g_lsb
      assign prev_pos = 1'b0;
    end else begin : g_mid
      assign prev_pos = pos[i - 1];
    end

    // selection rule of the published two-operand scheme
    always_comb begin
      unique case (z[i])
         3'sd2 : {c[i], w[i]} = {SD_POS , SD_ZERO};
         3'sd1 : {c[i], w[i]} = prev_pos ? {SD_POS , SD_NEG} : {SD_ZERO, SD_POS};
         3'sd0 : {c[i], w[i]} = {SD_ZERO, SD_ZERO};
        -3'sd1 : {c[i], w[i]} = prev_pos ? {SD_ZERO, SD_NEG} : {SD_NEG , SD_POS};
        -3'sd2 : {c[i], w[i]} = {SD_NEG , SD_ZERO};
        default: {c[i], w[i]} = {SD_ZERO, SD_ZERO};  // unreachable
      endcase
    end

    if (i == 0) begin : g_s_lsb
      assign s[i] = w[i];
    end else begin : g_s_mid
      assign s[i] = w[i] + c[i - 1];
    end
  end

  assign s[W] = c[W - 1];

  always_comb begin
    for (int i = 0; i < int'(W); i++)
      assert (sd_valid(x[i]) && sd_valid(y[i]))
        else $error("sd_add2: illegal operand digit code");
  end

endmodule
