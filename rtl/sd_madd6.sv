// sd_madd6: six-operand radix-2 signed-digit adder (top level).
//
// Function. sum = K + L + M + N + O + P for six N-digit radix-2 SD operands
// (digits in {-1,0,1}), as an (N+3)-digit SD number, with a delay that does
// not depend on N.
//
// How it works. Adding more than two SD operands in one step produces
// carries that would reach two or more places up and then ripple. To keep
// every carry local, each operand is split in two: the even part keeps the
// digits at even places and has zeros at the odd places, the odd part the
// reverse. The six even parts are added by one multi-operand adder, the six
// odd parts by another (sd_madd_part). Inside each, every populated place
// writes its column sum (at most 6 in magnitude) as 4*d + 2*c + w; c lands
// on the empty place above and d on the next populated place, where it is
// absorbed without further carry. The two (N+2)-digit part sums are then
// added by a carry-free two-operand SD adder (sd_add2).
//
// The split, the two part adders and the final two-operand adder follow the
// published block diagram, including the result widths N+2 and N+3. The
// digit encoding (see sd_pkg) and bringing out the two part sums as extra
// outputs are this design's choices.
//
// Interface: op[j][i] is digit i of operand j (j = 0..5 for K..P).
// s_even / s_odd are the part sums, sum the final result; sum[i] has
// weight 2^i.
// Timing: purely combinational; no clock or reset.
module sd_madd6
  import sd_pkg::*;
#(
  parameter int unsigned N = 8   // operand digits
) (
  input  sd_digit_t op     [NUM_OPS][N],
  output sd_digit_t s_even [N+2],
  output sd_digit_t s_odd  [N+2],
  output sd_digit_t sum    [N+3]
);

  // Operand division: even and odd parts, zeros at the other places.
  sd_digit_t op_even [NUM_OPS][N];
  sd_digit_t op_odd  [NUM_OPS][N];

  for (genvar j = 0; j < NUM_OPS; j++) begin : g_op
    for (genvar i = 0; i < N; i++) begin : g_digit
      if ((i % 2) == 0) begin : g_even
        assign op_even[j][i] = op[j][i];
        assign op_odd[j][i]  = SD_ZERO;
      end else begin : g_odd
        assign op_even[j][i] = SD_ZERO;
        assign op_odd[j][i]  = op[j][i];
      end
    end
  end

  sd_madd_part #(.N(N), .PARITY(1'b0)) u_even (.op(op_even), .sum(s_even));
  sd_madd_part #(.N(N), .PARITY(1'b1)) u_odd  (.op(op_odd),  .sum(s_odd));

  sd_add2 #(.W(N + 2)) u_final (.x(s_even), .y(s_odd), .s(sum));

endmodule
