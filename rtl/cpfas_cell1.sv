// cpfas_cell1: intermediate carry / intermediate sum cell ("Cell1") of the
// carry propagate free adder/subtractor.
//
// Step 1 of signed-digit addition at digit position i: split x_i + y_i into
// 2*c_i + s_i with c_i, s_i in {-1, 0, 1}. Where the split is ambiguous
// (x_i + y_i = +1 or -1) the choice looks at the signs of the next lower digits
// x_{i-1}, y_{i-1}:
//
//   x_i + y_i | lower digits both >= 0 | c_i  s_i
//   ----------+------------------------+----------
//      -2     |   either               | -1    0
//      -1     |   yes                  |  0   -1
//      -1     |   no                   | -1   +1
//       0     |   either               |  0    0
//      +1     |   yes                  | +1   -1
//      +1     |   no                   |  0   +1
//      +2     |   either               | +1    0
//
// If both lower digits are non-negative, the carry into position i can only be
// 0 or +1, so s_i is pushed to -1; otherwise that carry is 0 or -1 and s_i is
// pushed to +1. Either way s_i + c_{i-1} stays in {-1, 0, 1}: the final sum
// never produces another carry. The table and the use of only the minus rails
// of x_{i-1}, y_{i-1} follow the adder's addition table and Cell1 diagram; the
// cell is written here from that table, not from its gate netlist.
//
// Interface: digits on two rails (sd_pkg). Purely combinational, no clock.
module cpfas_cell1
  import sd_pkg::*;
(
  input  sd_digit_t x_i,        // augend digit i
  input  sd_digit_t y_i,        // addend digit i
  input  logic      x_im1_neg,  // x_{i-1} is negative (minus rail of the lower digit)
  input  logic      y_im1_neg,  // y_{i-1} is negative
  output sd_digit_t c_i,        // intermediate carry into position i+1
  output sd_digit_t s_i         // intermediate sum at position i
);

  logic              lower_nonneg;
  logic signed [2:0] pair_sum;

  assign lower_nonneg = !x_im1_neg && !y_im1_neg;
  assign pair_sum     = 3'(sd_value(x_i)) + 3'(sd_value(y_i));

  always_comb begin
    c_i = SD_ZERO;
    s_i = SD_ZERO;
    unique case (pair_sum)
      -3'sd2: begin c_i = SD_MONE; s_i = SD_ZERO; end
      -3'sd1: begin
        if (lower_nonneg) begin c_i = SD_ZERO; s_i = SD_MONE; end
        else              begin c_i = SD_MONE; s_i = SD_ONE;  end
      end
       3'sd1: begin
        if (lower_nonneg) begin c_i = SD_ONE;  s_i = SD_MONE; end
        else              begin c_i = SD_ZERO; s_i = SD_ONE;  end
      end
       3'sd2: begin c_i = SD_ONE;  s_i = SD_ZERO; end
      default: begin c_i = SD_ZERO; s_i = SD_ZERO; end
    endcase
  end

endmodule
