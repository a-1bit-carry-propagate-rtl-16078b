// cpfas_1bit: the 1bit carry propagate free adder/subtractor building block.
//
// One slice holds a Cell1 working on operand digit 0 and a Cell2 producing
// result digit 1:
//   - Cell1 splits x0 + y0 into carry c0 and sum s0, using the minus rails of
//     the digits below (x_{-1}^-, y_{-1}^-) to choose between the two splits.
//   - s0 leaves the slice as z0. At the bottom of a number (no digits below)
//     it is the final digit 0; inside a longer adder it is handed to the
//     slice below, whose Cell2 adds it to that slice's carry.
//   - Cell2 adds the intermediate sum s1 of the digit above (an input) to c0
//     and gives the final digit z1.
// Slices placed side by side, each passing its z0 output to the s1 input of
// the slice below, form an adder of any length with the same delay as one
// slice. The partitioning and port names follow the block diagram of the
// 1bit adder/subtractor; digits use the two-rail code of sd_pkg.
//
// Subtraction is the addition of the negated subtrahend (rails swapped),
// done outside the slice. Purely combinational, no clock.
module cpfas_1bit
  import sd_pkg::*;
(
  input  sd_digit_t x0,      // augend digit
  input  sd_digit_t y0,      // addend digit
  input  logic      xm1_neg, // x_{-1}^-: the augend digit below is negative
  input  logic      ym1_neg, // y_{-1}^-: the addend digit below is negative
  input  sd_digit_t s1,      // intermediate sum of the digit above
  output sd_digit_t z0,      // intermediate sum of this digit (final digit 0 at the bottom)
  output sd_digit_t z1       // final sum digit above: s1 + c0
);

  sd_digit_t c0;

  cpfas_cell1 u_cell1 (
    .x_i      (x0),
    .y_i      (y0),
    .x_im1_neg(xm1_neg),
    .y_im1_neg(ym1_neg),
    .c_i      (c0),
    .s_i      (z0)
  );

  cpfas_cell2 u_cell2 (
    .s_i  (s1),
    .c_im1(c0),
    .z_i  (z1)
  );

endmodule
