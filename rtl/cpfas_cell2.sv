// cpfas_cell2: final sum cell ("Cell2") of the carry propagate free
// adder/subtractor.
//
// Step 2 of signed-digit addition at digit position i: z_i = s_i + c_{i-1},
// where s_i is the intermediate sum of this position and c_{i-1} the
// intermediate carry from the position below. Cell1 chooses s_i so that the
// two are never both +1 or both -1, so z_i is again a single digit and no
// carry leaves this cell: the adder's delay does not grow with its length.
//
// On the two rails: z_i is +1 when one input is +1 and the other is not -1,
// and -1 when one input is -1 and the other is not +1; +1 and -1 cancel to 0.
// The function follows the adder's equations and Cell2 diagram (which takes
// s_i^+/s_i^- and c_{i-1}^+/c_{i-1}^- and gives z_i^+/z_i^-); the two-level
// rail equations are this design's way of writing it. For the pairs Cell1
// never produces (both +1, both -1) the output saturates to that digit.
//
// Interface: digits on two rails (sd_pkg). Purely combinational, no clock.
module cpfas_cell2
  import sd_pkg::*;
(
  input  sd_digit_t s_i,    // intermediate sum at position i
  input  sd_digit_t c_im1,  // intermediate carry from position i-1
  output sd_digit_t z_i     // final sum digit at position i
);

  always_comb begin
    z_i.pos = (s_i.pos && !c_im1.neg) || (c_im1.pos && !s_i.neg);
    z_i.neg = (s_i.neg && !c_im1.pos) || (c_im1.neg && !s_i.pos);
  end

endmodule
