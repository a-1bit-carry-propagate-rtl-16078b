// sd_pkg: types and helpers for radix-2 signed-digit (redundant binary) numbers.
//
// Every digit takes a value in {-1, 0, 1} and travels on two rails, a "plus"
// rail and a "minus" rail, as the x_i^+ / x_i^- signal pairs of the adder
// cells: value = pos - neg. So +1 is (pos=1, neg=0), -1 is (pos=0, neg=1) and
// 0 is (0, 0). The code (1, 1) is never produced by the adder and is not a
// legal operand; the helpers below read it as 0. The rail names and the
// meaning of the minus rail as "this digit is negative" follow the adder's
// cell diagrams; the exact bit assignment of the codes is this design's choice.
//
// An N-digit number is an array of digits, digit k weighing 2^k.
package sd_pkg;

  // One signed digit on two rails.
  typedef struct packed {
    logic pos;  // digit is +1
    logic neg;  // digit is -1
  } sd_digit_t;

  localparam sd_digit_t SD_ZERO = '{pos: 1'b0, neg: 1'b0};
  localparam sd_digit_t SD_ONE  = '{pos: 1'b1, neg: 1'b0};
  localparam sd_digit_t SD_MONE = '{pos: 1'b0, neg: 1'b1};

  // Digit value as a small signed integer: -1, 0 or +1.
  function automatic logic signed [1:0] sd_value(sd_digit_t d);
    return $signed({1'b0, d.pos}) - $signed({1'b0, d.neg});
  endfunction

  // Digit code for a value in {-1, 0, 1}.
  function automatic sd_digit_t sd_from_value(logic signed [1:0] v);
    sd_digit_t d;
    d.pos = (v == 2'sd1);
    d.neg = (v == -2'sd1);
    return d;
  endfunction

  // Negation of a digit: swap the rails. Negating every digit of a number
  // negates the number, which is how subtraction is obtained.
  function automatic sd_digit_t sd_negate(sd_digit_t d);
    return '{pos: d.neg, neg: d.pos};
  endfunction

endpackage
