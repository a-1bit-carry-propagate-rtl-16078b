// cpfas_nbit: N-digit carry propagate free adder/subtractor (CPFA/S).
//
// Computes z = x + y (sub = 0) or z = x - y (sub = 1) on N-digit radix-2
// signed-digit numbers, giving N+1 result digits. N 1bit slices stand side by
// side: slice k works on operand digit k, takes the minus rails of operand
// digits k-1 (tied to "non-negative" for k = 0) and the intermediate sum of
// slice k+1 (tied to 0 above the top slice), and produces result digit k+1;
// slice 0 also gives result digit 0. Since no signal crosses more than one
// slice, the delay is that of a single slice whatever N is.
//
// Subtraction negates the subtrahend by swapping the rails of every y digit
// before the slices; the lower-digit sign inputs of the slices then see the
// negated digits too. The paper's adder is an "adder/subtractor" without a
// drawn mode input: the sub input and where the swap sits are this design's
// choice. Tying the edge inputs (no digits below slice 0, no sum above slice
// N-1) is also this design's choice for a stand-alone N-digit adder. With no
// digits below, slice 0 always splits +1 or -1 as a -1 sum digit, so z[0] is
// never +1 and its plus rail is constantly low: that is the table at work,
// not a fault.
//
// Interface: operands and result are arrays of two-rail digits (sd_pkg),
// index = digit weight exponent. Purely combinational, no clock.
module cpfas_nbit
  import sd_pkg::*;
#(
  parameter int unsigned N = 4  // operand digits (4bit CPFA/S)
) (
  input  logic      sub,       // 0: z = x + y, 1: z = x - y
  input  sd_digit_t x [N],     // augend / minuend
  input  sd_digit_t y [N],     // addend / subtrahend
  output sd_digit_t z [N+1]    // result, N+1 digits
);

  sd_digit_t y_eff [N];   // y, or -y when subtracting
  sd_digit_t s_up  [N];   // intermediate sum of each slice (its z0 pin)

  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      y_eff[k] = sub ? sd_negate(y[k]) : y[k];
    end
  end

  for (genvar k = 0; k < int'(N); k++) begin : g_slice
    logic      xm1_neg, ym1_neg;
    sd_digit_t s_above;

    if (k == 0) begin : g_lsb
      assign xm1_neg = 1'b0;
      assign ym1_neg = 1'b0;
    end else begin : g_mid
      assign xm1_neg = x[k-1].neg;
      assign ym1_neg = y_eff[k-1].neg;
    end

    if (k == int'(N) - 1) begin : g_msb
      assign s_above = SD_ZERO;
    end else begin : g_below
      assign s_above = s_up[k+1];
    end

    cpfas_1bit u_slice (
      .x0     (x[k]),
      .y0     (y_eff[k]),
      .xm1_neg(xm1_neg),
      .ym1_neg(ym1_neg),
      .s1     (s_above),
      .z0     (s_up[k]),
      .z1     (z[k+1])
    );
  end

  assign z[0] = s_up[0];

endmodule
