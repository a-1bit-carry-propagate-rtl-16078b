// tb_cpfas_1bit: self-checking test of the 1bit adder/subtractor slice.
//
// Part 1 sweeps every operand digit pair, every sign combination of the
// digits below and every upper intermediate sum s1 that can legally arrive
// (s1 = +1 only if x0 or y0 is negative, s1 = -1 only if both are
// non-negative). It checks that z0 (the digit-0 intermediate sum) and z1
// (s1 + carry of digit 0) are single digits whose weighted sum equals
// 2*s1 + x0 + y0, and that the split of x0 + y0 is the one the addition
// table prescribes for the given signs of the digits below (z0 = s0, and
// z1 = s1 + c0), from a reference table in the testbench.
// Part 2 repeats the "1 + 1" experiment: x0 and y0 switch together between 0
// and +1 (minus rails held low, s1 = 0, nothing below); z1 must follow as +1
// / 0 and z0, z1^- must stay 0.
module tb_cpfas_1bit;
  import sd_pkg::*;

  int checks = 0, failures = 0;

  sd_digit_t x0, y0, s1, z0, z1;
  logic      xm1_neg, ym1_neg;

  cpfas_1bit dut (.*);

  function automatic sd_digit_t enc(int v);
    return (v > 0) ? 2'b10 : (v < 0) ? 2'b01 : 2'b00;
  endfunction

  function automatic int dec(sd_digit_t d);
    return int'(d[1]) - int'(d[0]);
  endfunction

  // Reference addition table: carry and sum for x+y and "lower both >= 0".
  function automatic void ref_cs(int x, int y, bit nonneg, output int c, output int s);
    case (x + y)
      -2: begin c = -1; s = 0; end
      -1: if (nonneg) begin c = 0; s = -1; end else begin c = -1; s = 1; end
       0: begin c = 0; s = 0; end
       1: if (nonneg) begin c = 1; s = -1; end else begin c = 0; s = 1; end
      default: begin c = 1; s = 0; end
    endcase
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ec, es;
    // Part 1: exhaustive over legal inputs.
    for (int x = -1; x <= 1; x++)
      for (int y = -1; y <= 1; y++)
        for (int l = 0; l < 4; l++)
          for (int s = -1; s <= 1; s++) begin
            bit nonneg0;
            nonneg0 = (x >= 0) && (y >= 0);
            if (s == 1 && nonneg0) continue;
            if (s == -1 && !nonneg0) continue;
            x0 = enc(x); y0 = enc(y); s1 = enc(s);
            xm1_neg = l[0]; ym1_neg = l[1];
            #1;
            checks++;
            if (z0 == 2'b11 || z1 == 2'b11 ||
                2 * dec(z1) + dec(z0) != 2 * s + x + y) begin
              failures++;
              $display("FAIL x0=%0d y0=%0d low=%b s1=%0d: z1=%0d z0=%0d",
                       x, y, l[1:0], s, dec(z1), dec(z0));
            end
            ref_cs(x, y, (l == 0), ec, es);
            checks++;
            if (dec(z0) != es || dec(z1) != s + ec) begin
              failures++;
              $display("FAIL table x0=%0d y0=%0d low=%b s1=%0d: z1=%0d z0=%0d",
                       x, y, l[1:0], s, dec(z1), dec(z0));
            end
          end

    // Part 2: 1 + 1 mode, operands toggling between 0 and +1.
    xm1_neg = 1'b0; ym1_neg = 1'b0; s1 = SD_ZERO;
    for (int t = 0; t < 10; t++) begin
      x0 = t[0] ? SD_ONE : SD_ZERO;
      y0 = x0;
      #5;
      checks++;
      if (z0 != SD_ZERO || z1.neg || z1.pos != t[0]) begin
        failures++;
        $display("FAIL 1+1 mode t=%0d: z0=%b z1=%b", t, z0, z1);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
