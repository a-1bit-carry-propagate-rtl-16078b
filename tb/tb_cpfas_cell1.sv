// tb_cpfas_cell1: exhaustive self-checking test of the intermediate
// carry/sum cell.
//
// Applies all 9 operand digit pairs with all 4 sign combinations of the lower
// digits (36 cases). For each, the expected (c, s) comes from a reference
// addition table written out below, and the identity 2c + s = x + y is checked
// separately. The lower-sign inputs are also driven with the plus rails of the
// lower digits set, to show the cell looks only at their minus rails.
module tb_cpfas_cell1;
  import sd_pkg::*;

  int checks = 0, failures = 0;

  sd_digit_t x_i, y_i, c_i, s_i;
  logic      x_im1_neg, y_im1_neg;

  cpfas_cell1 dut (.*);

  function automatic sd_digit_t enc(int v);
    return (v > 0) ? 2'b10 : (v < 0) ? 2'b01 : 2'b00;
  endfunction

  function automatic int dec(sd_digit_t d);
    return int'(d[1]) - int'(d[0]);
  endfunction

  // Reference table: expected carry and sum for x+y and "lower both >= 0".
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
    for (int x = -1; x <= 1; x++)
      for (int y = -1; y <= 1; y++)
        for (int l = 0; l < 4; l++) begin
          x_i = enc(x); y_i = enc(y);
          x_im1_neg = l[0]; y_im1_neg = l[1];
          #1;
          ref_cs(x, y, (l == 0), ec, es);
          checks++;
          if (dec(c_i) != ec || dec(s_i) != es) begin
            failures++;
            $display("FAIL x=%0d y=%0d lowneg=%b: c=%0d s=%0d, expected c=%0d s=%0d",
                     x, y, l[1:0], dec(c_i), dec(s_i), ec, es);
          end
          checks++;
          if (2 * dec(c_i) + dec(s_i) != x + y || c_i == 2'b11 || s_i == 2'b11) begin
            failures++;
            $display("FAIL identity x=%0d y=%0d", x, y);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
