// tb_cpfas_cell2: self-checking test of the final sum cell.
//
// Applies the 7 (s_i, c_{i-1}) pairs the intermediate cell can produce (all
// but +1/+1 and -1/-1) and checks z_i = s_i + c_{i-1} as a digit value, and
// that the unused code (both rails high) never appears.
module tb_cpfas_cell2;
  import sd_pkg::*;

  int checks = 0, failures = 0;

  sd_digit_t s_i, c_im1, z_i;

  cpfas_cell2 dut (.*);

  function automatic sd_digit_t enc(int v);
    return (v > 0) ? 2'b10 : (v < 0) ? 2'b01 : 2'b00;
  endfunction

  function automatic int dec(sd_digit_t d);
    return int'(d[1]) - int'(d[0]);
  endfunction

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = -1; s <= 1; s++)
      for (int c = -1; c <= 1; c++) begin
        if (s != 0 && s == c) continue;
        s_i = enc(s); c_im1 = enc(c);
        #1;
        checks++;
        if (dec(z_i) != s + c || z_i == 2'b11) begin
          failures++;
          $display("FAIL s=%0d c=%0d: z code %b", s, c, z_i);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
