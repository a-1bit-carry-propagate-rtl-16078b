// tb_cpfas_nbit: self-checking test of the N-digit adder/subtractor.
//
// Instance u4 (default 4 digits) gets every pair of 4-digit operands in both
// modes (81 x 81 x 2 cases); instance u8 (8 digits) gets 20000 random pairs.
// Each result is checked as a value, z = x + y or x - y, computed with
// integers from the operand digits, and for the unused digit code. A locality
// check shows the absence of carry propagation: changing operand digit j
// may change result digits j .. j+2 only. Finally, the five 4-digit
// spellings of -3 are each added to +3 and subtracted from -3: the results
// must be 0 and 0 whatever the spelling.
module tb_cpfas_nbit;
  import sd_pkg::*;

  int checks = 0, failures = 0;

  localparam int N4 = 4;
  localparam int N8 = 8;

  logic      sub4, sub8;
  sd_digit_t x4 [N4], y4 [N4], z4 [N4+1];
  sd_digit_t x8 [N8], y8 [N8], z8 [N8+1];

  cpfas_nbit u4 (.sub(sub4), .x(x4), .y(y4), .z(z4));
  cpfas_nbit #(.N(N8)) u8 (.sub(sub8), .x(x8), .y(y8), .z(z8));

  function automatic sd_digit_t enc(int v);
    return (v > 0) ? 2'b10 : (v < 0) ? 2'b01 : 2'b00;
  endfunction

  function automatic int dec(sd_digit_t d);
    return int'(d[1]) - int'(d[0]);
  endfunction

  function automatic sd_digit_t rnd_digit();
    int r = int'($urandom_range(2)) - 1;
    return enc(r);
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xv, yv, zv;
    bit bad;
    sd_digit_t z_ref [N8+1];

    // Exhaustive, 4 digits.
    for (int m = 0; m < 2; m++)
      for (int a = 0; a < 81; a++)
        for (int b = 0; b < 81; b++) begin
          int ta, tb;
          ta = a; tb = b;
          xv = 0; yv = 0;
          for (int k = 0; k < N4; k++) begin
            x4[k] = enc(ta % 3 - 1); y4[k] = enc(tb % 3 - 1);
            xv += (ta % 3 - 1) << k; yv += (tb % 3 - 1) << k;
            ta /= 3; tb /= 3;
          end
          sub4 = m[0];
          #1;
          zv = 0; bad = 0;
          for (int k = 0; k <= N4; k++) begin
            zv += dec(z4[k]) << k;
            if (z4[k] == 2'b11) bad = 1;
          end
          checks++;
          if (bad || zv != (m[0] ? xv - yv : xv + yv)) begin
            failures++;
            if (failures < 10)
              $display("FAIL N=4 sub=%0d x=%0d y=%0d z=%0d", m, xv, yv, zv);
          end
        end

    // Random, 8 digits, with the locality check.
    for (int t = 0; t < 20000; t++) begin
      int j;
      sub8 = $urandom_range(1);
      xv = 0; yv = 0;
      for (int k = 0; k < N8; k++) begin
        x8[k] = rnd_digit(); y8[k] = rnd_digit();
        xv += dec(x8[k]) << k; yv += dec(y8[k]) << k;
      end
      #1;
      zv = 0; bad = 0;
      for (int k = 0; k <= N8; k++) begin
        zv += dec(z8[k]) << k;
        if (z8[k] == 2'b11) bad = 1;
        z_ref[k] = z8[k];
      end
      checks++;
      if (bad || zv != (sub8 ? xv - yv : xv + yv)) begin
        failures++;
        if (failures < 10)
          $display("FAIL N=8 sub=%0d x=%0d y=%0d z=%0d", sub8, xv, yv, zv);
      end
      // Change one digit of x and look at which result digits move.
      j = $urandom_range(N8 - 1);
      x8[j] = enc((dec(x8[j]) + 2) % 3 - 1);
      #1;
      bad = 0;
      for (int k = 0; k <= N8; k++)
        if ((k < j || k > j + 2) && z8[k] != z_ref[k]) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (failures < 10) $display("FAIL locality: digit %0d changed a far result digit", j);
      end
    end

    // Redundant spellings of -3 (most significant digit first in the strings).
    begin
      int sp [5][4] = '{'{0, 0, -1, -1}, '{0, -1, 0, 1}, '{0, -1, 1, -1},
                        '{-1, 1, 0, 1}, '{-1, 1, 1, -1}};
      for (int r = 0; r < 5; r++)
        for (int m = 0; m < 2; m++) begin
          for (int k = 0; k < N4; k++) begin
            y4[k] = enc(sp[r][N4-1-k]);                 // -3, spelling r
            x4[k] = enc(k < 2 ? (m ? -1 : 1) : 0);     // +3 or -3 as 0011 / 00(-1)(-1)
          end
          sub4 = m[0];
          #1;
          zv = 0;
          for (int k = 0; k <= N4; k++) zv += dec(z4[k]) << k;
          checks++;
          if (zv != 0) begin
            failures++;
            $display("FAIL spelling %0d of -3, sub=%0d: z=%0d", r, m, zv);
          end
        end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
