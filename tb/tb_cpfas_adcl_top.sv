// tb_cpfas_adcl_top: end-to-end test of the adder/subtractor at its default
// size (4 digits, 9 delta_phi), no parameter overrides.
//
// After reset, a new operand pair and mode is applied on every clk edge: all
// 81 x 81 four-digit operand pairs in add mode, then again in subtract mode,
// in a shuffled order, followed by idle (all-zero) edges to drain the delay.
// Every result is checked as a value against integer arithmetic on the
// operand digits, exactly PROP_DELAY edges after its operands. The exact
// latency is also probed once: a single non-zero operation after a run of
// zeros must leave z at zero for 8 edges and show the result on the 9th.
//
// The testbench classifies, independently of the design, what each digit
// position exercises - the seven operand-pair rows of the addition table,
// with both branches (lower digits non-negative or not) of the two
// ambiguous rows, and the final-sum cancellation of +1 against -1 - and
// counts a failure for any that never occurred.
module tb_cpfas_adcl_top;
  import sd_pkg::*;

  localparam int N = 4;
  localparam int D = 9;

  int checks = 0, failures = 0;

  logic      clk = 1'b0, rst_n = 1'b0, sub = 1'b0;
  sd_digit_t x [N], y [N], z [N+1];

  cpfas_adcl_top dut (.*);

  always #5 clk = ~clk;

  // Expected values, one per applied operation, oldest first.
  int expq [$];

  // Mechanism counters.
  int n_add = 0, n_sub = 0;
  int n_row_a = 0, n_row_b_nn = 0, n_row_b_ot = 0, n_row_cd = 0, n_row_e = 0;
  int n_row_f_nn = 0, n_row_f_ot = 0, n_row_g = 0;
  int n_cancel = 0;
  int n_latency = 0;

  function automatic sd_digit_t enc(int v);
    return (v > 0) ? 2'b10 : (v < 0) ? 2'b01 : 2'b00;
  endfunction

  function automatic int dec(sd_digit_t d);
    return int'(d[1]) - int'(d[0]);
  endfunction

  function automatic int zval();
    int v = 0;
    for (int k = 0; k <= N; k++) v += dec(z[k]) << k;
    return v;
  endfunction

  // Classify one operation's digit positions (operand digits as integers,
  // subtrahend already negated).
  function automatic void classify(int xd [N], int yd [N]);
    int c_prev = 0;
    for (int k = 0; k < N; k++) begin
      bit nn = (k == 0) || (xd[k-1] >= 0 && yd[k-1] >= 0);
      int c, s;
      case (xd[k] + yd[k])
        -2: begin n_row_a++; c = -1; s = 0; end
        -1: if (nn) begin n_row_b_nn++; c = 0; s = -1; end
            else begin n_row_b_ot++; c = -1; s = 1; end
         0: begin
              if (xd[k] == 0) n_row_e++; else n_row_cd++;
              c = 0; s = 0;
            end
         1: if (nn) begin n_row_f_nn++; c = 1; s = -1; end
            else begin n_row_f_ot++; c = 0; s = 1; end
        default: begin n_row_g++; c = 1; s = 0; end
      endcase
      if (s != 0 && s == -c_prev) n_cancel++;
      c_prev = c;
    end
  endfunction

  task automatic apply(int a, int b, bit m);
    int xd [N], yd [N];
    int xv = 0, yv = 0;
    for (int k = 0; k < N; k++) begin
      xd[k] = a % 3 - 1; yd[k] = b % 3 - 1;
      a /= 3; b /= 3;
      x[k] = enc(xd[k]); y[k] = enc(yd[k]);
      xv += xd[k] << k; yv += yd[k] << k;
      if (m) yd[k] = -yd[k];
    end
    sub = m;
    classify(xd, yd);
    if (m) n_sub++; else n_add++;
    expq.push_back(m ? xv - yv : xv + yv);
  endtask

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [$];
    for (int k = 0; k < N; k++) begin x[k] = SD_ZERO; y[k] = SD_ZERO; end
    repeat (3) @(negedge clk);
    checks++;
    if (zval() != 0) begin failures++; $display("FAIL reset value"); end
    rst_n = 1'b1;

    // Latency probe: zeros are already applied; apply 1 + 1 for one edge.
    @(negedge clk);
    x[0] = SD_ONE; y[0] = SD_ONE; sub = 1'b0;
    @(negedge clk);
    x[0] = SD_ZERO; y[0] = SD_ZERO;
    begin
      int seen_at;
      seen_at = -1;
      for (int e = 1; e <= D + 2; e++) begin
        if (zval() == 2 && seen_at < 0) seen_at = e;
        @(negedge clk);
      end
      checks++;
      if (seen_at != D) begin
        failures++;
        $display("FAIL latency: result after %0d edges, expected %0d", seen_at, D);
      end else n_latency++;
    end

    // Full sweep, one operation per edge.
    for (int i = 0; i < 2 * 81 * 81; i++) order.push_back(i);
    order.shuffle();
    foreach (order[i]) begin
      int op;
      op = order[i];
      apply(op % 81, (op / 81) % 81, op >= 81 * 81);
      @(negedge clk);
      if (expq.size() >= D) begin
        int e;
        e = expq.pop_front();
        checks++;
        if (zval() != e) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d: z=%0d expected %0d", i, zval(), e);
        end
      end
    end
    // Drain: idle operands while the last D-1 results come out.
    for (int k = 0; k < N; k++) begin x[k] = SD_ZERO; y[k] = SD_ZERO; end
    sub = 1'b0;
    while (expq.size() > 0) begin
      int e;
      @(negedge clk);
      e = expq.pop_front();
      checks++;
      if (zval() != e) begin failures++; $display("FAIL drain: z=%0d expected %0d", zval(), e); end
    end

    $display("mechanisms: add=%0d sub=%0d row_a=%0d row_b_nonneg=%0d row_b_other=%0d row_cd=%0d row_e=%0d row_f_nonneg=%0d row_f_other=%0d row_g=%0d cancel=%0d latency=%0d",
             n_add, n_sub, n_row_a, n_row_b_nn, n_row_b_ot, n_row_cd, n_row_e,
             n_row_f_nn, n_row_f_ot, n_row_g, n_cancel, n_latency);
    if (n_add == 0)      begin failures++; $display("FAIL never: add"); end
    if (n_sub == 0)      begin failures++; $display("FAIL never: sub"); end
    if (n_row_a == 0)    begin failures++; $display("FAIL never: row a"); end
    if (n_row_b_nn == 0) begin failures++; $display("FAIL never: row b nonneg"); end
    if (n_row_b_ot == 0) begin failures++; $display("FAIL never: row b other"); end
    if (n_row_cd == 0)   begin failures++; $display("FAIL never: row c/d"); end
    if (n_row_e == 0)    begin failures++; $display("FAIL never: row e"); end
    if (n_row_f_nn == 0) begin failures++; $display("FAIL never: row f nonneg"); end
    if (n_row_f_ot == 0) begin failures++; $display("FAIL never: row f other"); end
    if (n_row_g == 0)    begin failures++; $display("FAIL never: row g"); end
    if (n_cancel == 0)   begin failures++; $display("FAIL never: cancel"); end
    if (n_latency == 0)  begin failures++; $display("FAIL never: latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
