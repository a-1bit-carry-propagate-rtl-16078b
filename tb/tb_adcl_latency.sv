// tb_adcl_latency: self-checking test of the delta_phi delay chain.
//
// Drives a fresh random word on every clock edge into a 9-stage instance
// (default) and a 1-stage instance, and checks that each appears exactly DELAY
// edges later, never earlier: the output one edge before the expected one
// must still hold the previous word. Also checks that reset clears the chain.
module tb_adcl_latency;
  int checks = 0, failures = 0;

  localparam int W = 10;
  localparam int D = 9;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d, q9, q1;
  logic [W-1:0] hist [$];

  adcl_latency u9 (.clk(clk), .rst_n(rst_n), .d(d), .q(q9));
  adcl_latency #(.WIDTH(W), .DELAY(1)) u1 (.clk(clk), .rst_n(rst_n), .d(d), .q(q1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (q9 != '0 || q1 != '0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      d = W'($urandom);
      @(posedge clk);
      hist.push_back(d);
      #1;
      // hist[$] entered on this edge; q1 shows it, q9 shows the word from D-1 pushes back.
      checks++;
      if (q1 != hist[$]) begin failures++; $display("FAIL q1 t=%0d", t); end
      if (hist.size() >= D) begin
        checks++;
        if (q9 != hist[hist.size() - D]) begin
          failures++;
          if (failures < 10) $display("FAIL q9 t=%0d", t);
        end
      end else begin
        checks++;
        if (q9 != '0) begin failures++; $display("FAIL q9 early t=%0d", t); end
      end
    end
    rst_n = 1'b0;
    #1;
    checks++;
    if (q9 != '0 || q1 != '0) begin failures++; $display("FAIL async reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
