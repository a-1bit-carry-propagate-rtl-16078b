// cpfas_adcl_top: N-digit carry propagate free adder/subtractor with the
// timing of its adiabatic (ADCL) realisation.
//
// The arithmetic is cpfas_nbit: redundant-binary (signed-digit) addition or
// subtraction in two carry-free steps per digit, built from N 1bit slices.
// Because no carry ripples, the result is ready after the same constant delay
// for any N. The ADCL circuits deliver a result a fixed number of
// half-periods of their supply (delta_phi) after the operands; adcl_latency
// reproduces that: z shows the result of the operands presented PROP_DELAY
// clk edges before. The defaults, 4 digits and 9 delta_phi, are the 4-digit
// adder/subtractor and its maximum delay from the paper's comparison. Taking
// clk as one edge per delta_phi, and resetting the delay chain to zero, are
// this design's choices.
//
// Interface: clk (one rising edge per delta_phi), rst_n (asynchronous, active
// low), sub (0 add, 1 subtract), x and y (N two-rail digits, index = weight
// exponent), z (N+1 two-rail digits). New operands may be applied on every
// clk edge; the result of each appears PROP_DELAY edges later.
module cpfas_adcl_top
  import sd_pkg::*;
#(
  parameter int unsigned N          = 4, // operand digits
  parameter int unsigned PROP_DELAY = 9  // result delay in delta_phi
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      sub,
  input  sd_digit_t x [N],
  input  sd_digit_t y [N],
  output sd_digit_t z [N+1]
);

  localparam int unsigned ZW = 2 * (N + 1);

  sd_digit_t        z_now [N+1];
  logic [ZW-1:0]    z_now_bits, z_late_bits;

  cpfas_nbit #(.N(N)) u_cpfas (
    .sub(sub),
    .x  (x),
    .y  (y),
    .z  (z_now)
  );

  always_comb begin
    for (int k = 0; k <= int'(N); k++) begin
      z_now_bits[2*k +: 2] = z_now[k];
    end
  end

  adcl_latency #(.WIDTH(ZW), .DELAY(PROP_DELAY)) u_latency (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (z_now_bits),
    .q    (z_late_bits)
  );

  always_comb begin
    for (int k = 0; k <= int'(N); k++) begin
      z[k] = z_late_bits[2*k +: 2];
    end
  end

  // The adder never emits the unused digit code (both rails high). Checked
  // only out of reset: before the first reset the chain holds no result.
  for (genvar k = 0; k <= int'(N); k++) begin : g_chk
    a_legal_digit : assert property (@(posedge clk) disable iff (!rst_n)
      !(z[k].pos && z[k].neg));
  end

endmodule
