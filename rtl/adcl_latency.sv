// adcl_latency: clock-level timing model of the adiabatic (ADCL) realisation.
//
// An ADCL gate's output follows its power-clock supply V_phi and appears half
// a supply period after its input: one delay unit delta_phi = T_phi / 2 per
// gate stage. A circuit of such gates therefore delivers its result a whole
// number of delta_phi after its operands; for the carry propagate free
// adder/subtractor that number is a constant, independent of the word length.
// This module delays a word by DELAY such units: a shift register stepped by
// clk, which is taken to have one rising edge per delta_phi (twice the
// supply frequency). The constant delay of the adder comes from the paper;
// modelling it as a register chain, the clock convention and the reset to 0
// are this design's choices.
//
// Interface: d enters on each rising clk edge; q shows the value that entered
// DELAY edges earlier. An active-low asynchronous reset clears
// the chain. DELAY = 0 makes q = d combinationally.
module adcl_latency #(
  parameter int unsigned WIDTH = 10, // bits carried
  parameter int unsigned DELAY = 9   // stages in delta_phi (CPFA/S: 9)
) (
  input  logic             clk,   // one rising edge per delta_phi
  input  logic             rst_n, // asynchronous, active low
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DELAY == 0) begin : g_none
    assign q = d;
  end else begin : g_chain
    logic [WIDTH-1:0] stage [DELAY];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int k = 0; k < int'(DELAY); k++) stage[k] <= '0;
      end else begin
        stage[0] <= d;
        for (int k = 1; k < int'(DELAY); k++) stage[k] <= stage[k-1];
      end
    end

    assign q = stage[DELAY-1];
  end

endmodule
