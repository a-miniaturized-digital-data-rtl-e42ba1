// Phase lock tracking filter, digital part: divider chain and phase comparator.
//
// The tracking filter multiplies the 10-80 kHz difference frequency from the mixer
// by 512 (or 256). A voltage-controlled multivibrator runs at 512 (256) times the
// input; this module is the chain of nine divide-by-two stages that brings it back
// down (f2 = f_vcm / 512, or / 256 with div256 set, taking the output one stage
// earlier) and the gate that compares f2 with the squared input f1. The comparator
// output f3 is high only while both f1 and f2 are low, so its pulse width follows
// the phase between them; the analog amplifier and the acquisition one-shot that
// turn f3 into the multivibrator's control voltage are outside.
//
// Interface: vcm_clk is the multivibrator output, f1 the Schmitt-trigger output.
// Timing: f2 toggles on vcm_clk edges; f3 is combinational.
//
// From the document: nine divide-by-two stages (/512), the /256 option, f1 and f2
// compared in a 914 gate to give f3. This design's own: the NOR function for that
// gate (the function of a 914 micrologic module) and a synchronous counter in place
// of the ripple chain.
module pltf_divider #(
  parameter int unsigned STAGES = 9
) (
  input  logic vcm_clk,
  input  logic rst_n,
  input  logic div256,
  input  logic f1,
  output logic f2,
  output logic f3
);
  logic [STAGES-1:0] chain;
  always_ff @(posedge vcm_clk) begin
    if (!rst_n) chain <= '0;
    else        chain <= chain + 1'b1;
  end
  assign f2 = div256 ? chain[STAGES-2] : chain[STAGES-1];
  assign f3 = ~(f1 | f2);
endmodule
