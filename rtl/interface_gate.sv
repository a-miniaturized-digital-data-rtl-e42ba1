// Interface gate card: one of the sixteen data sources' doors to the shift register.
//
// The gate card holds its source's 20 data bits back from the shift-register bus
// except during its own Transfer pulse: outside that pulse its outputs are all
// zero, so the sixteen cards can be OR-ed onto one bus (the original used diodes).
// Each card also holds a Test flip-flop. The source's request pulse sets it (for
// gates 0 and 1 that is the inter-record-gap pulse, so they are read once per data
// block); the end of the card's Transfer pulse clears it, so the gate is not read
// again until the next request.
//
// Timing: bus_out follows transfer combinationally; test_ff is cleared on the clock
// edge of the transfer strobe. A request arriving in the same cycle wins.
//
// From the document: the zero outputs between transfers, one card at a time, the
// Test flip-flop set by the request and cleared after the transfer. This design's
// own: the request-wins priority.
module interface_gate
  import magdas_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  gate_word_t data,
  input  logic       transfer,   // this gate's Transfer pulse from the PTU decoder
  input  logic       test_set,   // request from the source
  output gate_word_t bus_out,
  output logic       test_ff
);
  always_ff @(posedge clk) begin
    if (!rst_n)        test_ff <= 1'b0;
    else if (test_set) test_ff <= 1'b1;
    else if (transfer) test_ff <= 1'b0;
  end
  assign bus_out = transfer ? data : '0;
endmodule
