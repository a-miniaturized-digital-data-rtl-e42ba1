// Digital voltmeter, ramp-compare converter (digital part).
//
// A start pulse (front-panel button or the multiplexer card) clears the 10-bit
// binary counter, whose outputs drive the switching network and resistor ladder
// that make the ramp voltage: the ramp drops to zero. While the comparators report
// that the ramp is still below the magnitude of the input, every 1 MHz clock adds
// one to the counter, raising the ramp by one step (1 mV after calibration, so a
// count of 1000 is one volt and 1023 is full scale). When the ramp reaches the
// input the comparators stop the count and the count is copied, with the polarity
// comparator's sign, into the display memories. A conversion takes at most 1024
// cycles, about one millisecond.
//
// The count is shown and recorded in octal: the ten bits form four octal digits
// (1 + 3 + 3 + 3 bits), each recorded as an 8-4-2-1 digit whose 8 bit is always 0.
// The recorded 20-bit word is {sign digit, four octal digits}, the sign digit being
// 1 for a negative input and 0 otherwise. If the ramp reaches full scale without
// meeting the input, the count stops at 1023 and overrange is flagged.
//
// Interface: ramp_code goes to the ladder; ramp_reached and vin_neg come from the
// comparators. Timing: done pulses in the cycle after the result registers load.
//
// From the document: 10 binary stages, 1 MHz counting pulses, stop and transfer to
// the 959 memories on the comparator step, octal digits with the 8 bit zero,
// automatic polarity. This design's own: the sign digit in the recorded word and the
// overrange stop.
module dvm_ramp
  import magdas_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       ramp_reached,  // comparator: ramp >= |Vin|
  input  logic       vin_neg,       // polarity comparator: Vin < 0
  output logic [9:0] ramp_code,
  output logic       busy,
  output logic       done,
  output logic [9:0] count,         // last result
  output logic       negative,
  output logic       overrange,
  output gate_word_t word           // {sign, octal 3..0} as 8-4-2-1 digits
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ramp_code <= '0; busy <= 1'b0; done <= 1'b0;
      count <= '0; negative <= 1'b0; overrange <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        ramp_code <= '0;
        busy      <= 1'b1;
      end else if (busy) begin
        if (ramp_reached || ramp_code == 10'h3FF) begin
          busy      <= 1'b0;
          done      <= 1'b1;
          count     <= ramp_code;
          negative  <= vin_neg;
          overrange <= !ramp_reached;
        end else begin
          ramp_code <= ramp_code + 10'd1;
        end
      end
    end
  end

  assign word = {3'b000, negative,
                 3'b000, count[9],
                 1'b0, count[8:6],
                 1'b0, count[5:3],
                 1'b0, count[2:0]};
endmodule
