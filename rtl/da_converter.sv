// Digital to analog monitor converter (digital part).
//
// Lets the operator watch on a strip chart any two adjacent decimal digits of a
// 20-bit shift-register word. On the read pulse the two digits chosen by the range
// switch are copied into two 4-bit memories (the 959 buffers); the lower one drives
// the 10^0 weight of the resistor ladder and the upper one the 10^1 weight. The
// ladder output spans 0-99, 0-990, 0-9,900 or 0-99,000 units for range positions
// 1 to 4 (range = 0..3 here): position p picks digits p-1 and p of the word.
//
// level is the number the ladder represents, (10*hi + lo) * 10^range, which an
// analog stage scales to volts; the resistor network and the analog switches are
// outside this module.
//
// Timing: lo, hi and level change on the clock edge of the read pulse.
//
// From the document: two adjacent groups of four bits, latched into 959 memories,
// the four ranges. This design's own: giving the ladder's value as a number.
module da_converter
  import magdas_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  gate_word_t  word,       // five BCD digits, digit 10^0 in bits 3:0
  input  logic        read,       // D/A READ or tape monitor sample pulse
  input  logic [1:0]  range,      // range switch position - 1
  output bcd_t        lo,
  output bcd_t        hi,
  output logic [16:0] level
);
  logic [1:0] rng_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lo <= '0; hi <= '0; rng_q <= '0;
    end else if (read) begin
      lo    <= word[4*range +: 4];
      hi    <= word[4*range + 4 +: 4];
      rng_q <= range;
    end
  end

  logic [16:0] pair;
  assign pair = 17'(hi) * 17'd10 + 17'(lo);
  always_comb begin
    unique case (rng_q)
      2'd0: level = pair;
      2'd1: level = pair * 17'd10;
      2'd2: level = pair * 17'd100;
      default: level = pair * 17'd1000;
    endcase
  end
endmodule
