// Shaft position decoder: Datex contacts to five 8-4-2-1 digits.
//
// The shaft position encoder closes twenty brush contacts t1..t20, four per decimal
// digit (t1-t4 for 10^0, t5-t8 for 10^1, ... t17-t20 for 10^4). Each digit is in a
// unit-distance code in which one contact changes per step; with A = t(4k+4),
// B = t(4k+3), C = t(4k+2), D = t(4k+1) the digits 0..9 read
//   0001 0011 0010 0110 0100 1100 1110 1010 1011 1001 (ABCD).
// The 8-4-2-1 value is
//   1 = A(C' + B'D') + A'C(B + D),  2 = CD',  4 = AD' + BC',  8 = AD.
// Within one disc a lower decade runs backwards (reads 9 - d) while the decade above
// it is odd, so 10 reads as 19, 11 as 18 and so on. Backwards reading only flips the
// A contact, so the correction replaces A with A xor R, where R is the "1" bit of
// the corrected digit above (t4R, t8R, t16R). The top decade of each disc (10^2 on
// the inner disc, 10^4 on the outer one) is never reflected and is decoded directly;
// the correction then ripples down 10^2 -> 10^1 -> 10^0 and 10^4 -> 10^3.
//
// The decoded digits are copied into memory automatically every AUTO_DIV clocks
// (about 100,000 times a second at 1 MHz) or, in manual mode, only when the
// navigator presses the sample button (used while a receiver is being tuned).
//
// Timing: word changes on the clock edge of a sample; sampled pulses with it.
//
// From the document: the contact numbering, the equations, the reflection rule and
// its correction, the unreflected t12 and t20, the two sampling modes and the
// ~100 kHz automatic rate. This design's own: chaining the reflection bit from the
// corrected (not raw) upper digit, and the exact automatic period.
module datex_decoder
  import magdas_pkg::*;
#(
  parameter int unsigned AUTO_DIV = 10
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [20:1] t,          // brush contacts, 1 = closed
  input  logic       auto_mode,  // SWB-1/3: 1 = automatic, 0 = manual
  input  logic       sample_btn, // navigator's button
  output gate_word_t word,       // five digits, 10^0 in bits 3:0
  output logic       sampled
);
  function automatic bcd_t decode(input logic a, b, c, d);
    bcd_t v;
    v[0] = (a & (~c | (~b & ~d))) | (~a & c & (b | d));
    v[1] = c & ~d;
    v[2] = (a & ~d) | (b & ~c);
    v[3] = a & d;
    return v;
  endfunction

  bcd_t d0, d1, d2, d3, d4;
  always_comb begin
    d2 = decode(t[12], t[11], t[10], t[9]);
    d1 = decode(t[8] ^ d2[0], t[7], t[6], t[5]);
    d0 = decode(t[4] ^ d1[0], t[3], t[2], t[1]);
    d4 = decode(t[20], t[19], t[18], t[17]);
    d3 = decode(t[16] ^ d4[0], t[15], t[14], t[13]);
  end

  logic [$clog2(AUTO_DIV+1)-1:0] div;
  logic take;
  assign take = auto_mode ? (32'(div) == AUTO_DIV - 1) : sample_btn;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      div <= '0; word <= '0; sampled <= 1'b0;
    end else begin
      sampled <= take;
      div <= (32'(div) == AUTO_DIV - 1) ? '0 : div + 1'b1;
      if (take) word <= {d4, d3, d2, d1, d0};
    end
  end
endmodule
