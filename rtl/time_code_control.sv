// Time code control: writes the time of day on the strip chart every two minutes.
//
// At every even two-minute mark (even minute, zero seconds) the hours and minutes
// are transferred into the fourteen-stage time code shift register: two bits of tens
// of hours (they can only be 0, 1 or 2) and four bits each of units of hours, tens of
// minutes and units of minutes, tens of hours first. Every four seconds the last
// stage is sampled: a 1 deflects the marker pen for two seconds, a 0 gives only a
// short blip. One second after each sample the register is shifted. The fourteen
// bits take 14 x 4 = 56 s; after them only zero blips follow, and a ten-second long
// dash fills the last ten seconds of the interval, its end marking the next
// two-minute mark.
//
// Interface: p1 and p10 are the clock's 1 PPS and 10 PPS strobes, the digits its
// BCD time of day. pen is the level that drives the pen relay. Timing: the position
// inside the two-minute interval is read from the time digits one clock after each
// second pulse (when they have been updated). The pen-on times are counted in
// 10 PPS pulses: 20 for a one, BLIP_TICKS for a zero.
//
// From the document: the even-two-minute sampling, fourteen bits, 4 s per bit, 2 s
// deflection for a one, momentary deflection for a zero, 10 s long dash ending at
// the two-minute mark. This design's own: the bit order (most significant first),
// the blip length (one 10 PPS period), the shift one second after each sample.
module time_code_control
  import magdas_pkg::*;
#(
  parameter int unsigned BLIP_TICKS = 1,   // 10 PPS periods of a zero blip
  parameter int unsigned ONE_TICKS  = 20   // 10 PPS periods of a one (2 s)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic p1,
  input  logic p10,
  input  bcd_t min_u, min_t, hr_u, hr_t, sec_u, sec_t,
  output logic pen,
  output logic [13:0] sr_q,
  output logic sample,       // strobe: a bit has been sampled
  output logic sample_bit    // the bit sampled (valid with sample)
);
  logic p1_d;
  logic [6:0] pos;          // 0..119 s inside the two-minute interval
  logic load, shift;
  logic q_last;
  logic [4:0] pen_cnt;      // remaining 10 PPS periods of deflection
  logic dash;

  always_comb pos = (min_u[0] ? 7'd60 : 7'd0) + 7'(sec_t) * 7'd10 + 7'(sec_u);

  assign load  = p1_d && (pos == 7'd0);
  assign shift = p1_d && (pos[1:0] == 2'd1) && (pos <= 7'd109);
  // sample one clock after the load so the loaded value is seen
  logic load_d, tick4;
  assign tick4 = p1_d && (pos[1:0] == 2'd0) && (pos != 7'd0) && (pos <= 7'd108);
  assign sample     = load_d || tick4;
  assign sample_bit = q_last;
  assign dash = (pos >= 7'd110);

  time_code_sr #(.BITS(14)) u_sr (
    .clk, .rst_n, .load, .shift,
    .d({hr_t[1:0], hr_u, min_t, min_u}),
    .q(sr_q), .q_last
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p1_d <= 1'b0; load_d <= 1'b0; pen_cnt <= '0;
    end else begin
      p1_d   <= p1;
      load_d <= load;
      if (sample)                    pen_cnt <= q_last ? 5'(ONE_TICKS) : 5'(BLIP_TICKS);
      else if (p10 && pen_cnt != '0) pen_cnt <= pen_cnt - 5'd1;
    end
  end

  assign pen = dash || (pen_cnt != '0);
endmodule
