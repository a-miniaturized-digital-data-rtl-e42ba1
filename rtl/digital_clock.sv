// Digital clock: time of day from the 1 MHz frequency standard.
//
// The 1 MHz standard is divided by PRE_DIV (10) to 100,000 pulses per second. A
// synchronising divider then normally passes 10,000 PPS to the decade countdown
// chain, which produces 1000, 100, 10, 2 and 1 PPS. The 1 PPS "second" pulses step
// a six-digit BCD time-of-day counter HH-MM-SS: tens of seconds and tens of minutes
// are cut short at 6, and the hours return to 00 after 23 so that midnight reads
// 00-00-00.
//
// To bring the second pulses into step with a time signal, the synchronising divider
// takes another ratio while the spring-loaded rate switch is held: ADVANCE gives
// 25,000 (fast) or 12,500 (slow) PPS, RETARD gives 8,333 1/3 (fast) or 6,250 (slow)
// PPS, i.e. 100 kPPS divided by 4, 8, 12 or 16 instead of 10. In set-time mode the
// 1 PPS path to the display counter is opened and the operator feeds it with one of
// the faster rates (10,000 / 1,000 / 100 / 10 / 1 PPS) from the set-time push
// buttons; releasing the mode switch to OPERATE restores the 1 PPS path.
//
// Timing: all outputs are single-cycle strobes or registers on clk. A second pulse
// updates the time registers on the following clock edge; p1min and p10s fire in
// the same cycle as the second pulse that rolls the seconds over. The 20-bit
// camera/gate code is units of hours, tens and units of minutes, tens and units of
// seconds (the lamp groups of the camera data chamber), with the tens-of-seconds
// 8 lamp carrying the manual-frame marker.
//
// From the document: the divide ratios and rates above, the reset points of the
// counters, the lamp groups. This design's own: the switch encodings, the
// synchronous-strobe implementation and the priority of the set-time buttons
// (fastest rate wins when several are held).
module digital_clock
  import magdas_pkg::*;
#(
  parameter int unsigned PRE_DIV = 10  // 1 MHz -> 100 kPPS
) (
  input  logic        clk,
  input  logic        rst_n,
  // synchronisation switches
  input  logic        sw_retard,     // SWA-2: 0 = ADVANCE, 1 = RETARD
  input  logic        sw_fast,       // SWA-3 held at FAST
  input  logic        sw_slow,       // SWA-3 held at SLOW
  // set time of day
  input  logic        set_mode,      // SWA-1: 1 = SET TIME OF DAY, 0 = OPERATE
  input  logic [4:0]  set_rate_btn,  // SWA-4..8: 10k, 1k, 100, 10, 1 PPS into the display
  input  logic        frame_marker,  // manual-frame lamp (tens of seconds "8")
  // timing pulses
  output logic        p100k,
  output logic        p1000,
  output logic        p100,
  output logic        p10,
  output logic        p2,
  output logic        p1,
  output logic        p10s,
  output logic        p1min,
  // time of day
  output bcd_t        sec_u, sec_t, min_u, min_t, hr_u, hr_t,
  output gate_word_t  time20
);

  // ---------------- countdown chain ----------------
  logic [$clog2(PRE_DIV+1)-1:0] pre_cnt;
  logic [4:0] sync_cnt;
  logic [4:0] sync_div;
  logic       p10k;
  logic [3:0] d1k, d100, d10;      // decade dividers
  logic [2:0] d2;                  // /5 : 10 PPS -> 2 PPS
  logic       h1;                  // /2 : 2 PPS -> 1 PPS

  always_comb begin
    if (sw_fast && !sw_slow)      sync_div = sw_retard ? 5'd12 : 5'd4;
    else if (sw_slow && !sw_fast) sync_div = sw_retard ? 5'd16 : 5'd8;
    else                          sync_div = 5'd10;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pre_cnt <= '0; sync_cnt <= '0;
      d1k <= '0; d100 <= '0; d10 <= '0; d2 <= '0; h1 <= 1'b0;
      p100k <= 1'b0; p10k <= 1'b0; p1000 <= 1'b0; p100 <= 1'b0;
      p10 <= 1'b0; p2 <= 1'b0; p1 <= 1'b0;
    end else begin
      p100k <= 1'b0; p10k <= 1'b0; p1000 <= 1'b0; p100 <= 1'b0;
      p10 <= 1'b0; p2 <= 1'b0; p1 <= 1'b0;
      if (32'(pre_cnt) == PRE_DIV - 1) begin
        pre_cnt <= '0;
        p100k   <= 1'b1;
      end else begin
        pre_cnt <= pre_cnt + 1'b1;
      end
      if (p100k) begin
        if (sync_cnt >= sync_div - 5'd1) begin
          sync_cnt <= '0;
          p10k     <= 1'b1;
        end else begin
          sync_cnt <= sync_cnt + 5'd1;
        end
      end
      if (p10k) begin
        d1k   <= (d1k == 4'd9) ? 4'd0 : d1k + 4'd1;
        p1000 <= (d1k == 4'd9);
      end
      if (p1000) begin
        d100 <= (d100 == 4'd9) ? 4'd0 : d100 + 4'd1;
        p100 <= (d100 == 4'd9);
      end
      if (p100) begin
        d10 <= (d10 == 4'd9) ? 4'd0 : d10 + 4'd1;
        p10 <= (d10 == 4'd9);
      end
      if (p10) begin
        d2 <= (d2 == 3'd4) ? 3'd0 : d2 + 3'd1;
        p2 <= (d2 == 3'd4);
      end
      if (p2) begin
        h1 <= ~h1;
        p1 <= h1;
      end
    end
  end

  // ---------------- display counter input ----------------
  logic tick;  // one "second" into the display section
  always_comb begin
    if (!set_mode)            tick = p1;
    else if (set_rate_btn[0]) tick = p10k;
    else if (set_rate_btn[1]) tick = p1000;
    else if (set_rate_btn[2]) tick = p100;
    else if (set_rate_btn[3]) tick = p10;
    else if (set_rate_btn[4]) tick = p1;
    else                      tick = 1'b0;
  end

  // ---------------- time of day ----------------
  logic su_wrap, st_wrap, mu_wrap, mt_wrap, midnight;
  assign su_wrap  = (sec_u == 4'd9);
  assign st_wrap  = su_wrap && (sec_t == 4'd5);
  assign mu_wrap  = st_wrap && (min_u == 4'd9);
  assign mt_wrap  = mu_wrap && (min_t == 4'd5);
  assign midnight = mt_wrap && (hr_t == 4'd2) && (hr_u == 4'd3);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sec_u <= '0; sec_t <= '0; min_u <= '0; min_t <= '0; hr_u <= '0; hr_t <= '0;
    end else if (tick) begin
      sec_u <= su_wrap ? 4'd0 : sec_u + 4'd1;
      if (su_wrap) sec_t <= st_wrap ? 4'd0 : sec_t + 4'd1;
      if (st_wrap) min_u <= mu_wrap ? 4'd0 : min_u + 4'd1;
      if (mu_wrap) min_t <= mt_wrap ? 4'd0 : min_t + 4'd1;
      if (mt_wrap) begin
        if (midnight) begin
          hr_u <= 4'd0;
          hr_t <= 4'd0;
        end else if (hr_u == 4'd9) begin
          hr_u <= 4'd0;
          hr_t <= hr_t + 4'd1;
        end else begin
          hr_u <= hr_u + 4'd1;
        end
      end
    end
  end

  assign p10s  = tick && su_wrap;
  assign p1min = tick && st_wrap;

  assign time20 = {hr_u, min_t, min_u, frame_marker, sec_t[2:0], sec_u};

  // The tens of seconds never reach 8, so the marker lamp has its bit to itself.
  always_ff @(posedge clk) if (rst_n) assert (sec_t <= 4'd5 && min_t <= 4'd5 && hr_t <= 4'd2);

endmodule
