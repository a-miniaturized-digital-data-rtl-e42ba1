// Magnetic tape recorder pulse sequence timer (master recorder control, card A6).
//
// Steps the recording of one scan of the sixteen interface gates. Counter B holds
// the number of the gate being dealt with; counter A counts the recording-rate
// (RR) pulses spent on it. A rate-of-scan pulse (ignored while the recorder writes
// an inter-record gap) clears both counters and opens the scan. On each RR pulse:
//  * if the gate is not yet open and the Test line allows it, the gate opens,
//    counter A goes to 1 and a Transfer loads the gate's 20 bits and its number
//    into the shift register;
//  * if the gate is not open and the Ignore line is raised, an End-of-Gate (EOG)
//    is produced at once and the gate is skipped (one RR pulse per skipped gate);
//  * if neither (a gate that waits for its Test flip-flop), nothing happens;
//  * if the gate is open, counter A advances: states 2..5 give a Shift that brings
//    the next four data bits to the recording position, state 6 a fifth Shift that
//    brings the gate number there, followed by EOG.
// Every Transfer or Shift is followed one cycle later by a Strobe that makes the
// recorder write the four bits; the strobe of state 6 is flagged as the gate
// identifier character. EOG clears counter A, closes the gate and advances counter
// B; the EOG of gate 15 ends the scan.
//
// Timing: transfer/shift are registered one cycle after the RR pulse, strobe one
// cycle after them, EOG in the cycle of the last strobe (or one cycle after the RR
// pulse for an ignored gate). A read gate therefore takes six RR pulses and six
// strobes, an ignored one a single RR pulse.
//
// From the document (Tables II and III): counter states 1 = Transfer, 2..6 = Shift,
// the sixth RR pulse forming EOG, the B counter counting gates 0..15, the Strobe
// delayed after Transfer/Shift, scan pulses blocked during the inter-record gap.
// This design's own: one-cycle delays in place of the one-shot delays, and treating
// the RR pulse that opens the gate as the one that enters counter A.
module pulse_sequence_timer (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scan_pulse,
  input  logic       irg_busy,
  input  logic       rr_pulse,
  input  logic       test_ok,    // Test line: current gate may be read
  input  logic       ignore,     // Ignore line: current gate is to be skipped
  output logic [2:0] cnt_a,
  output logic [3:0] cnt_b,
  output logic       scan_active,
  output logic       gate_open,
  output logic       transfer,
  output logic       shift,
  output logic       strobe,
  output logic       id_char,    // the strobed character is the gate identifier
  output logic       eog,
  output logic       eog_last    // EOG of gate 15
);
  logic last_char;     // state 6 reached, EOG follows with its strobe

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt_a <= '0; cnt_b <= '0; scan_active <= 1'b0; gate_open <= 1'b0;
      transfer <= 1'b0; shift <= 1'b0; strobe <= 1'b0; id_char <= 1'b0;
      eog <= 1'b0; eog_last <= 1'b0; last_char <= 1'b0;
    end else begin
      transfer <= 1'b0; shift <= 1'b0; eog <= 1'b0; eog_last <= 1'b0;
      strobe   <= transfer || shift;
      id_char  <= shift && last_char;
      // EOG with the strobe of the gate identifier
      if (shift && last_char) begin
        last_char <= 1'b0;
        eog       <= 1'b1;
        eog_last  <= (cnt_b == 4'd15);
        cnt_a     <= '0;
        gate_open <= 1'b0;
        cnt_b     <= cnt_b + 4'd1;
        if (cnt_b == 4'd15) scan_active <= 1'b0;
      end else if (scan_pulse && !irg_busy) begin
        scan_active <= 1'b1;
        cnt_a <= '0; cnt_b <= '0; gate_open <= 1'b0; last_char <= 1'b0;
      end else if (rr_pulse && scan_active && !last_char) begin
        if (gate_open) begin
          cnt_a <= cnt_a + 3'd1;
          shift <= 1'b1;
          if (cnt_a == 3'd5) last_char <= 1'b1;
        end else if (test_ok) begin
          gate_open <= 1'b1;
          cnt_a     <= 3'd1;
          transfer  <= 1'b1;
        end else if (ignore) begin
          eog      <= 1'b1;
          eog_last <= (cnt_b == 4'd15);
          cnt_b    <= cnt_b + 4'd1;
          if (cnt_b == 4'd15) scan_active <= 1'b0;
        end
      end
    end
  end

  // Transfer and Shift never coincide; counter A never passes 6.
  always_ff @(posedge clk) if (rst_n) begin
    assert (!(transfer && shift));
    assert (cnt_a <= 3'd6);
  end
endmodule
