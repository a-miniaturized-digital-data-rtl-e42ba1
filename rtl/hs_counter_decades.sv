// High speed counter input section and memory: eight BCD decades.
//
// The measured signal (up to about 30 MHz) clocks the counting decades directly.
// The count gate from the control card, timed on the 1 MHz standard, is brought into
// the signal's clock domain through two flip-flops. When the synchronised gate opens
// the decades are cleared, and they count every signal edge while it stays open.
// When it closes, the count is copied into a holding register and a toggle flag
// tells the 1 MHz side, which (after its own two-flip-flop synchroniser) copies the
// held count into the display memory (the 959 memories) and pulses new_count. The
// memory keeps the last complete count while the next one is being made.
//
// Interface: count_q holds eight digits, digit 10^0 in bits 3:0. Timing: the count
// covers the signal edges seen while the synchronised gate is high, i.e. the gate
// delayed by two signal periods; the memory updates about two clk cycles after the
// signal-side copy. The signal must keep running while the gate closes.
//
// From the document: eight nixie decades (10^0..10^7), a gated input, memory that
// keeps the last count during the next. This design's own: clearing the decades
// when the gate opens rather than at initiate, and the clock-domain crossing.
module hs_counter_decades
  import magdas_pkg::*;
#(
  parameter int unsigned DIGITS = 8
) (
  input  logic                clk,      // 1 MHz standard
  input  logic                rst_n,
  input  logic                sig_clk,  // measured signal
  input  logic                gate,     // count gate (clk domain)
  output logic [4*DIGITS-1:0] count_q,  // memory
  output logic                new_count
);
  // ---- signal domain ----
  logic g_s1, g_s2, g_s3;
  logic [4*DIGITS-1:0] dec, hold;
  logic done_tgl;
  logic [DIGITS:0] carry;

  assign carry[0] = 1'b1;
  for (genvar i = 0; i < DIGITS; i++) begin : g_carry
    assign carry[i+1] = carry[i] && (dec[4*i +: 4] == 4'd9);
  end

  always_ff @(posedge sig_clk) begin
    if (!rst_n) begin
      g_s1 <= 1'b0; g_s2 <= 1'b0; g_s3 <= 1'b0;
      dec <= '0; hold <= '0; done_tgl <= 1'b0;
    end else begin
      g_s1 <= gate;
      g_s2 <= g_s1;
      g_s3 <= g_s2;
      if (g_s2 && !g_s3) begin
        dec <= '0;
        dec[3:0] <= 4'd1;            // the edge that sees the gate open counts
      end else if (g_s2) begin
        for (int i = 0; i < DIGITS; i++)
          if (carry[i]) dec[4*i +: 4] <= (dec[4*i +: 4] == 4'd9) ? 4'd0 : dec[4*i +: 4] + 4'd1;
      end else if (g_s3) begin       // gate has just closed
        hold     <= dec;
        done_tgl <= ~done_tgl;
      end
    end
  end

  // ---- 1 MHz domain ----
  logic t_s1, t_s2, t_s3;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t_s1 <= 1'b0; t_s2 <= 1'b0; t_s3 <= 1'b0; count_q <= '0; new_count <= 1'b0;
    end else begin
      t_s1 <= done_tgl;
      t_s2 <= t_s1;
      t_s3 <= t_s2;
      new_count <= (t_s2 != t_s3);
      if (t_s2 != t_s3) count_q <= hold;
    end
  end
endmodule
