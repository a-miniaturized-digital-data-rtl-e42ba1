// High speed counter: one of the three identical frequency counters.
//
// Combines the control card (hs_counter_control) with the counting decades and their
// memory (hs_counter_decades). The initiate (reset interval) switch chooses what
// starts a measurement: the clock's 2 PPS or 1 PPS, a free-running multivibrator,
// every rate-of-scan pulse (the mode used when the counter's data are recorded, so
// that sampling follows the recorder), or only the manual button, which starts a
// measurement in every position. The eight-digit result is offered to two interface
// gates: the less significant gate carries digits 10^0..10^4, the more significant
// one digits 10^5..10^7 in its low twelve bits.
//
// Timing: see the two sub-blocks; new_count pulses when the memory has been updated.
// clear (measurement started) and xfer (count gate closed) are the control card's
// strobes, brought out for monitoring.
//
// From the document: the initiate sources and manual button, LSD and MSD gates per
// counter. This design's own: the split of the eight digits between the two gates.
module hs_counter
  import magdas_pkg::*;
#(
  parameter int unsigned CYC_PER_MS = 1_000   // 1 MHz standard: 1000 cycles per ms
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        sig_clk,
  input  init_src_e   init_src,
  input  count_time_e count_time,
  input  logic        p2,
  input  logic        p1,
  input  logic        free_pulse,
  input  logic        scan_pulse,
  input  logic        manual_btn,
  output logic [31:0] count_q,
  output gate_word_t  lsd_word,
  output gate_word_t  msd_word,
  output logic        gate,
  output logic        clear,
  output logic        xfer,
  output logic        busy,
  output logic        new_count
);
  logic initiate;

  always_comb begin
    unique case (init_src)
      INIT_HALF_SEC: initiate = p2;
      INIT_ONE_SEC:  initiate = p1;
      INIT_FREE:     initiate = free_pulse;
      INIT_SCAN:     initiate = scan_pulse;
      default:       initiate = 1'b0;
    endcase
    initiate = initiate || manual_btn;
  end

  hs_counter_control #(.CYC_PER_MS(CYC_PER_MS)) u_ctl (
    .clk, .rst_n, .initiate, .count_time, .clear, .gate, .xfer, .busy
  );

  hs_counter_decades #(.DIGITS(8)) u_dec (
    .clk, .rst_n, .sig_clk, .gate, .count_q, .new_count
  );

  assign lsd_word = count_q[19:0];
  assign msd_word = {8'h00, count_q[31:20]};
endmodule
