// Tape monitor shift register control: rebuilds the recorded words from read-back.
//
// The recorder reads every character back right after writing it and signals
// "flux check complete". Each such pulse (1) copies the character's four data bits
// and its B-track bit into the buffer memory, (2) one cycle later, if the buffered
// character is a gate identifier (B bit set) equal to the gate chosen on the monitor
// selector, emits the sample pulse for the tape-monitor D/A converter and printer,
// which then read the five digits now assembled in the register, and (3) one cycle
// after that shifts the buffered character into the top of the tape-monitor shift
// register. The identifier itself thus enters the register only after the sample.
//
// Timing: buffer at fcc+1, sample at fcc+2, shift at fcc+3 clock edges. A new
// flux-check pulse must not arrive within three cycles of the last.
//
// From the document: the buffer memory, the delayed shift so the register can be
// read before the new character enters, the sample on the character carrying the B
// bit whose value matches the gate decoder. This design's own: the cycle counts.
module tape_monitor_control #(
  parameter int unsigned WORDS = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               fcc,        // flux check complete
  input  logic [3:0]         rd_char,    // 8-4-2-1 tracks read back
  input  logic               rd_b,       // B track read back
  input  logic [3:0]         gate_sel,   // gate being monitored
  output logic [4*WORDS-1:0] sr_q,
  output logic               sample
);
  logic [3:0] buf_char;
  logic       buf_b;
  logic       fcc_d1, fcc_d2;
  logic [3:0] unused_rec;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_char <= '0; buf_b <= 1'b0; fcc_d1 <= 1'b0; fcc_d2 <= 1'b0; sample <= 1'b0;
    end else begin
      fcc_d1 <= fcc;
      fcc_d2 <= fcc_d1;
      sample <= fcc_d1 && buf_b && (buf_char == gate_sel);
      if (fcc) begin
        buf_char <= rd_char;
        buf_b    <= rd_b;
      end
    end
  end

  data_shift_register #(.WORDS(WORDS)) u_sr (
    .clk, .rst_n,
    .load(1'b0), .shift(fcc_d2), .d('0), .top_in(buf_char),
    .q(sr_q), .rec_out(unused_rec)
  );

  always_ff @(posedge clk) if (rst_n) assert (!(fcc && (fcc_d1 || fcc_d2)));
endmodule
