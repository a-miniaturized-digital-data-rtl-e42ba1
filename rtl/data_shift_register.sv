// Data shift register: assembles a gate's word for the recorder, four bits at a time.
//
// The register is WORDS groups of four stages. Group 0 (Q1..Q4) is the recording
// position, whose four bits the recorder writes on each Strobe. A Transfer loads all
// groups in parallel; each Shift moves every group one place towards the recording
// position and enters top_in into the highest group.
//
// As the direct-monitor register (WORDS = 6) it is loaded with the 20 data bits of
// the gate being read (digit 10^0 in group 0) and the gate number from counter B
// in group 5; the transfer and four shifts bring the five digits to the recording
// position and a fifth shift brings the gate number there, tagging the word. Zeros
// enter from the top. As the tape-monitor register (WORDS = 5) it is never loaded
// in parallel: each character read back from tape enters at the top, so after five
// characters the word recorded last is reassembled in the same order.
//
// Timing: load and shift act on the clock edge of their strobe; load wins.
//
// From the document: 20 bits plus the B-counter bits B1..B4 in the direct monitor
// register, four bits moved per Shift, one Transfer and five Shifts per gate, four
// bits entering at a time in the tape monitor register. This design's own: which
// end holds digit 10^0 (the least significant digit is recorded first) and the
// zeros entering the direct-monitor register.
module data_shift_register #(
  parameter int unsigned WORDS = 6
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic               shift,
  input  logic [4*WORDS-1:0] d,
  input  logic [3:0]         top_in,
  output logic [4*WORDS-1:0] q,
  output logic [3:0]         rec_out    // recording position Q1..Q4
);
  always_ff @(posedge clk) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= {top_in, q[4*WORDS-1:4]};
  end
  assign rec_out = q[3:0];
endmodule
