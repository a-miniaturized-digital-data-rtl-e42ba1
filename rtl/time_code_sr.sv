// Time code shift register (fourteen stages).
//
// Holds the hours and minutes of the digital clock while they are written out, one
// bit at a time, as a coded trace on the strip-chart marker pen. A Transfer strobe
// loads all stages in parallel; each Shift strobe moves every stage one place down
// towards the last stage and enters a zero into the top stage, so that after the
// code has gone out only zeros remain. The last stage (q_last) is the one that is
// sampled.
//
// Interface: d[BITS-1] is loaded into the last stage and is therefore read out
// first; d[0] goes into the top stage. Load wins over shift if both are strobed.
// Timing: loads and shifts take effect at the clock edge of the strobe.
//
// From the document: fourteen stages, parallel load, serial shift towards the
// sampled last stage, zeros from the top. This design's own: the synchronous
// strobes and the load-over-shift priority.
module time_code_sr #(
  parameter int unsigned BITS = 14
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic            shift,
  input  logic [BITS-1:0] d,
  output logic [BITS-1:0] q,      // q[BITS-1] is the last stage
  output logic            q_last
);
  always_ff @(posedge clk) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= d;
    else if (shift) q <= {q[BITS-2:0], 1'b0};
  end
  assign q_last = q[BITS-1];
endmodule
