// High speed counter control card: times the counting interval.
//
// An initiate pulse clears the timing and main counters and starts the timing
// counter on the 1 MHz standard. The timing counter is a chain of decades: a
// divide-by-CYC_PER_MS stage gives one tick per millisecond, and four decades after
// it give taps at 1 ms, 10 ms, 100 ms, 1 s and 10 s. The first 100 ms tap ends the
// wait that lets input transients die away: the timing counter is cleared and the
// count gate opens. The gate closes at the tap chosen by the count-time switch
// (0.001, 0.01, 0.1, 1 or 10 s); for 0.2 s a divide-by-two stage, toggled by the
// 100 ms tap only while the gate is open, closes it at every second toggle. When the
// gate closes a transfer request moves the main counter's result into its memory,
// and the previous result stays on display and available for recording until then.
// An initiate pulse while waiting restarts the wait; one that arrives while the gate
// is open is ignored, so that a count is never cut short.
//
// Interface: clear is a one-cycle pulse at initiate; gate is high for exactly the
// count time; xfer is a one-cycle pulse in the cycle after the gate closes.
// Timing: the gate rises 100 x CYC_PER_MS + 1 cycles after the initiate pulse and
// stays high count_time x CYC_PER_MS cycles.
//
// From the document: the 0.1 s wait taken from the timing counter, the decade timing
// chain cleared when the gate opens and again when it closes, the six count times,
// the divide-by-two stage for 0.2 s that the first 0.1 s cannot toggle, the transfer
// at the end of the count. This design's own: the first three decades merged into one
// divide-by-CYC_PER_MS stage, and ignoring initiate while counting.
module hs_counter_control
  import magdas_pkg::*;
#(
  parameter int unsigned CYC_PER_MS = 1_000   // 1 MHz standard: 1000 cycles per ms
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        initiate,
  input  count_time_e count_time,
  output logic        clear,
  output logic        gate,
  output logic        xfer,
  output logic        busy
);
  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_COUNT} state_e;
  state_e     state;
  logic [$clog2(CYC_PER_MS+1)-1:0] pre;   // 1 MHz -> 1 kPPS
  bcd_t       dec [4];                    // 1 ms, 10 ms, 100 ms, 1 s decades
  logic       half;                       // divide-by-two stage for 0.2 s
  logic [4:0] tap;                        // carries: 1 ms, 10 ms, 100 ms, 1 s, 10 s
  logic [3:0] nine;                       // decade k stands at 9
  logic       done;

  always_comb begin
    for (int k = 0; k < 4; k++) nine[k] = (dec[k] == 4'd9);
    tap[0] = (state != S_IDLE) && (32'(pre) == CYC_PER_MS - 1);
    tap[1] = tap[0] && nine[0];
    tap[2] = tap[0] && (&nine[1:0]);
    tap[3] = tap[0] && (&nine[2:0]);
    tap[4] = tap[0] && (&nine[3:0]);
    unique case (count_time)
      CT_1MS:   done = tap[0];
      CT_10MS:  done = tap[1];
      CT_100MS: done = tap[2];
      CT_200MS: done = tap[2] && half;
      CT_1S:    done = tap[3];
      CT_10S:   done = tap[4];
      default:  done = tap[3];
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE; pre <= '0; half <= 1'b0; clear <= 1'b0; xfer <= 1'b0;
      for (int k = 0; k < 4; k++) dec[k] <= '0;
    end else begin
      clear <= 1'b0;
      xfer  <= 1'b0;
      if ((initiate && state != S_COUNT) || (state == S_SETTLE && tap[2]) ||
          (state == S_COUNT && done)) begin
        // every event of the control card clears the timing chain
        pre  <= '0;
        half <= 1'b0;
        for (int k = 0; k < 4; k++) dec[k] <= '0;
        if (initiate && state != S_COUNT) begin
          state <= S_SETTLE;
          clear <= 1'b1;
        end else if (state == S_SETTLE) begin
          state <= S_COUNT;
        end else begin
          state <= S_IDLE;
          xfer  <= 1'b1;
        end
      end else if (state != S_IDLE) begin
        pre <= tap[0] ? '0 : pre + 1'b1;
        for (int k = 0; k < 4; k++)
          if (tap[k]) dec[k] <= (dec[k] == 4'd9) ? 4'd0 : dec[k] + 4'd1;
        if (state == S_COUNT && tap[2]) half <= ~half;
      end
    end
  end

  assign gate = (state == S_COUNT);
  assign busy = (state != S_IDLE);
endmodule
