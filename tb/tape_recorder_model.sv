// Behavioural model of the incremental magnetic tape recorder, for testbenches only.
//
// Each rec_strobe writes the seven-track character on rec_char {C, B, A, 8, 4, 2, 1}.
// READ_DELAY cycles later the read head has seen it: the model pulses fcc (flux
// check complete) with the 8-4-2-1 and B tracks read back on rd_char / rd_b. An
// inter-record-gap pulse makes the recorder busy (irg_busy) for IRG_CYCLES while it
// spaces the tape. The model also counts characters written with bad (even) parity
// and strobes that arrive while it is spacing the gap.
//
// The read-after-write delay, the gap duration and the single-cycle handshake are
// this model's own numbers: the recorder is a bought-in unit whose timing the
// chassis only has to respect.
module tape_recorder_model #(
  parameter int READ_DELAY = 40,
  parameter int IRG_CYCLES = 30_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [6:0] rec_char,
  input  logic       rec_strobe,
  input  logic       rec_irg,
  output logic       irg_busy,
  output logic       fcc,
  output logic [3:0] rd_char,
  output logic       rd_b,
  output int         n_chars,
  output int         n_parity_errors,
  output int         n_strobes_in_gap
);
  int irg_left;
  logic [6:0] pipe_c [READ_DELAY];
  logic       pipe_v [READ_DELAY];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      irg_left <= 0; fcc <= 1'b0; rd_char <= '0; rd_b <= 1'b0;
      n_chars <= 0; n_parity_errors <= 0; n_strobes_in_gap <= 0;
      for (int i = 0; i < READ_DELAY; i++) begin pipe_v[i] <= 1'b0; pipe_c[i] <= '0; end
    end else begin
      if (rec_irg) irg_left <= IRG_CYCLES;
      else if (irg_left > 0) irg_left <= irg_left - 1;
      pipe_v[0] <= rec_strobe;
      pipe_c[0] <= rec_char;
      for (int i = 1; i < READ_DELAY; i++) begin
        pipe_v[i] <= pipe_v[i-1];
        pipe_c[i] <= pipe_c[i-1];
      end
      fcc <= pipe_v[READ_DELAY-1];
      if (pipe_v[READ_DELAY-1]) begin
        rd_char <= pipe_c[READ_DELAY-1][3:0];
        rd_b    <= pipe_c[READ_DELAY-1][5];
      end
      if (rec_strobe) begin
        n_chars <= n_chars + 1;
        if (^rec_char != 1'b1) n_parity_errors <= n_parity_errors + 1;
        if (irg_left > 0) n_strobes_in_gap <= n_strobes_in_gap + 1;
      end
    end
  end
  assign irg_busy = (irg_left > 0);
endmodule
