// Pulse-to-unit control with the Test and Ignore generators (cards A7, A8, A9).
//
// Decodes the gate counter B into sixteen gate lines b0..b15. The gate selector
// switch of the addressed gate and that gate's Test flip-flop decide what the
// sequence timer does next:
//   READ           - Test line true: the gate is read on every scan;
//   READ_TEST      - read if its Test flip-flop is set, otherwise Ignore;
//   WAIT_TEST      - read once its Test flip-flop is set, until then hold (neither);
//   IGNORE         - Ignore: the gate is skipped.
// The Transfer pulse of the sequence timer is steered to the addressed gate card
// only. The D/A READ pulse follows the Transfer, one cycle later when the shift
// register holds the new word, whenever the addressed gate is the one chosen with
// the PTU selector switch; the printer gate code is that gate's number as two BCD
// digits.
//
// Timing: test_ok/ignore are combinational from cnt_b; gate_transfer is the
// Transfer strobe gated by the decoder; da_read is registered.
//
// From the document: the sixteen decoded lines, the four switch positions and their
// meaning (Fig. 20: wait for test; read gate if test is true, otherwise ignore;
// ignore this gate; read gate), the D/A READ pulse for the selected gate right
// after the Transfer, a gate code for the printer. This design's own: the switch
// encoding and the one-cycle D/A READ delay.
module ptu_control
  import magdas_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  cnt_b,
  input  gate_sel_e   gate_mode [N_GATES],
  input  logic [N_GATES-1:0] test_ff,     // Test flip-flops of the gate cards
  input  logic        transfer,
  input  logic [3:0]  ptu_sel,             // gate monitored by the D/A converter / printer
  output logic [N_GATES-1:0] b,           // decoded gate lines
  output logic        test_ok,
  output logic        ignore,
  output logic [N_GATES-1:0] gate_transfer,
  output logic        da_read,
  output logic [7:0]  printer_gate_code   // two BCD digits
);
  gate_sel_e mode;
  logic      t;

  always_comb begin
    b = '0;
    b[cnt_b] = 1'b1;
  end

  assign mode = gate_mode[cnt_b];
  assign t    = test_ff[cnt_b];

  always_comb begin
    unique case (mode)
      GSEL_READ:      begin test_ok = 1'b1; ignore = 1'b0; end
      GSEL_READ_TEST: begin test_ok = t;    ignore = !t;   end
      GSEL_WAIT_TEST: begin test_ok = t;    ignore = 1'b0; end
      GSEL_IGNORE:    begin test_ok = 1'b0; ignore = 1'b1; end
      default:        begin test_ok = 1'b0; ignore = 1'b1; end
    endcase
  end

  assign gate_transfer = transfer ? b : '0;

  always_ff @(posedge clk) begin
    if (!rst_n) da_read <= 1'b0;
    else        da_read <= transfer && (cnt_b == ptu_sel);
  end

  assign printer_gate_code = (ptu_sel >= 4'd10) ? {4'd1, ptu_sel - 4'd10} : {4'd0, ptu_sel};

  always_comb assert (!(test_ok && ignore));
endmodule
