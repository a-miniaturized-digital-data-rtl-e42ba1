// Testbench for pulse_sequence_timer. Each scan gives every gate a random plan:
// read, ignore, or wait a few RR pulses for its Test line and then read. The
// testbench drives Test/Ignore from that plan and RR pulses at random spacing, and
// compares the stream of Transfer, Shift, Strobe, identifier and End-of-Gate events
// with the stream the plan predicts: for a read gate Transfer, Strobe, then five
// Shift + Strobe pairs (the last Strobe marking the identifier character) and EOG;
// for an ignored gate one EOG; nothing while waiting. It also checks that each
// Transfer, Shift and ignore EOG comes one cycle after its RR pulse, that EOG of
// gate 15 is flagged and ends the scan, and that a scan pulse is refused during an
// inter-record gap.
module tb_pulse_sequence_timer;
  logic clk = 1'b0, rst_n = 1'b0, scan_pulse = 0, irg_busy = 0, rr_pulse = 0;
  logic test_ok, ignore;
  logic [2:0] cnt_a;
  logic [3:0] cnt_b;
  logic scan_active, gate_open, transfer, shift, strobe, id_char, eog, eog_last;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  pulse_sequence_timer dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // gate plan: 0 read, 1 ignore, 2.. wait (plan-1) RR pulses, then read
  int plan [16];
  int waited [16];
  assign test_ok = (plan[cnt_b] == 0) || (plan[cnt_b] >= 2 && waited[cnt_b] >= plan[cnt_b] - 1);
  assign ignore  = (plan[cnt_b] == 1);

  localparam int T = 1, S = 2, D = 3, I = 4, E = 5;
  int exp_q[$], got_q[$];
  logic rr_d = 0;
  always @(posedge clk) if (rst_n) begin
    rr_d <= rr_pulse;
    if (rr_pulse && !gate_open && plan[cnt_b] >= 2) waited[cnt_b]++;
    if (transfer) begin got_q.push_back(T * 16 + int'(cnt_b)); check(rr_d, "transfer follows RR"); end
    if (shift)    begin got_q.push_back(S * 16 + int'(cnt_b)); check(rr_d, "shift follows RR"); end
    if (strobe)   got_q.push_back(id_char ? I * 16 : D * 16);
    if (eog) begin
      got_q.push_back(E * 16);
      checks++;
      if (eog_last != (cnt_b == 4'd0)) begin failures++; $display("FAIL eog_last"); end
    end
  end

  initial begin
    int n_read = 0, n_ign = 0, n_wait = 0;
    for (int g = 0; g < 16; g++) begin plan[g] = 0; waited[g] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // a scan pulse during an inter-record gap is refused
    irg_busy = 1; scan_pulse = 1; @(posedge clk); #1 scan_pulse = 0; irg_busy = 0;
    check(!scan_active, "scan refused during gap");
    for (int s = 0; s < 40; s++) begin
      exp_q.delete(); got_q.delete();
      for (int g = 0; g < 16; g++) begin
        int r;
        r = $urandom % 6;
        plan[g] = (r < 3) ? 0 : (r == 3) ? 1 : 2 + $urandom % 4;
        waited[g] = 0;
        if (plan[g] == 1) begin exp_q.push_back(E * 16); n_ign++; end
        else begin
          if (plan[g] == 0) n_read++; else n_wait++;
          exp_q.push_back(T * 16 + g); exp_q.push_back(D * 16);
          for (int c = 0; c < 5; c++) begin
            exp_q.push_back(S * 16 + g); exp_q.push_back(c == 4 ? I * 16 : D * 16);
          end
          exp_q.push_back(E * 16);
        end
      end
      scan_pulse = 1; @(posedge clk); #1 scan_pulse = 0;
      check(scan_active && cnt_b == 0, "scan starts at gate 0");
      while (scan_active) begin
        repeat (1 + $urandom % 4) @(posedge clk);
        #1 rr_pulse = 1; @(posedge clk); #1 rr_pulse = 0;
      end
      repeat (3) @(posedge clk); #1;
      check(got_q.size() == exp_q.size(), $sformatf("events %0d, expected %0d", got_q.size(), exp_q.size()));
      for (int i = 0; i < exp_q.size() && i < got_q.size(); i++)
        check(got_q[i] == exp_q[i], $sformatf("event %0d: %0h expected %0h", i, got_q[i], exp_q[i]));
      // RR pulses after the end of the scan do nothing
      rr_pulse = 1; @(posedge clk); #1 rr_pulse = 0; @(posedge clk); #1;
      check(!transfer && !shift && !eog && !scan_active, "idle after gate 15");
    end
    check(n_read > 50 && n_ign > 50 && n_wait > 50, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
