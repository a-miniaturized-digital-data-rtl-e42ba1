// Testbench for hs_counter with shortened timing (10 cycles per millisecond, so the
// 0.1 s wait is 1000 cycles). Each initiate source is selected in turn (2 PPS, 1 PPS, free
// running, scan, manual only) and the testbench checks that a measurement starts
// from that source alone, or from the button in any position. For each measurement
// the signal edges seen while the gate is open are counted by the testbench and must
// appear in the eight-digit memory and in the two gate words (10^0..10^4 and
// 10^5..10^7). One long, fast measurement makes the upper digits non-zero.
module tb_hs_counter;
  import magdas_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, sig_clk = 1'b0;
  init_src_e init_src = INIT_MANUAL;
  count_time_e count_time = CT_1MS;
  logic p2 = 0, p1 = 0, free_pulse = 0, scan_pulse = 0, manual_btn = 0;
  logic [31:0] count_q;
  gate_word_t lsd_word, msd_word;
  logic gate, clear, xfer, busy, new_count;
  int checks = 0, failures = 0;
  realtime half = 3.25;
  always #5 clk = ~clk;
  initial begin #0.3; forever #(half) sig_clk = ~sig_clk; end

  hs_counter #(.CYC_PER_MS(10)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int edges = 0;
  always @(posedge sig_clk) if (gate) edges++;

  function automatic int to_int(input logic [31:0] b);
    int v = 0;
    for (int i = 7; i >= 0; i--) v = v * 10 + int'(b[4*i +: 4]);
    return v;
  endfunction

  task automatic measure_and_check();
    int n;
    edges = 0;
    n = 0;
    while (!new_count && n < 200000) begin @(posedge clk); #1 n++; end
    check(new_count, "measurement completed");
    check(to_int(count_q) == edges, $sformatf("count %0d, edges %0d", to_int(count_q), edges));
    check(lsd_word == count_q[19:0], "less significant gate word");
    check(msd_word == {8'h00, count_q[31:20]}, "more significant gate word");
  endtask

  // pulse one of the initiate inputs
  task automatic fire(input int which);
    case (which)
      0: p2 = 1; 1: p1 = 1; 2: free_pulse = 1; 3: scan_pulse = 1; default: manual_btn = 1;
    endcase
    @(posedge clk); #1 {p2, p1, free_pulse, scan_pulse, manual_btn} = '0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      init_src = init_src_e'(t % 5);
      count_time = ($urandom % 2) ? CT_1MS : CT_10MS;
      half = 0.5 * real'(3 + $urandom % 40) + 0.25;
      // the other sources do nothing
      for (int w = 0; w < 4; w++) if (w != t % 5) begin
        fire(w); @(posedge clk); #1 check(!busy, $sformatf("source %0d ignored", w));
      end
      fire(t % 5);
      check(busy && clear, "initiated");
      measure_and_check();
      fire(4);                                   // the button works in every position
      check(busy, "manual button");
      measure_and_check();
    end
    // long, fast measurement: about two million counts
    count_time = CT_10S; half = 0.25;
    fire(4);
    measure_and_check();
    check(msd_word != 0, "upper digits in use");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
