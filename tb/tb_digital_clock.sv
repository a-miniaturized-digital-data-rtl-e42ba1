// Testbench for digital_clock, with the 1 MHz -> 100 kPPS pre-divider shortened to 1
// so that a "second" is 100,000 cycles. Checks:
//  - the countdown rates: 1000, 100, 10, 2 and 1 PPS periods in 100 kPPS steps;
//  - synchronisation: while ADVANCE or RETARD is held at FAST or SLOW the second
//    lasts 4/10, 8/10, 12/10 or 16/10 of normal;
//  - set-time mode: each button feeds its rate into the display counter, and no
//    second pulse reaches it without a button;
//  - a whole day at the 10,000 PPS setting rate: every change of the display is one
//    second later than the last, 59 s -> 0, 59 min -> 0, 23:59:59 -> 00:00:00, with
//    one minute pulse per 60 s and one 10 s pulse per 10 s;
//  - the camera/gate code fields and the frame marker lamp.
module tb_digital_clock;
  import magdas_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sw_retard = 0, sw_fast = 0, sw_slow = 0, set_mode = 0, frame_marker = 0;
  logic [4:0] set_rate_btn = '0;
  logic p100k, p1000, p100, p10, p2, p1, p10s, p1min;
  bcd_t sec_u, sec_t, min_u, min_t, hr_u, hr_t;
  gate_word_t time20;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  digital_clock #(.PRE_DIV(1)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (8000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // period, in cycles, between the next two pulses of one output
  task automatic period(input int which, output int n);
    logic s;
    n = 0;
    for (int k = 0; k < 2; k++) begin
      n = 0;
      do begin
        @(posedge clk); #1 n++;
        case (which)
          0: s = p1000; 1: s = p100; 2: s = p10; 3: s = p2; default: s = p1;
        endcase
      end while (!s);
    end
  endtask

  function automatic int tod();
    return (int'(hr_t) * 10 + int'(hr_u)) * 3600 + (int'(min_t) * 10 + int'(min_u)) * 60
           + int'(sec_t) * 10 + int'(sec_u);
  endfunction

  initial begin
    int n, prev, changes, mins, tens;
    int exp_per [5] = '{100, 1000, 10000, 50000, 100000};
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < 5; w++) begin
      period(w, n);
      check(n == exp_per[w], $sformatf("rate %0d: period %0d", w, n));
    end
    // synchronisation rates
    for (int m = 0; m < 4; m++) begin
      sw_retard = m[1]; sw_fast = !m[0]; sw_slow = m[0];
      period(4, n);                          // first period spans the switch
      period(4, n);
      check(n == (m == 0 ? 40000 : m == 1 ? 80000 : m == 2 ? 120000 : 160000),
            $sformatf("sync mode %0d: second = %0d cycles", m, n));
    end
    sw_fast = 0; sw_slow = 0;
    // set-time mode: no tick without a button, then each rate
    set_mode = 1;
    prev = tod();
    repeat (250000) @(posedge clk); #1;
    check(tod() == prev, "display stopped in set mode");
    for (int b = 0; b < 5; b++) begin
      set_rate_btn = 5'(1) << b;
      prev = tod();
      repeat (200000) @(posedge clk); #1;
      n = tod() - prev; if (n < 0) n += 86400;
      check(n >= (b == 0 ? 19999 : b == 1 ? 1999 : b == 2 ? 199 : b == 3 ? 19 : 1) &&
            n <= (b == 0 ? 20001 : b == 1 ? 2001 : b == 2 ? 201 : b == 3 ? 21 : 2),
            $sformatf("set rate button %0d: %0d s in 200000 cycles", b, n));
    end
    // one day at 10,000 PPS
    set_rate_btn = 5'b00001;
    prev = tod(); changes = 0; mins = 0; tens = 0;
    while (changes < 86400 + 5) begin
      @(posedge clk); #1;
      mins += int'(p1min); tens += int'(p10s);
      if (tod() != prev) begin
        check(tod() == (prev + 1) % 86400, $sformatf("%0d follows %0d", tod(), prev));
        check(sec_u <= 9 && sec_t <= 5 && min_u <= 9 && min_t <= 5 && hr_t <= 2, "digit ranges");
        prev = tod(); changes++;
      end
    end
    check(mins >= 1439 && mins <= 1441, $sformatf("minute pulses %0d", mins));
    check(tens >= 8639 && tens <= 8641, $sformatf("10 s pulses %0d", tens));
    // camera / gate code
    for (int f = 0; f < 2; f++) begin
      frame_marker = f[0]; #1;
      check(time20 == {hr_u, min_t, min_u, frame_marker, sec_t[2:0], sec_u}, "time code fields");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
