// Testbench for time_code_control. The testbench plays the digital clock: it makes
// 10 PPS and 1 PPS strobes (compressed to 10 and 100 clock cycles) and keeps the
// time of day, starting a little before a random even minute. Over several
// two-minute intervals it checks that the bits sampled onto the pen are the hours
// and minutes at the mark, most significant first, one every 4 s (zeros after the
// 14 code bits), that a 1 holds the pen for 2 s and a 0 only blips it, and that the
// pen is held for the long dash in the last 10 s of the interval.
module tb_time_code_control;
  import magdas_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, p1 = 1'b0, p10 = 1'b0;
  bcd_t min_u = '0, min_t = '0, hr_u = '0, hr_t = '0, sec_u = '0, sec_t = '0;
  logic pen, sample, sample_bit;
  logic [13:0] sr_q;
  int checks = 0, failures = 0;
  int hh, mm, ss;           // reference time of day
  int ones = 0, zeros = 0, dashes = 0;
  always #5 clk = ~clk;

  time_code_control dut (.clk, .rst_n, .p1, .p10, .min_u, .min_t, .hr_u, .hr_t,
                         .sec_u, .sec_t, .pen, .sr_q, .sample, .sample_bit);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0d:%0d:%0d", what, hh, mm, ss); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // timing pulses and time of day (digits change on the edge that carries p1)
  int cyc = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      p10 <= (cyc % 10 == 0);
      p1  <= (cyc % 100 == 0);
      if (p1) begin
        ss++;
        if (ss == 60) begin ss = 0; mm++; end
        if (mm == 60) begin mm = 0; hh++; end
        if (hh == 24) hh = 0;
        sec_u <= 4'(ss % 10); sec_t <= 4'(ss / 10);
        min_u <= 4'(mm % 10); min_t <= 4'(mm / 10);
        hr_u  <= 4'(hh % 10); hr_t  <= 4'(hh / 10);
      end
    end
  end

  // expected sampled bits and pen widths
  logic [13:0] code;
  int k = -1, pen_len = 0, last_bit = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (sample) begin
        if (ss % 60 == 0 && mm % 2 == 0) begin
          code = {2'(hh / 10), 4'(hh % 10), 4'(mm / 10), 4'(mm % 10)};
          k = 0;
        end
        if (k >= 0) begin
          check(sample_bit == (k < 14 ? code[13-k] : 1'b0), $sformatf("bit %0d", k));
          check(((mm % 2) * 60 + ss) == 4 * k, "one bit every 4 s");
          k++;
        end
        last_bit = int'(sample_bit);
      end
      if (pen && (mm % 2 == 0 || ss < 50)) pen_len++;
      else if (pen_len > 0) begin
        if (k > 0) begin
          if (last_bit == 1) begin ones++; check(pen_len >= 195 && pen_len <= 205, $sformatf("one is 2 s (%0d)", pen_len)); end
          else begin zeros++; check(pen_len >= 1 && pen_len <= 10, $sformatf("zero is a blip (%0d)", pen_len)); end
        end
        pen_len = 0;
      end
      if (mm % 2 == 1 && ss >= 50 && k >= 0) begin
        checks++; if (!pen) begin failures++; $display("FAIL dash"); end
        dashes++;
      end
    end
  end

  initial begin
    hh = $urandom % 24; mm = 2 * ($urandom % 30) + 1; ss = 40;
    sec_u = 4'(ss % 10); sec_t = 4'(ss / 10);
    min_u = 4'(mm % 10); min_t = 4'(mm / 10);
    hr_u  = 4'(hh % 10); hr_t  = 4'(hh / 10);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (100 * (20 + 3 * 120)) @(posedge clk);
    check(ones > 3 && zeros > 30 && dashes > 1000, $sformatf("coverage %0d %0d %0d", ones, zeros, dashes));
    check(k == 28, $sformatf("28 samples per two minutes (%0d)", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
