// Testbench for dvm_ramp with a behavioural model of the analog side: the ladder
// output is 1 mV per count of ramp_code, and the comparator reports "reached" once
// the ramp is at or above the magnitude of the input voltage. For random inputs
// (including over-range ones) it checks the count, the conversion time of one clock
// cycle per count (1 MHz), the polarity and over-range flags, and the octal digits of
// the gate word.
module tb_dvm_ramp;
  import magdas_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 0;
  logic ramp_reached, vin_neg;
  logic [9:0] ramp_code, count;
  logic busy, done, negative, overrange;
  gate_word_t word;
  int checks = 0, failures = 0;
  int vin_mv = 0;   // analog input in millivolts
  always #5 clk = ~clk;

  // analog model: ladder 1 mV per count, comparators
  assign ramp_reached = int'(ramp_code) >= (vin_mv < 0 ? -vin_mv : vin_mv);
  assign vin_neg = vin_mv < 0;

  dvm_ramp dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int mag, n, e_cnt, n_over = 0, n_neg = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 300; t++) begin
      vin_mv = ($urandom % 10 == 0) ? 1024 + $urandom % 500 : $urandom % 1024;
      if ($urandom % 2) vin_mv = -vin_mv;
      mag = vin_mv < 0 ? -vin_mv : vin_mv;
      e_cnt = mag > 1023 ? 1023 : mag;
      start = 1; @(posedge clk); #1 start = 0;
      n = 0;
      while (!done) begin @(posedge clk); #1 n++; end
      check(n == e_cnt + 1, $sformatf("conversion time %0d for %0d counts", n, e_cnt));
      check(int'(count) == e_cnt, $sformatf("count %0d for %0d mV", count, vin_mv));
      check(negative == (vin_mv < 0), "polarity");
      check(overrange == (mag > 1023), "over-range");
      check(word == {3'b0, negative, 3'b0, 1'(e_cnt / 512), 1'b0, 3'((e_cnt / 64) % 8),
                     1'b0, 3'((e_cnt / 8) % 8), 1'b0, 3'(e_cnt % 8)}, "octal digits");
      n_over += int'(overrange); n_neg += int'(negative);
      @(posedge clk); #1 check(!busy && !done, "idle after conversion");
    end
    check(n_over > 5 && n_neg > 50, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
