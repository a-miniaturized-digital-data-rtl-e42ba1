// Testbench for da_converter: random five-digit words and range settings. After each
// READ pulse the latched pair must be digits (range, range+1) of the word and the
// level (10*hi + lo) * 10^range; between pulses the outputs must hold even though
// the word and range inputs change.
module tb_da_converter;
  import magdas_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, read = 1'b0;
  gate_word_t word = '0;
  logic [1:0] range = '0;
  bcd_t lo, hi;
  logic [16:0] level;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  da_converter dut (.clk, .rst_n, .word, .read, .range, .lo, .hi, .level);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic gate_word_t rnd_bcd();
    gate_word_t w;
    for (int i = 0; i < 5; i++) w[4*i +: 4] = 4'($urandom % 10);
    return w;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int r, e_lo, e_hi, e_lvl;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 check(level == 0, "reset");
    for (int t = 0; t < 2000; t++) begin
      word = rnd_bcd(); r = $urandom % 4; range = 2'(r);
      e_lo = word[4*r +: 4]; e_hi = word[4*r+4 +: 4];
      e_lvl = (10*e_hi + e_lo) * (r == 0 ? 1 : r == 1 ? 10 : r == 2 ? 100 : 1000);
      read = 1'b1;
      @(posedge clk); #1 read = 1'b0;
      check(lo == 4'(e_lo) && hi == 4'(e_hi), "latched digits");
      check(level == 17'(e_lvl), $sformatf("level %0d exp %0d", level, e_lvl));
      word = rnd_bcd(); range = 2'($urandom);
      @(posedge clk); #1 check(level == 17'(e_lvl), "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
