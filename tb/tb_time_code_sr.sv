// Testbench for time_code_sr: loads random 14-bit time codes, shifts them out and
// compares the last stage, bit by bit, with the loaded value read MSB first; checks
// that load wins over shift, that a held register keeps its value and that zeros
// fill from the bottom. Self-checking against a plain reference copy.
module tb_time_code_sr;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [13:0] d = '0, q;
  logic q_last;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  time_code_sr dut (.clk, .rst_n, .load, .shift, .d, .q, .q_last);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [13:0] v;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 check(q == 0, "reset");
    for (int t = 0; t < 200; t++) begin
      v = 14'($urandom);
      d = v; load = 1'b1; shift = ($urandom % 2 == 0);  // load has priority
      @(posedge clk); #1 load = 1'b0; shift = 1'b0;
      check(q == v, "load");
      for (int i = 13; i >= 0; i--) begin
        check(q_last == v[i], $sformatf("bit %0d of %h q=%h t=%0t", i, v, q, $time));
        repeat ($urandom % 3) begin @(posedge clk); #1 check(q_last == v[i], "hold"); end
        shift = 1'b1; @(posedge clk); #1 shift = 1'b0;
      end
      check(q == 0, "zeros fill");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
