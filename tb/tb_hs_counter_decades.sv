// Testbench for hs_counter_decades. The measured signal runs on its own random
// period (edges never coincide with the 1 MHz clock edges); the gate is opened for
// random lengths in the clock domain. The expected count is the number of signal
// edges that found the gate open, counted by the testbench; the memory must show it
// in eight BCD digits after the new_count pulse and hold it while the next count
// runs.
module tb_hs_counter_decades;
  logic clk = 1'b0, rst_n = 1'b0, sig_clk = 1'b0, gate = 0;
  logic [31:0] count_q;
  logic new_count;
  int checks = 0, failures = 0;
  realtime half = 3.25;
  always #5 clk = ~clk;
  initial begin #0.3; forever #(half) sig_clk = ~sig_clk; end

  hs_counter_decades #(.DIGITS(8)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int edges = 0;
  always @(posedge sig_clk) if (gate) edges++;

  function automatic logic [31:0] to_bcd(input int v);
    logic [31:0] r;
    for (int i = 0; i < 8; i++) begin r[4*i +: 4] = 4'(v % 10); v /= 10; end
    return r;
  endfunction

  initial begin
    int len, n_new;
    logic [31:0] prev;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    prev = '0;
    for (int t = 0; t < 40; t++) begin
      half = 0.5 * real'(7 + 2 * ($urandom % 60)) / 2.0 + 0.0;  // 1.75 .. 31.25 ns
      repeat (5) @(posedge clk); #1;
      edges = 0;
      len = 5 + $urandom % 3000;
      gate = 1; repeat (len) @(posedge clk); #1 gate = 0;
      n_new = 0;
      for (int c = 0; c < 40 && n_new == 0; c++) begin
        @(posedge clk); #1;
        if (new_count) n_new++;
        else check(count_q == prev, "memory holds the last count");
      end
      check(n_new == 1, "new_count after the gate closes");
      check(count_q == to_bcd(edges), $sformatf("count %h expected %0d", count_q, edges));
      prev = count_q;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
