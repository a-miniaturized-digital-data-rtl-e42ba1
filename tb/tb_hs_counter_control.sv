// Testbench for hs_counter_control with shortened timing (3 cycles per millisecond,
// so the 0.1 s wait is 300 cycles). For every count time and random initiates it checks the
// clear pulse, that the gate opens exactly the settling time after the initiate,
// stays open exactly the count time, is followed by the transfer pulse, and that an
// initiate during a measurement restarts it.
module tb_hs_counter_control;
  import magdas_pkg::*;
  localparam int CPM = 3, SET = 100 * CPM;
  logic clk = 1'b0, rst_n = 1'b0, initiate = 0;
  count_time_e count_time = CT_1MS;
  logic clear, gate, xfer, busy;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hs_counter_control #(.CYC_PER_MS(CPM)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int ms(count_time_e c);
    case (c)
      CT_1MS: return 1;   CT_10MS: return 10;  CT_100MS: return 100;
      CT_200MS: return 200; CT_1S: return 1000; default: return 10000;
    endcase
  endfunction

  initial begin
    int n, restarts = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 24; t++) begin
      count_time = count_time_e'(t % 6);
      initiate = 1; @(posedge clk); #1 initiate = 0;
      check(clear && busy && !gate, "clear on initiate");
      if (t % 4 == 3) begin                       // restart while settling
        repeat ($urandom % SET) @(posedge clk);
        #1 initiate = 1; @(posedge clk); #1 initiate = 0; restarts++;
      end
      n = 1;
      while (!gate) begin @(posedge clk); #1 n++; end
      check(n == SET + 1, $sformatf("settling %0d cycles", n - 1));
      n = 0;
      if (t % 4 == 1) begin                       // initiate while counting is ignored
        repeat ($urandom % 3) begin @(posedge clk); #1 n++; end
        initiate = 1; @(posedge clk); #1 initiate = 0; n++;
      end
      while (gate) begin check(!xfer, "no transfer while counting"); @(posedge clk); #1 n++; end
      check(n == ms(count_time) * CPM, $sformatf("gate %0d cycles for %0d ms", n, ms(count_time)));
      check(xfer && !busy, "transfer at gate close");
      @(posedge clk); #1 check(!xfer, "transfer is one pulse");
      repeat ($urandom % 20) begin @(posedge clk); #1 check(!gate && !busy, "idle"); end
    end
    check(restarts == 6, "restarts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
