// Testbench for interface_gate: random data, Transfer and Test requests. The bus
// must carry the data only during Transfer and be zero otherwise (the gates share
// an OR bus). The Test flip-flop must set on a request, clear on the gate's
// Transfer, and a request in the same cycle as Transfer must win. Compared with a
// cycle-by-cycle reference model kept in the testbench.
module tb_interface_gate;
  import magdas_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, transfer = 1'b0, test_set = 1'b0;
  gate_word_t data = '0, bus_out;
  logic test_ff, ref_ff;
  int checks = 0, failures = 0, sets = 0, clears = 0;
  always #5 clk = ~clk;

  interface_gate dut (.clk, .rst_n, .data, .transfer, .test_set, .bus_out, .test_ff);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ref_ff = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 check(test_ff == 0, "reset");
    for (int t = 0; t < 5000; t++) begin
      data     = 20'($urandom);
      transfer = ($urandom % 4 == 0);
      test_set = ($urandom % 5 == 0);
      #1 check(bus_out == (transfer ? data : 20'd0), "bus");
      if (test_set) begin ref_ff = 1'b1; sets++; end
      else if (transfer) begin if (ref_ff) clears++; ref_ff = 1'b0; end
      @(posedge clk); #1 check(test_ff == ref_ff, "test flip-flop");
    end
    check(sets > 100 && clears > 100, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
