// Testbench for ptu_control: random gate numbers, selector positions and Test
// flip-flops. Checks the one-of-sixteen gate lines, the Test and Ignore lines for
// each selector position (read; read if tested, otherwise ignore; wait for the
// test; ignore), that Transfer reaches only the current gate's card, that the D/A
// READ pulse follows a Transfer of the monitored gate by one cycle, and the two
// printer digits of the monitored gate number.
module tb_ptu_control;
  import magdas_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, transfer = 0;
  logic [3:0] cnt_b = '0, ptu_sel = '0;
  gate_sel_e gate_mode [N_GATES];
  logic [15:0] test_ff = '0, b, gate_transfer;
  logic test_ok, ignore, da_read;
  logic [7:0] printer_gate_code;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ptu_control dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic e_ok, e_ign, e_read;
    int cov [4];
    for (int g = 0; g < 16; g++) gate_mode[g] = GSEL_READ;
    for (int i = 0; i < 4; i++) cov[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      for (int g = 0; g < 16; g++) gate_mode[g] = gate_sel_e'($urandom % 4);
      test_ff = 16'($urandom); cnt_b = 4'($urandom); ptu_sel = ($urandom % 3 == 0) ? cnt_b : 4'($urandom);
      transfer = 1'($urandom);
      #1;
      cov[gate_mode[cnt_b]]++;
      case (gate_mode[cnt_b])
        GSEL_READ:      begin e_ok = 1; e_ign = 0; end
        GSEL_READ_TEST: begin e_ok = test_ff[cnt_b]; e_ign = !test_ff[cnt_b]; end
        GSEL_WAIT_TEST: begin e_ok = test_ff[cnt_b]; e_ign = 0; end
        default:        begin e_ok = 0; e_ign = 1; end
      endcase
      check(b == 16'(1) << cnt_b, "gate lines");
      check(test_ok == e_ok && ignore == e_ign, $sformatf("test/ignore mode %0d", gate_mode[cnt_b]));
      check(gate_transfer == (transfer ? 16'(1) << cnt_b : 16'd0), "gate transfer");
      check(printer_gate_code == {4'(ptu_sel / 10), 4'(ptu_sel % 10)}, "printer code");
      e_read = transfer && (cnt_b == ptu_sel);
      @(posedge clk); #1;
      check(da_read == e_read, "D/A read");
      transfer = 0;
      @(posedge clk); #1 check(!da_read, "read is one pulse");
    end
    for (int i = 0; i < 4; i++) check(cov[i] > 300, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
