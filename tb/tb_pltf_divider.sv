// Testbench for pltf_divider: runs the multivibrator clock and checks that f2 has a
// period of 512 (or 256 with div256) multivibrator cycles with equal halves, i.e.
// that the loop locks the multivibrator to 512 (256) times the input frequency, and
// that f3 is the NOR of f1 and f2 for random f1.
module tb_pltf_divider;
  logic vcm_clk = 1'b0, rst_n = 1'b0, div256 = 1'b0, f1 = 1'b0, f2, f3;
  int checks = 0, failures = 0;
  always #5 vcm_clk = ~vcm_clk;

  pltf_divider dut (.vcm_clk, .rst_n, .div256, .f1, .f2, .f3);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge vcm_clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Length, in vcm cycles, of the next run of f2 at one level.
  task automatic run_len(output int n);
    logic lvl;
    lvl = f2; n = 0;
    do begin @(posedge vcm_clk); #1 n++; end while (f2 == lvl);
  endtask

  initial begin
    int n;
    repeat (3) @(posedge vcm_clk);
    #1 rst_n = 1'b1;
    for (int m = 0; m < 2; m++) begin
      div256 = m[0];
      run_len(n); run_len(n); // align to an edge
      for (int k = 0; k < 8; k++) begin
        run_len(n);
        check(n == (div256 ? 128 : 256), $sformatf("half period %0d div256=%0b", n, div256));
      end
    end
    for (int t = 0; t < 2000; t++) begin
      f1 = 1'($urandom); div256 = 1'($urandom);
      @(posedge vcm_clk); #1 check(f3 == ~(f1 | f2), "f3 = NOR(f1, f2)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
