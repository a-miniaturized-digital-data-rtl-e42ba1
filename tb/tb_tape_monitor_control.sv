// Testbench for tape_monitor_control. A stand-in for the recorder's read-back plays
// whole scans: for each gate five data characters (10^0 first) and an identifier
// character with the B track set, each announced by a flux-check-complete pulse at
// random spacing. Checks that a sample pulse comes exactly once per scan, on the
// identifier of the monitored gate, and that the register then holds that gate's
// five digits, with the identifier entering afterwards.
module tb_tape_monitor_control;
  logic clk = 1'b0, rst_n = 1'b0, fcc = 0, rd_b = 0;
  logic [3:0] rd_char = '0, gate_sel = '0;
  logic [19:0] sr_q;
  logic sample;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  tape_monitor_control #(.WORDS(5)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [19:0] expect_word;
  int n_sample = 0;
  always @(posedge clk) if (rst_n && sample) begin
    n_sample++;
    check(sr_q == expect_word, $sformatf("sampled %h expected %h", sr_q, expect_word));
  end

  task automatic send(input logic [3:0] c, input logic bb);
    rd_char = c; rd_b = bb; fcc = 1; @(posedge clk); #1 fcc = 0;
    rd_char = 4'($urandom); rd_b = 1'($urandom);   // lines change between characters
    repeat (2 + $urandom % 4) @(posedge clk); #1;
  endtask

  initial begin
    logic [19:0] w [16];
    int written, n_total = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int s = 0; s < 60; s++) begin
      gate_sel = 4'($urandom);
      n_sample = 0; written = 0;
      for (int g = 0; g < 16; g++) begin
        w[g] = 20'($urandom);
        if (g == int'(gate_sel)) expect_word = w[g];
        if ($urandom % 5 == 0) continue;      // an ignored gate writes nothing
        if (g == int'(gate_sel)) written = 1;
        for (int c = 0; c < 5; c++) send(w[g][4*c +: 4], 1'b0);
        send(4'(g), 1'b1);
        check(sr_q[19:16] == 4'(g), "identifier enters the register");
      end
      @(posedge clk); #1;
      check(n_sample == written, "one sample per scan when the gate was written");
      n_total += n_sample;
    end
    check(n_total > 30, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
