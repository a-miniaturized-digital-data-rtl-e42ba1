// Testbench for datex_decoder. The testbench plays the shaft encoder: for a random
// five-digit shaft position it closes the contacts of each decade with that decade's
// code (A B C D per digit: 0001 0011 0010 0110 0100 1100 1110 1010 1011 1001), the
// lower decades of each reflected group showing 9 - d whenever the next decade up
// is odd. Checks that the sampled word is the true position in 8-4-2-1 digits,
// that the automatic mode samples every AUTO_DIV cycles, and that in manual mode
// only the button samples.
module tb_datex_decoder;
  import magdas_pkg::*;
  localparam int DIV = 10;
  logic clk = 1'b0, rst_n = 1'b0, auto_mode = 0, sample_btn = 0;
  logic [20:1] t = '0;
  gate_word_t word;
  logic sampled;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  datex_decoder #(.AUTO_DIV(DIV)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ABCD code of a digit
  function automatic logic [3:0] code(input int d);
    logic [3:0] c [10] = '{4'b0001, 4'b0011, 4'b0010, 4'b0110, 4'b0100,
                           4'b1100, 4'b1110, 4'b1010, 4'b1011, 4'b1001};
    return c[d];
  endfunction

  // contacts of decade k: A = t(4k+4), B = t(4k+3), C = t(4k+2), D = t(4k+1)
  function automatic logic [20:1] contacts(input int dig [5]);
    logic [20:1] r;
    int shown [5];
    shown[2] = dig[2];
    shown[1] = (dig[2] % 2) ? 9 - dig[1] : dig[1];
    shown[0] = (dig[1] % 2) ? 9 - dig[0] : dig[0];
    shown[4] = dig[4];
    shown[3] = (dig[4] % 2) ? 9 - dig[3] : dig[3];
    for (int k = 0; k < 5; k++) begin
      logic [3:0] c;
      c = code(shown[k]);
      r[4*k+4] = c[3]; r[4*k+3] = c[2]; r[4*k+2] = c[1]; r[4*k+1] = c[0];
    end
    return r;
  endfunction

  initial begin
    int dig [5];
    gate_word_t exp_w;
    int n, gap, n_manual = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // every digit value in every decade, then random positions
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < 5; k++) dig[k] = (i < 10) ? i : $urandom % 10;
      for (int k = 0; k < 5; k++) exp_w[4*k +: 4] = 4'(dig[k]);
      t = contacts(dig);
      auto_mode = (i % 2 == 0);
      if (auto_mode) begin
        @(posedge clk); #1;
        n = 1;
        while (!sampled) begin @(posedge clk); #1 n++; end
        check(n <= DIV + 1, "automatic sampling rate");
        check(word == exp_w, $sformatf("auto %h expected %h", word, exp_w));
        @(posedge clk); #1;
        gap = 1;
        while (!sampled) begin @(posedge clk); #1 gap++; end
        check(gap == DIV, $sformatf("sample period %0d", gap));
      end else begin
        repeat (2 * DIV) begin @(posedge clk); #1 check(!sampled, "no sample without button"); end
        sample_btn = 1; @(posedge clk); #1 sample_btn = 0;
        check(sampled && word == exp_w, $sformatf("manual %h expected %h", word, exp_w));
        n_manual++;
      end
    end
    check(n_manual == 1000, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
