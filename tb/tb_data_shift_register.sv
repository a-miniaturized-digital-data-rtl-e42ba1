// Testbench for data_shift_register (six words, as the direct monitor): loads a
// random gate word with its gate number, then shifts it out and checks the
// recording position shows digit 10^0, 10^1, ... 10^4 and then the gate number,
// in that order, one character per Shift; characters from top_in must follow. A
// reference queue in the testbench gives the expected characters.
module tb_data_shift_register;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [23:0] d = '0, q;
  logic [3:0] top_in = '0, rec_out;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  data_shift_register #(.WORDS(6)) dut (.clk, .rst_n, .load, .shift, .d, .top_in, .q, .rec_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [3:0] exp_q[$];
    logic [23:0] v;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1 check(q == 0, "reset");
    for (int t = 0; t < 300; t++) begin
      v = 24'($urandom);
      exp_q.delete();
      for (int i = 0; i < 6; i++) exp_q.push_back(v[4*i +: 4]);
      d = v; load = 1'b1; shift = ($urandom % 2 == 0);
      @(posedge clk); #1 load = 1'b0; shift = 1'b0;
      check(q == v, "parallel load");
      for (int c = 0; c < 9; c++) begin
        logic [3:0] ti;
        check(rec_out == exp_q[0], $sformatf("character %0d", c));
        ti = 4'($urandom);
        exp_q.pop_front();
        exp_q.push_back(ti);
        top_in = ti; shift = 1'b1;
        @(posedge clk); #1 shift = 1'b0;
        repeat ($urandom % 2) begin @(posedge clk); #1; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
