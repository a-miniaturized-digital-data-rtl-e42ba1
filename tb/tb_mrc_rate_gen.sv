// Testbench for mrc_rate_gen. The testbench supplies 100 PPS and 1000 PPS strobes
// (compressed to every 50 and 5 cycles), doppler pulses and button presses, and
// checks against its own counts:
//  - rate of scan: one scan pulse per 5*N source pulses, from the clock or the
//    doppler, or one per button press in manual, and none while an inter-record gap
//    is being written;
//  - recording rate: one RR pulse per M 1000 PPS pulses, or the external / button
//    pulse;
//  - camera: fired on every K-th scan pulse for CAM_PULSE cycles, and by the button
//    with the frame marker lit for that frame;
//  - block length: an IRG on the first RR after the end of gate 15 once 2^k scans
//    have been taken since the last gap, and never earlier.
module tb_mrc_rate_gen;
  import magdas_pkg::*;
  localparam int CAMP = 20;
  logic clk = 1'b0, rst_n = 1'b0;
  scan_src_e scan_src = SCAN_SRC_CLOCK;
  rr_src_e rr_src = RR_SRC_DIVIDER;
  logic p100 = 0, p1000 = 0, doppler_pulse = 0, scan_btn = 0, irg_busy = 0;
  logic rr_ext_pulse = 0, rr_btn = 0, cam_btn = 0, eog_last = 0;
  logic [3:0] scan_div = 4'd5, rr_div = 4'd8, cam_div = 4'd1, blk_sel = 4'd1;
  logic scan_pulse, rr_pulse, camera, frame_marker, irg_pulse;
  logic [8:0] blk_count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mrc_rate_gen #(.CAM_PULSE(CAMP)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    p100  <= (cyc % 50 == 0);
    p1000 <= (cyc % 5 == 0);
  end

  // counts seen on the outputs
  int n_scan = 0, n_rr = 0, n_cam = 0, n_irg = 0, n_p100 = 0, n_p1000 = 0, n_dop = 0;
  logic cam_d = 0;
  always @(posedge clk) if (rst_n) begin
    n_scan += int'(scan_pulse); n_rr += int'(rr_pulse); n_irg += int'(irg_pulse);
    n_p100 += int'(p100); n_p1000 += int'(p1000); n_dop += int'(doppler_pulse);
    if (camera && !cam_d) n_cam++;
    cam_d <= camera;
    if (irg_busy) check(!scan_pulse, "no scan during gap");
  end

  task automatic clear_counts();
    @(posedge clk); #1;
    n_scan = 0; n_rr = 0; n_cam = 0; n_irg = 0; n_p100 = 0; n_p1000 = 0; n_dop = 0;
  endtask

  task automatic pulse(ref logic s);
    s = 1'b1; @(posedge clk); #1 s = 1'b0;
  endtask

  initial begin
    int n, m, kk, w;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // ---- scan rate from the clock and the doppler, RR divider, camera divider ----
    for (int t = 0; t < 6; t++) begin
      n = 3 + $urandom % 8; m = 2 + $urandom % 9; kk = 1 + $urandom % 4;
      scan_div = 4'(n); rr_div = 4'(m); cam_div = 4'(kk);
      scan_src = (t % 2 == 0) ? SCAN_SRC_CLOCK : SCAN_SRC_DOPPLER;
      rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
      clear_counts();
      for (int c = 0; c < 60000; c++) begin
        doppler_pulse = (scan_src == SCAN_SRC_DOPPLER) && ($urandom % 17 == 0);
        @(posedge clk); #1;
      end
      doppler_pulse = 0;
      w = (scan_src == SCAN_SRC_CLOCK) ? n_p100 : n_dop;
      check(n_scan == w / (5 * n) || n_scan == w / (5 * n) - 1, $sformatf("scan rate %0d of %0d /%0d", n_scan, w, 5 * n));
      check(n_rr == n_p1000 / m || n_rr == n_p1000 / m - 1, $sformatf("RR rate %0d of %0d /%0d", n_rr, n_p1000, m));
      check(n_cam == (n_scan + kk - 1) / kk || n_cam == n_scan / kk, $sformatf("camera %0d of %0d /%0d", n_cam, n_scan, kk));
    end
    // ---- camera pulse width and manual frame with marker ----
    scan_src = SCAN_SRC_MANUAL; cam_div = 4'd3;
    repeat (100) @(posedge clk); #1;
    pulse(cam_btn);
    check(camera && frame_marker, "manual frame fires with marker");
    n = 0; while (camera) begin n++; check(frame_marker, "marker lit for the frame"); @(posedge clk); #1; end
    check(n == CAMP - 1 || n == CAMP, $sformatf("camera pulse width %0d", n));
    check(!frame_marker, "marker off after the frame");
    // ---- manual scan and RR, gap blocking ----
    rr_src = RR_SRC_MANUAL;
    clear_counts();
    for (int i = 0; i < 7; i++) begin pulse(scan_btn); repeat (3) @(posedge clk); #1; end
    check(n_scan == 7, "manual scan");
    irg_busy = 1; pulse(scan_btn); irg_busy = 0;
    check(n_scan == 7, "scan blocked during gap");
    for (int i = 0; i < 4; i++) pulse(rr_btn);
    check(n_rr == 4, "manual RR");
    rr_src = RR_SRC_FREE;
    for (int i = 0; i < 5; i++) pulse(rr_ext_pulse);
    check(n_rr == 9, "free-running RR");
    // ---- block length 2^k ----
    rr_src = RR_SRC_MANUAL;
    for (int k = 0; k <= 8; k += 1 + (k > 2 ? 2 : 0)) begin
      blk_sel = 4'(k);
      rst_n = 1'b0; @(posedge clk); #1 rst_n = 1'b1;
      clear_counts();
      for (int s = 1; s <= 3 * (1 << k); s++) begin
        pulse(scan_btn);
        repeat (2) @(posedge clk); #1;
        pulse(rr_btn);            // RR pulses during the scan cause no gap
        check(!irg_pulse, "no gap inside a scan");
        pulse(eog_last);
        pulse(rr_btn);
        check(irg_pulse == (s % (1 << k) == 0), $sformatf("gap after scan %0d of block 2^%0d", s, k));
        @(posedge clk); #1;
      end
      check(n_irg == 3, $sformatf("three blocks of 2^%0d", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
