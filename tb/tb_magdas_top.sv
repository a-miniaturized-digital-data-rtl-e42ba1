// End-to-end testbench of magdas_top at its default parameters (the real 1 MHz
// standard, 0.1 s counter settling, 1 ms camera pulse), so it is also the full-size
// test. About seven seconds of survey are flown:
//  - the clock is first run forward in set-time mode, then synchronised with the
//    ADVANCE/FAST switch, and reaches an even two-minute mark so that the time code
//    starts on the strip-chart pen;
//  - scans come every 0.2 s from the clock (later every 0.1 s from doppler pulses,
//    when a gap can swallow a scan pulse, and by hand),
//    RR pulses at 500 PPS (later free-running and by hand); blocks are two scans;
//  - gates 0/1 (date, line) are read once per block, after each inter-record gap;
//    2-7 the three frequency counters, fed with a 270,280 Hz signal and with the
//    multivibrator clocks of the two tracking filters; 8 the time; 9/10 the shaft
//    encoders (one automatic, one manual); 11 and 14 are switched to ignore; 12
//    waits for its test request, 13 is read only when it has one; 15 is the
//    voltmeter, whose analog side is modelled here (1 mV per count).
// A recorder model writes the characters and reads them back. The testbench decodes
// the tape: every character must have odd parity; every record must be five data
// characters and an identifier; gates must come in ascending order within a scan;
// each word must equal the source's value at its Transfer, and the independent
// expectations (counter frequencies, voltmeter reading, encoder positions, thumbwheel
// words) must hold. The tape monitor, the two D/A monitors and the camera are checked
// against the decoded tape and the scan count. Each mechanism is counted, and one
// that never happened counts as a failure.
module tb_magdas_top;
  import magdas_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #500 clk = ~clk;  // 1 MHz

  // ---------------- stimulus ----------------
  logic sw_retard = 0, sw_fast = 0, sw_slow = 0, set_mode = 0;
  logic [4:0] set_rate_btn = '0;
  scan_src_e scan_src = SCAN_SRC_CLOCK;
  rr_src_e rr_src = RR_SRC_DIVIDER;
  logic doppler_pulse = 0, scan_btn = 0, rr_ext_pulse = 0, rr_btn = 0, cam_btn = 0;
  logic [3:0] scan_div = 4'd4, rr_div = 4'd2, cam_div = 4'd2, blk_sel = 4'd1, ptu_sel = 4'd8;
  gate_sel_e gate_mode [N_GATES];
  gate_word_t date_word = 20'h03107, line_word = 20'h00042, shaft3_word = 20'h55555;
  gate_word_t dop_miles_word = 20'h01234, dop_incr_word = 20'h00567, dop_drift_word = 20'h00089;
  logic [N_GATES-1:0] test_req;
  logic req12 = 0, req13 = 0;
  assign test_req = {2'b00, req13, req12, 12'h000};
  logic [3:0] tm_gate_sel = 4'd15;
  logic [1:0] da_direct_range = 2'd0, da_tape_range = 2'd0;
  logic dvm_btn = 0, dvm_ramp_reached, dvm_vin_neg;
  logic cnt1_sig_clk = 0;
  init_src_e cnt_init_src [3];
  count_time_e cnt_count_time [3];
  logic [2:0] cnt_free_pulse = '0, cnt_manual_btn = '0;
  logic [1:0] vcm_clk = '0, pltf_f1 = '0, pltf_div256 = 2'b10;
  logic [20:1] enc_t [2];
  logic [1:0] enc_auto = 2'b01, enc_btn = '0;

  // ---------------- outputs ----------------
  logic [6:0] rec_char;
  logic rec_strobe, rec_irg, rec_irg_busy, rec_fcc, rec_rd_b;
  logic [3:0] rec_rd_char;
  logic [23:0] dm_sr_q;
  logic [19:0] tm_sr_q;
  logic da_read, tm_sample;
  logic [16:0] da_direct_level, da_tape_level;
  logic [7:0] printer_gate_code;
  logic [9:0] dvm_ramp_code;
  gate_word_t dvm_word;
  logic [31:0] cnt_value [3];
  logic [2:0] cnt_new, cnt_busy;
  logic [1:0] pltf_f2, pltf_f3, enc_sampled;
  gate_word_t enc_word [2];
  logic p1, p2, p10, p100, p1000, p1min, pen, camera, scan_pulse, rr_pulse, eog;
  bcd_t sec_u, sec_t, min_u, min_t, hr_u, hr_t;
  gate_word_t camera_lamps;
  logic [3:0] gate_no;
  logic [2:0] char_no;
  logic scan_active, tc_sample, tc_bit, dvm_done, dvm_overrange;
  logic [N_GATES-1:0] test_ff;
  logic [8:0] blk_count;

  magdas_top dut (.*);

  int n_chars, n_parity_errors, n_strobes_in_gap;
  tape_recorder_model #(.READ_DELAY(40), .IRG_CYCLES(30_000)) u_rec (
    .clk, .rst_n, .rec_char, .rec_strobe, .rec_irg, .irg_busy(rec_irg_busy), .fcc(rec_fcc),
    .rd_char(rec_rd_char), .rd_b(rec_rd_b), .n_chars, .n_parity_errors, .n_strobes_in_gap
  );

  // ---------------- analog / external models ----------------
  int vin_mv = 345;
  assign dvm_ramp_reached = int'(dvm_ramp_code) >= (vin_mv < 0 ? -vin_mv : vin_mv);
  assign dvm_vin_neg = vin_mv < 0;

  initial forever #(1849.93) cnt1_sig_clk = ~cnt1_sig_clk;      // 270,280 Hz
  initial begin #7.1; forever #(195.3125) vcm_clk[0] = ~vcm_clk[0]; end  // 2.56 MHz = 512 x 5 kHz
  initial begin #3.3; forever #(390.625) vcm_clk[1] = ~vcm_clk[1]; end   // 1.28 MHz = 256 x 5 kHz
  initial forever #(100000) pltf_f1 = ~pltf_f1;                          // 5 kHz reference

  // ---------------- bookkeeping ----------------
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 40) $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Datex contacts for a five-digit position (see the shaft-encoder code)
  function automatic logic [20:1] contacts(input int pos);
    logic [3:0] c [10] = '{4'b0001, 4'b0011, 4'b0010, 4'b0110, 4'b0100,
                           4'b1100, 4'b1110, 4'b1010, 4'b1011, 4'b1001};
    int dig [5], shown [5];
    logic [20:1] r;
    for (int k = 0; k < 5; k++) begin dig[k] = pos % 10; pos /= 10; end
    shown[2] = dig[2]; shown[4] = dig[4];
    shown[1] = (dig[2] % 2) ? 9 - dig[1] : dig[1];
    shown[0] = (dig[1] % 2) ? 9 - dig[0] : dig[0];
    shown[3] = (dig[4] % 2) ? 9 - dig[3] : dig[3];
    for (int k = 0; k < 5; k++) {r[4*k+4], r[4*k+3], r[4*k+2], r[4*k+1]} = c[shown[k]];
    return r;
  endfunction

  function automatic gate_word_t bcd5(input int v);
    gate_word_t w;
    for (int k = 0; k < 5; k++) begin w[4*k +: 4] = 4'(v % 10); v /= 10; end
    return w;
  endfunction

  function automatic int bcd_val(input logic [31:0] b);
    int v = 0;
    for (int i = 7; i >= 0; i--) v = v * 10 + int'(b[4*i +: 4]);
    return v;
  endfunction

  // value of each source as seen by the design right now
  function automatic gate_word_t source(input int g);
    case (g)
      0: return date_word;       1: return line_word;
      2: return cnt_value[0][19:0]; 3: return {8'h00, cnt_value[0][31:20]};
      4: return cnt_value[1][19:0]; 5: return {8'h00, cnt_value[1][31:20]};
      6: return cnt_value[2][19:0]; 7: return {8'h00, cnt_value[2][31:20]};
      8: return camera_lamps;    9: return enc_word[0];   10: return enc_word[1];
      11: return shaft3_word;    12: return dop_miles_word; 13: return dop_incr_word;
      14: return dop_drift_word; default: return dvm_word;
    endcase
  endfunction

  // mechanism counters
  int m_scan_clock = 0, m_scan_doppler = 0, m_scan_manual = 0, m_rr_div = 0, m_rr_free = 0, m_rr_manual = 0;
  int m_irg = 0, m_block_gate0 = 0, m_read_test = 0, m_wait_hold = 0, m_camera = 0, m_cam_marker = 0;
  int m_tm_sample = 0, m_da_direct = 0, m_dvm = 0, m_dvm_neg = 0, m_cnt [3] = '{0, 0, 0};
  int m_enc_auto = 0, m_enc_manual = 0, m_f2 = 0, m_tc_sample = 0, m_pen = 0, m_set = 0, m_sync = 0;
  int n_dop = 0, m_records = 0, m_scans = 0, m_ignored_seen = 0, m_gate [16];
  int n_req13 = 0;

  // ---------------- tape decoding ----------------
  gate_word_t at_transfer [16];
  gate_word_t last_rec [16];
  logic [3:0] data_chars [$];
  int last_gate = -1;
  logic [2:0] char_no_d = '0;
  logic cam_d = 0, f2_d = 0, pen_d = 0;

  always @(posedge clk) if (rst_n) begin
    char_no_d <= char_no;
    if (char_no == 3'd1 && char_no_d != 3'd1) at_transfer[gate_no] = source(int'(gate_no));
    n_dop += int'(doppler_pulse);
    if (scan_pulse) begin
      m_scans++; last_gate = -1;
      case (scan_src) SCAN_SRC_CLOCK: m_scan_clock++; SCAN_SRC_DOPPLER: m_scan_doppler++; default: m_scan_manual++; endcase
    end
    if (rr_pulse) case (rr_src) RR_SRC_DIVIDER: m_rr_div++; RR_SRC_FREE: m_rr_free++; default: m_rr_manual++; endcase
    if (rec_irg) begin m_irg++; check(!rec_strobe, "no strobe with the gap"); end
    if (rec_strobe) begin
      if (!rec_char[5]) data_chars.push_back(rec_char[3:0]);
      else begin : record
        int g;
        gate_word_t w;
        g = int'(rec_char[3:0]);
        m_records++; m_gate[g]++;
        check(data_chars.size() == 5, $sformatf("gate %0d record has %0d data characters", g, data_chars.size()));
        check(g > last_gate, $sformatf("gate %0d after gate %0d", g, last_gate));
        last_gate = g;
        w = '0;
        for (int i = 0; i < 5 && i < data_chars.size(); i++) w[4*i +: 4] = data_chars[i];
        data_chars.delete();
        last_rec[g] = w;
        check(w == at_transfer[g], $sformatf("gate %0d recorded %h, source had %h", g, w, at_transfer[g]));
        // independent expectations
        case (g)
          0: check(w == date_word, "date");
          1: check(w == line_word, "line number");
          2, 3: check(w == 0 || (bcd_val(cnt_value[0]) >= 27027 && bcd_val(cnt_value[0]) <= 27029), "counter 1 reads 270,280 Hz for 0.1 s");
          8: check(w[7] == 1'b0 || m_cam_marker > 0, "time code");
          9: check(w == bcd5(12345), "shaft position 1");
          10: check(w == bcd5(98760), "shaft position 2 (manual sample)");
          11, 14: m_ignored_seen++;
          12: check(w == dop_miles_word, "doppler miles");
          13: begin check(w == dop_incr_word, "doppler increment"); m_read_test++; end
          15: check(w == {3'b0, 1'(vin_mv < 0), 3'b0, 1'(abs(vin_mv) / 512), 1'b0, 3'((abs(vin_mv) / 64) % 8),
                           1'b0, 3'((abs(vin_mv) / 8) % 8), 1'b0, 3'(abs(vin_mv) % 8)} || at_transfer[15] == 0,
                      $sformatf("voltmeter %h for %0d mV", w, vin_mv));
          default: ;
        endcase
        if (g == 0) m_block_gate0++;
      end
    end
    // tape monitor: the word of the monitored gate as written
    if (tm_sample) begin
      m_tm_sample++;
      check(tm_sr_q == last_rec[tm_gate_sel], $sformatf("tape monitor %h, tape %h", tm_sr_q, last_rec[tm_gate_sel]));
    end
    // direct D/A: the transferred word, digits 10^1 10^0
    if (da_read) begin
      m_da_direct++;
      check(dm_sr_q[19:0] == at_transfer[ptu_sel], "direct monitor register holds the transferred word");
    end
    cam_d <= camera;
    if (camera && !cam_d) begin m_camera++; if (camera_lamps[7]) m_cam_marker++; end
    if (dvm_done) begin m_dvm++; if (dvm_word[16]) m_dvm_neg++; end
    for (int i = 0; i < 3; i++) if (cnt_new[i]) m_cnt[i]++;
    m_enc_auto += int'(enc_sampled[0]); m_enc_manual += int'(enc_sampled[1]);
    f2_d <= pltf_f2[0];
    if (pltf_f2[0] && !f2_d) m_f2++;
    m_tc_sample += int'(tc_sample);
    pen_d <= pen;
    if (pen && !pen_d) m_pen++;
    if (gate_no == 4'd12 && scan_active && !test_ff[12] && rr_pulse) m_wait_hold++;
  end

  function automatic int abs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // gate 12's source asks to be read on three scans out of four, 20 ms after the scan pulse
  initial forever begin
    @(posedge clk);
    if (rst_n && scan_pulse && $urandom % 4 != 0) begin
      repeat (20_000) @(posedge clk);
      #1 req12 = 1'b1; @(posedge clk); #1 req12 = 1'b0;
    end
  end

  // D/A levels one cycle after their read pulses
  logic da_read_d = 0, tm_sample_d = 0;
  always @(posedge clk) if (rst_n) begin
    da_read_d <= da_read; tm_sample_d <= tm_sample;
    if (da_read_d) check(da_direct_level == 17'(10 * int'(dm_sr_q[7:4]) + int'(dm_sr_q[3:0])) ||
                         da_direct_level == 17'(10 * int'(at_transfer[ptu_sel][7:4]) + int'(at_transfer[ptu_sel][3:0])),
                         "direct D/A level");
    if (tm_sample_d) check(da_tape_level == 17'(10 * int'(last_rec[tm_gate_sel][7:4]) + int'(last_rec[tm_gate_sel][3:0])),
                           "tape D/A level");
  end

  // counter frequency checks on every new count
  always @(posedge clk) if (rst_n) begin
    if (cnt_new[1]) check(bcd_val(cnt_value[1]) >= 25599 && bcd_val(cnt_value[1]) <= 25601,
                          $sformatf("counter 2: %0d for 2.56 MHz, 10 ms", bcd_val(cnt_value[1])));
    if (cnt_new[2]) check(bcd_val(cnt_value[2]) >= 1279 && bcd_val(cnt_value[2]) <= 1281,
                          $sformatf("counter 3: %0d for 1.28 MHz, 1 ms", bcd_val(cnt_value[2])));
  end

  task automatic press(ref logic s);
    s = 1'b1; @(posedge clk); #1 s = 1'b0;
  endtask

  // ---------------- the flight ----------------
  initial begin
    int t0, per;
    for (int g = 0; g < 16; g++) begin gate_mode[g] = GSEL_READ; m_gate[g] = 0; at_transfer[g] = '0; last_rec[g] = '0; end
    gate_mode[0] = GSEL_READ_TEST; gate_mode[1] = GSEL_READ_TEST;
    gate_mode[11] = GSEL_IGNORE;   gate_mode[14] = GSEL_IGNORE;
    gate_mode[12] = GSEL_WAIT_TEST; gate_mode[13] = GSEL_READ_TEST;
    cnt_init_src = '{INIT_ONE_SEC, INIT_HALF_SEC, INIT_SCAN};
    cnt_count_time = '{CT_100MS, CT_10MS, CT_1MS};
    enc_t[0] = contacts(12345); enc_t[1] = contacts(98760);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // set the clock: 10,000 PPS into the display for 0.2036 s = 2036 s -> 00:33:56
    set_mode = 1; set_rate_btn = 5'b00001;
    repeat (203_600) @(posedge clk); #1;
    set_rate_btn = '0; set_mode = 0;
    m_set = (int'(min_t) * 10 + int'(min_u) == 33) ? 1 : 0;
    check(m_set == 1, $sformatf("clock set to %0d%0d:%0d%0d", min_t, min_u, sec_t, sec_u));

    // navigator samples encoder 2, then its contacts move without a new sample
    begin enc_btn[1] = 1'b1; @(posedge clk); #1 enc_btn[1] = 1'b0; end
    repeat (10) @(posedge clk); #1 enc_t[1] = contacts(11111);

    // synchronise: ADVANCE FAST for a while, the second shortens to 0.4 s
    sw_fast = 1;
    @(posedge p1); t0 = $time;
    @(posedge p1); per = ($time - t0) / 1000;
    sw_fast = 0;
    check(per == 400_000, $sformatf("advanced second %0d cycles", per));
    m_sync++;

    // survey: about 5 s on the clock scan source
    fork
      begin
        repeat (5) begin
          repeat (700_000) @(posedge clk); #1;
          press(req13); n_req13++;
          repeat (300_000) @(posedge clk); #1;
        end
      end
      begin
        repeat (1_300_000) @(posedge clk); #1 press(cam_btn);
        repeat (1_000_000) @(posedge clk); #1 vin_mv = -700;
        press(dvm_btn);
      end
    join

    // doppler scan source: a pulse every 5 ms, 5*4 pulses per scan (0.1 s)
    scan_src = SCAN_SRC_DOPPLER; rr_src = RR_SRC_FREE;
    fork
      begin repeat (120) begin repeat (4999) @(posedge clk); #1 press(doppler_pulse); end end
      begin repeat (600) begin repeat (999) @(posedge clk); #1 press(rr_ext_pulse); end end
    join

    // by hand: one scan, recording-rate pulses from the button
    scan_src = SCAN_SRC_MANUAL; rr_src = RR_SRC_MANUAL;
    repeat (40_000) @(posedge clk); #1;
    press(scan_btn);
    repeat (120) begin repeat (50) @(posedge clk); #1 press(rr_btn); end
    repeat (100) @(posedge clk); #1;

    // ---------------- mechanism census ----------------
    $display("doppler pulses %0d", n_dop);
    $display("scans clock/doppler/manual %0d/%0d/%0d, RR div/free/manual %0d/%0d/%0d, records %0d, IRG %0d",
             m_scan_clock, m_scan_doppler, m_scan_manual, m_rr_div, m_rr_free, m_rr_manual, m_records, m_irg);
    $display("gate0 %0d, read-test %0d, wait-hold %0d, camera %0d (marker %0d), tape monitor %0d, D/A %0d, DVM %0d (neg %0d)",
             m_block_gate0, m_read_test, m_wait_hold, m_camera, m_cam_marker, m_tm_sample, m_da_direct, m_dvm, m_dvm_neg);
    $display("counters %0d %0d %0d, encoders auto %0d manual %0d, f2 %0d, time code samples %0d, pen %0d",
             m_cnt[0], m_cnt[1], m_cnt[2], m_enc_auto, m_enc_manual, m_f2, m_tc_sample, m_pen);
    check(m_scan_clock >= 20 && m_scan_doppler >= 2 && m_scan_manual == 1, "scan sources");
    // at 0.1 s per doppler scan a gap overlaps the next scan pulse, which is refused
    check(n_dop / 20 - m_scan_doppler >= 1, $sformatf("scan refused during a gap (%0d)", n_dop / 20 - m_scan_doppler));
    check(m_rr_div > 1000 && m_rr_free > 200 && m_rr_manual == 120, "RR sources");
    check(m_irg >= 10, "inter-record gaps");
    check(m_block_gate0 >= m_irg - 2 && m_block_gate0 <= m_irg, "date read once per block");
    check(m_gate[1] == m_block_gate0, "line number with the date");
    check(m_read_test >= 1 && m_read_test <= n_req13, "read-if-tested gate");
    check(m_wait_hold > 0, "sequence waited for a test");
    check(m_gate[12] >= 1, "waiting gate read after its request");
    check(m_ignored_seen == 0, "ignored gates never written");
    check(m_gate[15] >= 10 && m_gate[9] >= 10 && m_gate[2] >= 10, "regular gates");
    check(m_camera >= m_scan_clock / 2 - 1 && m_cam_marker == 1, "camera and manual frame");
    check(m_tm_sample >= 10, "tape monitor samples");
    check(m_da_direct >= 10, "direct D/A reads");
    check(m_dvm >= 20 && m_dvm_neg >= 1, "voltmeter conversions");
    check(m_cnt[0] >= 4 && m_cnt[1] >= 8 && m_cnt[2] >= 20, "counter measurements");
    check(m_enc_auto > 1000 && m_enc_manual == 1, "encoder sampling");
    check(m_f2 >= 30000 && m_f2 <= 40000, "tracking-filter divider output at 5 kHz");
    check(m_tc_sample >= 1 && m_pen >= 1, "time code on the pen");
    check(n_parity_errors == 0 && n_chars == 6 * m_records, "odd parity on every character");
    check(n_strobes_in_gap == 0, "nothing written during a gap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
