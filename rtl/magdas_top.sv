// Airborne magnetometer-survey data acquisition chassis: top level.
//
// Sixteen data sources ("interface gates") are scanned at a rate set by the clock
// or by distance flown, and each selected source's 20-bit word (five decimal
// digits) is written to an incremental magnetic tape recorder four bits per
// character, followed by a character carrying the gate number in the B track. Data
// blocks of 2^k scans are separated by inter-record gaps. Everything runs from the
// 1 MHz frequency standard (clk).
//
// Wiring (gate number: source):
//   0 date, 1 line number (thumbwheels, read once per block: their Test flip-flops
//   are set by the inter-record gap); 2/3, 4/5, 6/7 high speed counters 1, 2, 3
//   (less / more significant digits); 8 time of day; 9, 10 shaft position encoders
//   1 and 2; 11 shaft position 3; 12, 13, 14 doppler miles, mile increments and
//   drift; 15 digital voltmeter (radio altimeter).
// Sources whose logic is not part of this design (thumbwheels, doppler cards, the
// third shaft position, analog front ends, the recorder) are ports. Counters 2 and 3
// count the two tracking filters' multivibrator outputs (vcm_clk), counter 1 its own
// input. The voltmeter is started by its button and by every scan pulse.
//
// The direct-monitor shift register holds the word being recorded; its recording
// position, the B bit for the identifier character and an odd parity bit form the
// seven-track character {C, B, A, 8, 4, 2, 1} that rec_strobe writes. The tape
// monitor rebuilds the words from the recorder's read-back and samples the selected
// gate's word. Two D/A monitors show two digits of the direct and tape words.
//
// Timing: see the blocks. All pulse ports are one-cycle strobes on clk except the
// counter and tracking-filter signal clocks.
//
// From the document: the blocks, the gate assignment and the data flow. This
// design's own: the port-level interface of the parts left outside, the parity
// generation in the chassis, and starting the voltmeter on every scan.
module magdas_top
  import magdas_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // ---- digital clock switches ----
  input  logic        sw_retard,
  input  logic        sw_fast,
  input  logic        sw_slow,
  input  logic        set_mode,
  input  logic [4:0]  set_rate_btn,
  // ---- master recorder control switches and inputs ----
  input  scan_src_e   scan_src,
  input  logic        doppler_pulse,
  input  logic        scan_btn,
  input  logic [3:0]  scan_div,
  input  rr_src_e     rr_src,
  input  logic        rr_ext_pulse,
  input  logic        rr_btn,
  input  logic [3:0]  rr_div,
  input  logic [3:0]  cam_div,
  input  logic        cam_btn,
  input  logic [3:0]  blk_sel,
  input  gate_sel_e   gate_mode [N_GATES],
  input  logic [3:0]  ptu_sel,
  // ---- sources outside the design ----
  input  gate_word_t  date_word,
  input  gate_word_t  line_word,
  input  gate_word_t  shaft3_word,
  input  gate_word_t  dop_miles_word,
  input  gate_word_t  dop_incr_word,
  input  gate_word_t  dop_drift_word,
  input  logic [N_GATES-1:0] test_req,    // sources' read requests
  // ---- recorder ----
  input  logic        rec_irg_busy,
  input  logic        rec_fcc,            // flux check complete
  input  logic [3:0]  rec_rd_char,
  input  logic        rec_rd_b,
  output logic [6:0]  rec_char,           // {C, B, A, 8, 4, 2, 1}
  output logic        rec_strobe,
  output logic        rec_irg,
  // ---- monitors ----
  input  logic [3:0]  tm_gate_sel,
  input  logic [1:0]  da_direct_range,
  input  logic [1:0]  da_tape_range,
  output logic [23:0] dm_sr_q,
  output logic [19:0] tm_sr_q,
  output logic        da_read,
  output logic        tm_sample,
  output logic [16:0] da_direct_level,
  output logic [16:0] da_tape_level,
  output logic [7:0]  printer_gate_code,
  // ---- digital voltmeter analog side ----
  input  logic        dvm_btn,
  input  logic        dvm_ramp_reached,
  input  logic        dvm_vin_neg,
  output logic [9:0]  dvm_ramp_code,
  output gate_word_t  dvm_word,
  // ---- high speed counters ----
  input  logic        cnt1_sig_clk,
  input  init_src_e   cnt_init_src [3],
  input  count_time_e cnt_count_time [3],
  input  logic [2:0]  cnt_free_pulse,
  input  logic [2:0]  cnt_manual_btn,
  output logic [31:0] cnt_value [3],
  output logic [2:0]  cnt_new,
  // ---- phase lock tracking filters (digital part) ----
  input  logic [1:0]  vcm_clk,
  input  logic [1:0]  pltf_f1,
  input  logic [1:0]  pltf_div256,
  output logic [1:0]  pltf_f2,
  output logic [1:0]  pltf_f3,
  // ---- shaft position encoders ----
  input  logic [20:1] enc_t [2],
  input  logic [1:0]  enc_auto,
  input  logic [1:0]  enc_btn,
  output gate_word_t  enc_word [2],
  // ---- clock outputs ----
  output logic        p1,
  output logic        p2,
  output logic        p10,
  output logic        p100,
  output logic        p1000,
  output logic        p1min,
  output bcd_t        sec_u, sec_t, min_u, min_t, hr_u, hr_t,
  output gate_word_t  camera_lamps,
  output logic        pen,
  output logic        camera,
  // ---- sequence status ----
  output logic        scan_pulse,
  output logic        rr_pulse,
  output logic [3:0]  gate_no,
  output logic        eog,
  output logic [2:0]  char_no,            // counter A
  output logic        scan_active,
  output logic [N_GATES-1:0] test_ff,
  output logic [8:0]  blk_count,
  output logic        tc_sample,          // time code bit sampled onto the pen
  output logic        tc_bit,
  output logic        dvm_done,
  output logic        dvm_overrange,
  output logic [2:0]  cnt_busy,
  output logic [1:0]  enc_sampled
);
  // ---------------- digital clock and time code ----------------
  logic p100k, p10s, frame_marker;
  gate_word_t time20;
  logic [13:0] tc_q;

  digital_clock u_clock (
    .clk, .rst_n, .sw_retard, .sw_fast, .sw_slow, .set_mode, .set_rate_btn,
    .frame_marker, .p100k, .p1000, .p100, .p10, .p2, .p1, .p10s, .p1min,
    .sec_u, .sec_t, .min_u, .min_t, .hr_u, .hr_t, .time20
  );
  assign camera_lamps = time20;

  time_code_control u_tcc (
    .clk, .rst_n, .p1, .p10, .min_u, .min_t, .hr_u, .hr_t, .sec_u, .sec_t,
    .pen, .sr_q(tc_q), .sample(tc_sample), .sample_bit(tc_bit)
  );

  // ---------------- master recorder control ----------------
  logic eog_last, irg_pulse, test_ok, ignore, transfer, shift, strobe, id_char;
  logic gate_open;
  logic [N_GATES-1:0] b, gate_transfer;

  mrc_rate_gen u_rates (
    .clk, .rst_n, .scan_src, .p100, .doppler_pulse, .scan_btn, .scan_div,
    .irg_busy(rec_irg_busy), .scan_pulse, .rr_src, .p1000, .rr_ext_pulse, .rr_btn,
    .rr_div, .rr_pulse, .cam_div, .cam_btn, .camera, .frame_marker, .blk_sel,
    .eog_last, .irg_pulse, .blk_count
  );
  assign rec_irg = irg_pulse;

  pulse_sequence_timer u_seq (
    .clk, .rst_n, .scan_pulse, .irg_busy(rec_irg_busy), .rr_pulse, .test_ok, .ignore,
    .cnt_a(char_no), .cnt_b(gate_no), .scan_active, .gate_open, .transfer, .shift, .strobe,
    .id_char, .eog, .eog_last
  );

  ptu_control u_ptu (
    .clk, .rst_n, .cnt_b(gate_no), .gate_mode, .test_ff, .transfer, .ptu_sel,
    .b, .test_ok, .ignore, .gate_transfer, .da_read, .printer_gate_code
  );

  // ---------------- data sources ----------------
  gate_word_t cnt_lsd [3];
  gate_word_t cnt_msd [3];
  gate_word_t src [N_GATES];
  gate_word_t gate_bus [N_GATES];
  logic [2:0] cnt_gate, cnt_clear, cnt_xfer;

  for (genvar i = 0; i < 3; i++) begin : g_cnt
    hs_counter u_cnt (
      .clk, .rst_n,
      .sig_clk(i == 0 ? cnt1_sig_clk : vcm_clk[i-1]),
      .init_src(cnt_init_src[i]), .count_time(cnt_count_time[i]),
      .p2, .p1, .free_pulse(cnt_free_pulse[i]), .scan_pulse,
      .manual_btn(cnt_manual_btn[i]), .count_q(cnt_value[i]),
      .lsd_word(cnt_lsd[i]), .msd_word(cnt_msd[i]), .gate(cnt_gate[i]),
      .clear(cnt_clear[i]), .xfer(cnt_xfer[i]),
      .busy(cnt_busy[i]), .new_count(cnt_new[i])
    );
  end

  for (genvar i = 0; i < 2; i++) begin : g_pltf
    pltf_divider u_pltf (
      .vcm_clk(vcm_clk[i]), .rst_n, .div256(pltf_div256[i]), .f1(pltf_f1[i]),
      .f2(pltf_f2[i]), .f3(pltf_f3[i])
    );
  end

  for (genvar i = 0; i < 2; i++) begin : g_enc
    datex_decoder u_enc (
      .clk, .rst_n, .t(enc_t[i]), .auto_mode(enc_auto[i]), .sample_btn(enc_btn[i]),
      .word(enc_word[i]), .sampled(enc_sampled[i])
    );
  end

  logic dvm_busy, dvm_negative;
  logic [9:0] dvm_count;
  dvm_ramp u_dvm (
    .clk, .rst_n, .start(dvm_btn || scan_pulse), .ramp_reached(dvm_ramp_reached),
    .vin_neg(dvm_vin_neg), .ramp_code(dvm_ramp_code), .busy(dvm_busy), .done(dvm_done),
    .count(dvm_count), .negative(dvm_negative), .overrange(dvm_overrange), .word(dvm_word)
  );

  assign src[0]  = date_word;
  assign src[1]  = line_word;
  assign src[2]  = cnt_lsd[0];
  assign src[3]  = cnt_msd[0];
  assign src[4]  = cnt_lsd[1];
  assign src[5]  = cnt_msd[1];
  assign src[6]  = cnt_lsd[2];
  assign src[7]  = cnt_msd[2];
  assign src[8]  = time20;
  assign src[9]  = enc_word[0];
  assign src[10] = enc_word[1];
  assign src[11] = shaft3_word;
  assign src[12] = dop_miles_word;
  assign src[13] = dop_incr_word;
  assign src[14] = dop_drift_word;
  assign src[15] = dvm_word;

  // ---------------- interface gates and the shift-register bus ----------------
  gate_word_t bus;
  for (genvar g = 0; g < N_GATES; g++) begin : g_gate
    interface_gate u_gate (
      .clk, .rst_n, .data(src[g]), .transfer(gate_transfer[g]),
      .test_set(test_req[g] || (g < 2 ? irg_pulse : 1'b0)),
      .bus_out(gate_bus[g]), .test_ff(test_ff[g])
    );
  end

  always_comb begin
    bus = '0;
    for (int g = 0; g < N_GATES; g++) bus |= gate_bus[g];
  end

  // ---------------- direct monitor shift register and recorder character ----------------
  logic [3:0] rec_bits;
  data_shift_register #(.WORDS(6)) u_dm_sr (
    .clk, .rst_n, .load(transfer), .shift, .d({gate_no, bus}), .top_in(4'd0),
    .q(dm_sr_q), .rec_out(rec_bits)
  );

  assign rec_strobe = strobe;
  assign rec_char   = {odd_parity({id_char, 1'b0, rec_bits}), id_char, 1'b0, rec_bits};

  // ---------------- tape monitor ----------------
  tape_monitor_control u_tm (
    .clk, .rst_n, .fcc(rec_fcc), .rd_char(rec_rd_char), .rd_b(rec_rd_b),
    .gate_sel(tm_gate_sel), .sr_q(tm_sr_q), .sample(tm_sample)
  );

  // ---------------- D/A monitors ----------------
  bcd_t dad_lo, dad_hi, dat_lo, dat_hi;
  da_converter u_da_direct (
    .clk, .rst_n, .word(dm_sr_q[19:0]), .read(da_read), .range(da_direct_range),
    .lo(dad_lo), .hi(dad_hi), .level(da_direct_level)
  );
  da_converter u_da_tape (
    .clk, .rst_n, .word(tm_sr_q), .read(tm_sample), .range(da_tape_range),
    .lo(dat_lo), .hi(dat_hi), .level(da_tape_level)
  );
endmodule
