// Master recorder control, rate generators (cards A5 and A10).
//
// Produces the four pulse trains that pace the recording system:
//  * Rate of scan: 100 PPS from the clock, or distance pulses from the doppler
//    radar, are divided by 5 and then by the scan-rate switch setting N (3..10);
//    with N = 8 a scan starts every 0.4 s. A test push-button can replace them.
//  * Recording rate (RR): 1000 PPS divided by M (2..10), i.e. 500..100 PPS
//    (125 PPS with M = 8); or an external free-running or manual RR pulse.
//  * Camera firing: the scan pulses divided by K (1..10), so the camera stays in
//    step with the scans whatever their source. A navigator's push-button fires an
//    extra frame at once and lights the frame-marker lamp until that camera pulse
//    ends.
//  * Block length and inter-record gap (IRG): accepted scans are counted by a
//    nine-stage binary counter; the block-length switch picks the stage, so a data
//    block holds 2^k scans (1..256). Once the block is complete, the IRG waits for
//    the End-of-Gate pulse of gate 15 and is then issued on the next RR pulse. The
//    IRG clears the block counter.
//
// Timing: every output pulse is a one-cycle strobe except camera (CAM_PULSE cycles)
// and frame_marker (a level). Division counters advance on their input strobes.
//
// From the document: /5 then /N for the scan rate (0.15-0.5 s), 1000 PPS / M for
// 100-500 PPS, camera /1..10 of scan pulses, manual frame marker, 1..256 scans per
// block with the IRG held until gate 15 is finished and released by the next RR
// pulse. This design's own: the power-of-two block-length settings (one switch
// position per counter stage), the camera pulse width and the switch encodings.
module mrc_rate_gen
  import magdas_pkg::*;
#(
  parameter int unsigned CAM_PULSE = 1000   // camera firing pulse width, clock cycles
) (
  input  logic       clk,
  input  logic       rst_n,
  // rate of scan
  input  scan_src_e  scan_src,
  input  logic       p100,          // 100 PPS from the clock
  input  logic       doppler_pulse, // doppler distance pulse
  input  logic       scan_btn,      // manual scan (test)
  input  logic [3:0] scan_div,      // N, 3..10
  input  logic       irg_busy,      // recorder is writing an inter-record gap
  output logic       scan_pulse,
  // recording rate
  input  rr_src_e    rr_src,
  input  logic       p1000,
  input  logic       rr_ext_pulse,  // free-running multivibrator
  input  logic       rr_btn,        // manual RR (test)
  input  logic [3:0] rr_div,        // M, 2..10
  output logic       rr_pulse,
  // camera
  input  logic [3:0] cam_div,       // K, 1..10
  input  logic       cam_btn,       // navigator's extra-frame button
  output logic       camera,
  output logic       frame_marker,
  // block length / IRG
  input  logic [3:0] blk_sel,       // k, 0..8 : 2^k scans per block
  input  logic       eog_last,      // End of Gate while counter B = 15
  output logic       irg_pulse,
  output logic [8:0] blk_count
);
  // ---------------- rate of scan ----------------
  logic src_pulse, pre_pulse;
  logic [2:0] pre_cnt;
  logic [3:0] scan_cnt;
  logic scan_raw;

  assign src_pulse = (scan_src == SCAN_SRC_CLOCK) ? p100 :
                     (scan_src == SCAN_SRC_DOPPLER) ? doppler_pulse : 1'b0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pre_cnt <= '0; pre_pulse <= 1'b0;
    end else begin
      pre_pulse <= 1'b0;
      if (src_pulse) begin
        if (pre_cnt == 3'd4) begin
          pre_cnt   <= '0;
          pre_pulse <= 1'b1;
        end else pre_cnt <= pre_cnt + 3'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scan_cnt <= '0; scan_raw <= 1'b0;
    end else begin
      scan_raw <= 1'b0;
      if (pre_pulse) begin
        if (scan_cnt >= scan_div - 4'd1) begin
          scan_cnt <= '0;
          scan_raw <= 1'b1;
        end else scan_cnt <= scan_cnt + 4'd1;
      end
    end
  end

  assign scan_pulse = ((scan_src == SCAN_SRC_MANUAL) ? scan_btn : scan_raw) && !irg_busy;

  // ---------------- recording rate ----------------
  logic [3:0] rr_cnt;
  logic rr_div_pulse;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rr_cnt <= '0; rr_div_pulse <= 1'b0;
    end else begin
      rr_div_pulse <= 1'b0;
      if (p1000) begin
        if (rr_cnt >= rr_div - 4'd1) begin
          rr_cnt       <= '0;
          rr_div_pulse <= 1'b1;
        end else rr_cnt <= rr_cnt + 4'd1;
      end
    end
  end

  always_comb begin
    unique case (rr_src)
      RR_SRC_DIVIDER: rr_pulse = rr_div_pulse;
      RR_SRC_FREE:    rr_pulse = rr_ext_pulse;
      RR_SRC_MANUAL:  rr_pulse = rr_btn;
      default:        rr_pulse = 1'b0;
    endcase
  end

  // ---------------- camera ----------------
  logic [3:0] cam_cnt;
  logic fire;
  logic [$clog2(CAM_PULSE+1)-1:0] cam_timer;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cam_cnt <= '0; cam_timer <= '0; frame_marker <= 1'b0;
    end else begin
      if (scan_pulse) cam_cnt <= (cam_cnt >= cam_div - 4'd1) ? 4'd0 : cam_cnt + 4'd1;
      if (cam_btn) frame_marker <= 1'b1;
      if (fire) cam_timer <= $bits(cam_timer)'(CAM_PULSE);
      else if (cam_timer != '0) begin
        cam_timer <= cam_timer - 1'b1;
        // trailing edge of the camera pulse clears the marker
        if (cam_timer == 1 && !cam_btn) frame_marker <= 1'b0;
      end
    end
  end
  assign fire   = (scan_pulse && (cam_cnt >= cam_div - 4'd1)) || cam_btn;
  assign camera = (cam_timer != '0);

  // ---------------- block length and IRG ----------------
  logic end_ff;       // gate 15 finished
  logic blk_full;
  assign blk_full = (blk_count >= (9'd1 << blk_sel[3:0]));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      blk_count <= '0; end_ff <= 1'b0; irg_pulse <= 1'b0;
    end else begin
      irg_pulse <= 1'b0;
      if (eog_last) end_ff <= 1'b1;
      if (scan_pulse && !blk_full) blk_count <= blk_count + 9'd1;
      if (rr_pulse && end_ff) begin
        end_ff <= 1'b0;
        if (blk_full) begin
          irg_pulse <= 1'b1;
          blk_count <= '0;
        end
      end
    end
  end

  // the block-length switch has nine positions
  always_ff @(posedge clk) if (rst_n) assert (blk_sel <= 4'd8);
endmodule
