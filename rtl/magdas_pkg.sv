// Shared types and constants of the magnetometer-survey data acquisition chassis.
//
// The whole digital system runs from one 1 MHz frequency standard. Every block is
// synchronous to that clock and exchanges single-cycle strobes ("pulses") with its
// neighbours; the one-shot multivibrators of the original micrologic become such
// strobes. Decimal data travel as 8-4-2-1 (BCD) digits, five digits (20 bits) per
// data source, sixteen data sources ("gates") per scan.
//
// The numbers below follow the document (1 MHz standard, 16 gates, 20-bit gate
// words, 4-bit recording characters, 6 recording-rate pulses per read gate). The
// enumerations encode front-panel switch positions; their numeric codes are this
// design's own.
package magdas_pkg;

  localparam int unsigned F_STD_HZ    = 1_000_000; // frequency standard
  localparam int unsigned N_GATES     = 16;        // interface gates 0..15
  localparam int unsigned GATE_BITS   = 20;        // five 8-4-2-1 digits per gate
  localparam int unsigned CHAR_BITS   = 4;         // bits recorded per strobe
  localparam int unsigned CHARS_GATE  = 6;         // 5 data characters + gate identifier

  typedef logic [3:0] bcd_t;
  typedef logic [GATE_BITS-1:0] gate_word_t;

  // Gate selector switch (SWA-11..SWA-29) positions, one per gate.
  typedef enum logic [1:0] {
    GSEL_WAIT_TEST = 2'd0, // hold the sequence at this gate until its Test flip-flop is set
    GSEL_READ_TEST = 2'd1, // read the gate if its Test flip-flop is set, otherwise ignore it
    GSEL_IGNORE    = 2'd2, // never read this gate
    GSEL_READ      = 2'd3  // read this gate on every scan
  } gate_sel_e;

  // Source of the rate-of-scan pulses (SWA-10 and the test push-button).
  typedef enum logic [1:0] {
    SCAN_SRC_CLOCK   = 2'd0, // 100 PPS from the digital clock
    SCAN_SRC_DOPPLER = 2'd1, // distance pulses from the doppler radar
    SCAN_SRC_MANUAL  = 2'd2  // one scan per push of the test button
  } scan_src_e;

  // Source of the recording-rate (RR) pulses (SWA-31A).
  typedef enum logic [1:0] {
    RR_SRC_DIVIDER = 2'd0, // 1000 PPS divided by the selected factor
    RR_SRC_FREE    = 2'd1, // free-running multivibrator (external strobe)
    RR_SRC_MANUAL  = 2'd2  // one RR pulse per push of the test button
  } rr_src_e;

  // Count time of the high speed counters (SWC-11/13/15 with SWC-5/7/9).
  typedef enum logic [2:0] {
    CT_1MS   = 3'd0,
    CT_10MS  = 3'd1,
    CT_100MS = 3'd2,
    CT_200MS = 3'd3,
    CT_1S    = 3'd4,
    CT_10S   = 3'd5
  } count_time_e;

  // Initiate (reset interval) source of the high speed counters (SWC-19/21/23).
  typedef enum logic [2:0] {
    INIT_HALF_SEC = 3'd0, // 2 PPS from the digital clock
    INIT_ONE_SEC  = 3'd1, // 1 PPS from the digital clock
    INIT_FREE     = 3'd2, // free-running multivibrator (external strobe)
    INIT_SCAN     = 3'd3, // once per scan
    INIT_MANUAL   = 3'd4  // push button only
  } init_src_e;

  // Odd parity bit (C track) over the six other tracks of a tape character.
  function automatic logic odd_parity(input logic [5:0] bits);
    return ~(^bits);
  endfunction

endpackage
