// lidar_tdc_pkg: widths and record types shared by the multi-stop TDC.
//
// A time tag is 48 bits: an 8-bit channel identifier above a 40-bit time.
// The time is a 28-bit coarse count of 8 ns system-clock periods followed
// by 12 fractional bits, so one time LSB is 8 ns / 4096 = 1.95 ps and the
// time wraps after 2^28 * 8 ns = 2.147 s. These widths are the design's
// published ones. A correlator result reuses the same layout: the channel
// of the STOP tag and the 40-bit STOP-minus-START delta. Channel
// identifiers are the zero-based channel index (this design's choice).
`timescale 1ps/1ps
package lidar_tdc_pkg;

  localparam int unsigned COARSE_BITS = 28;
  localparam int unsigned FINE_BITS   = 12;
  localparam int unsigned CHAN_BITS   = 8;
  localparam int unsigned TIME_BITS   = COARSE_BITS + FINE_BITS;  // 40
  localparam int unsigned TAG_BITS    = CHAN_BITS + TIME_BITS;    // 48

  typedef logic [COARSE_BITS-1:0] coarse_t;
  typedef logic [FINE_BITS-1:0]   fine_t;
  typedef logic [CHAN_BITS-1:0]   chan_t;
  typedef logic [TIME_BITS-1:0]   stamp_t;

  // Time tag produced by one TDC channel.
  typedef struct packed {
    chan_t  chan;
    stamp_t stamp;
  } tag_t;

  // Delta-time record written to the output FIFO.
  typedef struct packed {
    chan_t  chan;   // STOP channel the delta belongs to
    stamp_t delta;  // T_STOP - T_START in 1.95 ps units
  } result_t;

  // Controller stages of the tag correlator.
  typedef enum logic [2:0] {
    CORR_INIT = 3'd0,
    CORR_IDLE = 3'd1,
    CORR_SET  = 3'd2,
    CORR_CALC = 3'd3,
    CORR_SEND = 3'd4
  } corr_state_t;

  // Phases of a channel's code-density calibration.
  typedef enum logic [1:0] {
    CAL_CLEAR   = 2'd0,
    CAL_COLLECT = 2'd1,
    CAL_SUM     = 2'd2,
    CAL_RUN     = 2'd3
  } cal_state_t;

endpackage
