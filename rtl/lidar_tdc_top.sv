// lidar_tdc_top: eight-channel multi-stop timing analyser for LIDAR.
//
// Each input (channel 0 = START from the laser, channels 1..7 = STOPs from
// single-photon detectors) drives its own 512-stage tapped delay line and
// flash TDC channel. All channels read one shared 28-bit coarse counter,
// so their 48-bit tags lie on one time axis with 1.95 ps LSB. The tag
// serialiser merges the tags of all channels, the tag correlator keeps the
// latest START and turns every STOP into a STOP-minus-START delta, and the
// deltas wait in a FIFO for the host link (the USB 3.0 interface is outside
// this RTL: its FIFO read port is a port of this module).
// Calibration: while a channel is not calibrated, its delay line is fed
// from cal_trigger instead of its input. cal_trigger must be a pulse
// train uncorrelated with clk (e.g. from a separate oscillator). All
// channels calibrate after reset and again on cal_start; the correlator
// starts work when all of them are done (cal_done).
// The delay lines are simulation models of the FPGA carry chains; all
// other blocks are synthesizable. clk is the 125 MHz system clock; the
// channel count, line length and tag widths are the published ones, the
// calibration length and buffer depths are this design's choices.
`timescale 1ps/1ps
module lidar_tdc_top
  import lidar_tdc_pkg::*;
#(
  parameter int unsigned N_CHANNELS  = 8,
  parameter int unsigned N_TAPS      = 512,
  parameter int unsigned CAL_LOG2    = 16,
  parameter int unsigned BATCH_DEPTH = 16,
  parameter int unsigned OUT_DEPTH   = 1024,
  parameter chan_t       REF_CHANNEL = '0,
  parameter coarse_t     COARSE_RESET = '0
) (
  input  logic                    clk,          // 125 MHz system clock
  input  logic                    rst_n,
  input  logic [N_CHANNELS-1:0]   hit_in,       // detector inputs, asynchronous
  input  logic                    cal_trigger,  // calibration pulses, asynchronous
  input  logic                    cal_start,    // re-run the calibration
  output logic                    cal_done,     // every channel calibrated
  // result FIFO read port towards the host link
  input  logic                    fifo_rd_en,
  output result_t                 fifo_dout,
  output logic                    fifo_empty,
  output logic [$clog2(OUT_DEPTH):0] fifo_count,
  // status
  output logic [31:0]             tags_dropped,
  output corr_state_t             corr_state,
  output logic                    wrap_fixed,
  output logic                    stop_orphan
);

  coarse_t               coarse;
  logic [N_CHANNELS-1:0] ch_cal_done, line_in, tag_valid;
  logic [N_TAPS-1:0]     taps [N_CHANNELS];
  tag_t                  tags [N_CHANNELS];

  coarse_counter #(.WIDTH(COARSE_BITS), .RESET_VALUE(COARSE_RESET)) u_coarse (
    .clk, .rst_n, .count(coarse)
  );

  for (genvar c = 0; c < N_CHANNELS; c++) begin : g_ch
    assign line_in[c] = ch_cal_done[c] ? hit_in[c] : cal_trigger;

    tdc_delay_line #(.N_TAPS(N_TAPS)) u_line (.hit(line_in[c]), .taps(taps[c]));

    tdc_channel #(.N_TAPS(N_TAPS), .CAL_LOG2(CAL_LOG2), .CHANNEL_ID(chan_t'(c))) u_tdc (
      .clk, .rst_n, .taps(taps[c]), .coarse, .cal_start,
      .cal_done(ch_cal_done[c]),
      .tag_valid(tag_valid[c]), .tag(tags[c])
    );
  end

  assign cal_done = &ch_cal_done;

  logic ser_valid, ser_ready;
  tag_t ser_tag;

  tag_serialiser #(.N_CHANNELS(N_CHANNELS), .BATCH_DEPTH(BATCH_DEPTH)) u_ser (
    .clk, .rst_n, .in_valid(tag_valid), .in_tag(tags),
    .out_valid(ser_valid), .out_ready(ser_ready), .out_tag(ser_tag),
    .dropped(tags_dropped)
  );

  logic    res_wr, res_full;
  result_t res;

  tag_correlator #(.REF_CHANNEL(REF_CHANNEL)) u_corr (
    .clk, .rst_n, .cal_done,
    .in_valid(ser_valid), .in_ready(ser_ready), .in_tag(ser_tag),
    .res_wr, .res, .res_full,
    .state(corr_state), .wrap_fixed, .stop_orphan
  );

  sync_fifo #(.WIDTH($bits(result_t)), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .wr_en(res_wr), .din(res), .full(res_full),
    .rd_en(fifo_rd_en), .dout(fifo_dout), .empty(fifo_empty), .count(fifo_count)
  );

endmodule
