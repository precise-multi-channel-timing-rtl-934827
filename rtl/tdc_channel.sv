// tdc_channel: one flash TDC channel, from delay-line taps to time tags.
//
// The taps of the channel's delay line are sampled on every rising clock
// edge into a register. The priority encoder turns the sampled thermometer
// into a 9-bit raw code: how far the latest rising edge has travelled. The
// code goes to the calibration block; in normal operation that block
// returns the calibrated 12-bit fine time and the tag former subtracts it
// from the coarse count of the sampling edge. During calibration the raw
// codes only fill the histogram and no tags leave the channel.
//
// Hit detection (this design's choice; the published design gives the 8 ns
// dead time but not the rule): tap 0 must be sampled high, and either it
// was low in the previous sample, or the run of ones from tap 0 is shorter
// than one clock period (code below the calibration's max_code), which
// means the input fell and rose again since the previous sample. So a
// channel can tag a hit in every clock period: each input pulse has to be
// high across at least one clock edge (8 ns or longer is always enough),
// while the low gap between pulses may be as short as one delay element.
// During calibration only the first form is used.
//
// Pipeline: sample edge k -> code register (k+1) -> look-up RAM (k+2) ->
// tag register (k+3); one tag per clock. Hits are ignored for three cycles
// after calibration ends, while edges of the calibration source may still
// be in the line (this design's choice). The sampling register is not
// followed by a metastability stage; the published design describes none.
`timescale 1ps/1ps
module tdc_channel
  import lidar_tdc_pkg::*;
#(
  parameter int unsigned N_TAPS     = 512,
  parameter int unsigned CAL_LOG2   = 16,
  parameter chan_t       CHANNEL_ID = '0,
  parameter int unsigned CODE_BITS  = $clog2(N_TAPS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_TAPS-1:0] taps,       // asynchronous delay-line outputs
  input  coarse_t           coarse,     // shared coarse counter
  input  logic              cal_start,
  output logic              cal_done,
  output logic              tag_valid,
  output tag_t              tag
);

  logic [N_TAPS-1:0]    sample;
  logic                 prev0;
  logic                 enc_valid;
  logic [CODE_BITS-1:0] enc_code;

  logic                 code_valid;
  logic [CODE_BITS-1:0] code_r;
  coarse_t              coarse_r1, coarse_r2;
  logic                 fine_valid;
  fine_t                fine;
  logic [1:0]           settle;     // cycles since the end of calibration
  logic [CODE_BITS-1:0] span_code;  // codes below this are edges of the last period
  logic                 new_edge;
  logic                 armed;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample <= '0;
      prev0  <= 1'b1;   // no hit on an input that is high out of reset
    end else begin
      sample <= taps;
      prev0  <= sample[0];
    end
  end

  tdc_priority_encoder #(.N_TAPS(N_TAPS)) u_enc (
    .therm(sample), .valid(enc_valid), .code(enc_code)
  );

  assign new_edge = !prev0 || (cal_done && enc_code < span_code);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code_valid <= 1'b0;
      code_r     <= '0;
      coarse_r1  <= '0;
      coarse_r2  <= '0;
    end else begin
      code_valid <= enc_valid && new_edge;
      code_r     <= enc_code;
      coarse_r1  <= coarse;     // count of the edge that loaded 'sample'
      coarse_r2  <= coarse_r1;
    end
  end

  // When calibration ends the line input switches from the calibration
  // source to the channel input. Edges launched around the switch are
  // still in the line for up to two samples, so no hit is taken during the
  // first three cycles after cal_done rises.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         settle <= '0;
    else if (!cal_done) settle <= '0;
    else if (!armed)    settle <= settle + 1'b1;
  end
  assign armed = (settle == 2'd3);

  tdc_calibration #(.N_BINS(N_TAPS), .CAL_LOG2(CAL_LOG2)) u_cal (
    .clk, .rst_n, .cal_start,
    .code_valid(code_valid && (!cal_done || armed)), .code(code_r),
    .fine_valid, .fine, .cal_done, .max_code(span_code)
  );

  tdc_tag_former #(.CHANNEL_ID(CHANNEL_ID)) u_tag (
    .clk, .rst_n, .in_valid(fine_valid), .coarse(coarse_r2), .fine,
    .tag_valid, .tag
  );

endmodule
