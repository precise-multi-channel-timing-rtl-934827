// tdc_tag_former: builds the 48-bit time tag of one channel.
//
// A hit is sampled on a clock edge; the coarse count of that edge says
// which period it belongs to and the calibrated fine time says how long
// before that edge it arrived. The tag time is therefore the coarse count
// of the sampling edge with 12 zero fraction bits, minus the fine time:
//   stamp = {coarse, 12'b0} - fine          (40 bits, wraps modulo 2^40)
// and the tag is {CHANNEL_ID, stamp}. This is the published tag format;
// the one-cycle output register is this design's choice.
// Interface: in_valid/coarse/fine in, tag_valid/tag out one cycle later.
`timescale 1ps/1ps
module tdc_tag_former
  import lidar_tdc_pkg::*;
#(
  parameter chan_t CHANNEL_ID = '0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  coarse_t coarse,
  input  fine_t   fine,
  output logic    tag_valid,
  output tag_t    tag
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_valid <= 1'b0;
      tag       <= '0;
    end else begin
      tag_valid <= in_valid;
      if (in_valid) begin
        tag.chan  <= CHANNEL_ID;
        tag.stamp <= {coarse, {FINE_BITS{1'b0}}} - TIME_BITS'(fine);
      end
    end
  end

endmodule
