// tag_correlator: multi-stop START/STOP correlation of the serialised tags.
//
// One channel (REF_CHANNEL, channel 0 by default) carries the START events;
// all others carry STOPs. The controller has the five published stages:
//   INIT  until every channel is calibrated; tags are taken and discarded,
//         nothing is written out;
//   IDLE  waits for a tag and looks at its channel identifier;
//   SET   a START tag replaces the reference tag;
//   CALC  for a STOP tag: delta = T_STOP - T_START;
//   SEND  writes {STOP channel, delta} into the output FIFO, waiting while
//         the FIFO is full.
// The reference stays until the next START, so every STOP between two
// STARTs is measured against the same START (multi-stop operation). When
// the coarse counter has wrapped between START and STOP the STOP time is
// numerically smaller; CALC then adds 2^40 so the delta stays the true
// positive time (pulse on wrap_fixed). STOPs that arrive before the first
// START have no reference and are dropped (pulse on stop_orphan); this and
// the stage timing (2 cycles per START, 3 per STOP) are this design's
// choices. The subtraction is STOP minus START throughout, so a STOP that
// follows its START gives a positive delta.
`timescale 1ps/1ps
module tag_correlator
  import lidar_tdc_pkg::*;
#(
  parameter chan_t REF_CHANNEL = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cal_done,     // all channels calibrated
  input  logic        in_valid,
  output logic        in_ready,
  input  tag_t        in_tag,
  output logic        res_wr,       // write strobe into the result FIFO
  output result_t     res,
  input  logic        res_full,
  output corr_state_t state,
  output logic        wrap_fixed,   // a coarse-counter wrap was corrected
  output logic        stop_orphan   // a STOP came before any START
);

  tag_t   cur;         // tag being processed
  tag_t   ref_tag;     // most recent START
  logic   ref_valid;
  logic   wrap;
  stamp_t diff;

  assign in_ready = (state == CORR_INIT) || (state == CORR_IDLE);
  assign res_wr   = (state == CORR_SEND) && !res_full;
  assign wrap     = cur.stamp < ref_tag.stamp;
  // modulo-2^40 subtraction; with wrap set this equals stop + 2^40 - start
  assign diff     = wrap ? stamp_t'({1'b1, cur.stamp} - {1'b0, ref_tag.stamp})
                         : cur.stamp - ref_tag.stamp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= CORR_INIT;
      cur         <= '0;
      ref_tag     <= '0;
      ref_valid   <= 1'b0;
      res         <= '0;
      wrap_fixed  <= 1'b0;
      stop_orphan <= 1'b0;
    end else begin
      wrap_fixed  <= 1'b0;
      stop_orphan <= 1'b0;
      if (!cal_done) begin
        state     <= CORR_INIT;
        ref_valid <= 1'b0;
      end else begin
        unique case (state)
          CORR_INIT: state <= CORR_IDLE;
          CORR_IDLE: if (in_valid) begin
            cur   <= in_tag;
            state <= (in_tag.chan == REF_CHANNEL) ? CORR_SET : CORR_CALC;
          end
          CORR_SET: begin
            ref_tag   <= cur;
            ref_valid <= 1'b1;
            state     <= CORR_IDLE;
          end
          CORR_CALC: begin
            if (ref_valid) begin
              res.chan   <= cur.chan;
              res.delta  <= diff;
              wrap_fixed <= wrap;
              state      <= CORR_SEND;
            end else begin
              stop_orphan <= 1'b1;
              state       <= CORR_IDLE;
            end
          end
          CORR_SEND: if (!res_full) state <= CORR_IDLE;
          default: state <= CORR_INIT;
        endcase
      end
    end
  end

  a_send_only_after_start: assert property (@(posedge clk) disable iff (!rst_n)
                                            res_wr |-> ref_valid)
    else $error("tag_correlator: result without a START reference");

endmodule
