// tag_serialiser: merges the tags of all channels into one tag stream.
//
// Every channel can emit a tag on every clock, so up to N_CHANNELS tags
// appear in the same cycle. The serialiser stores each such cycle as one
// batch (a valid mask and all tags) in a FIFO, and hands the tags of the
// oldest batch out one per cycle over a valid/ready port, lowest channel
// first. Channel 0 is the START channel, so a START is always handed out
// before the STOPs sampled in the same clock period, and tags of later
// periods never overtake earlier ones. A batch that finds the FIFO full is
// lost; dropped counts the lost tags. The published design only says that
// concurrent tags are serialised: the batch FIFO, its depth and the order
// inside a batch are this design's choices.
`timescale 1ps/1ps
module tag_serialiser
  import lidar_tdc_pkg::*;
#(
  parameter int unsigned N_CHANNELS  = 8,
  parameter int unsigned BATCH_DEPTH = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [N_CHANNELS-1:0] in_valid,
  input  tag_t                  in_tag [N_CHANNELS],
  output logic                  out_valid,
  input  logic                  out_ready,
  output tag_t                  out_tag,
  output logic [31:0]           dropped
);

  localparam int unsigned BW = N_CHANNELS * (1 + TAG_BITS);

  typedef struct packed {
    logic [N_CHANNELS-1:0]               mask;
    logic [N_CHANNELS-1:0][TAG_BITS-1:0] tags;
  } batch_t;

  batch_t wr_batch, rd_batch, cur;
  logic   fifo_full, fifo_empty, fifo_rd, wr_en;

  always_comb begin
    wr_batch.mask = in_valid;
    for (int i = 0; i < N_CHANNELS; i++) wr_batch.tags[i] = in_tag[i];
  end
  assign wr_en = |in_valid;

  sync_fifo #(.WIDTH(BW), .DEPTH(BATCH_DEPTH)) u_batches (
    .clk, .rst_n,
    .wr_en(wr_en && !fifo_full), .din(wr_batch), .full(fifo_full),
    .rd_en(fifo_rd), .dout(rd_batch), .empty(fifo_empty), .count()
  );

  // lowest set bit of the current mask
  logic [$clog2(N_CHANNELS)-1:0] sel;
  logic [N_CHANNELS-1:0]         rest;
  always_comb begin
    sel = '0;
    for (int i = N_CHANNELS - 1; i >= 0; i--) if (cur.mask[i]) sel = i[$clog2(N_CHANNELS)-1:0];
    rest = cur.mask & ~(N_CHANNELS'(1) << sel);
  end

  assign out_valid = |cur.mask;
  assign out_tag   = cur.tags[sel];
  // load the next batch when the current one is empty or hands out its last tag
  assign fifo_rd   = !fifo_empty && (!out_valid || (out_ready && rest == '0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur     <= '0;
      dropped <= '0;
    end else begin
      if (fifo_rd)                     cur <= rd_batch;
      else if (out_valid && out_ready) cur.mask <= rest;
      if (wr_en && fifo_full)          dropped <= dropped + 32'($countones(in_valid));
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_tag))
    else $error("tag_serialiser: offered tag withdrawn");

endmodule
