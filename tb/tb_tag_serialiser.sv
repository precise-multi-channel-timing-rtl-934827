// tb_tag_serialiser: checks the merging of concurrent channel tags.
// Phase 1: random valid masks on 8 channels with a randomly stalling
// consumer; every tag must come out exactly once, batches in arrival order
// and channels in ascending order inside a batch, and an offered tag must
// stay put while not taken. Phase 2: all channels fire every cycle with
// the consumer stopped, so the 4-entry batch FIFO overflows; the dropped
// count must equal the number of tags the model saw refused.
`timescale 1ps/1ps
module tb_tag_serialiser;
  import lidar_tdc_pkg::*;
  localparam int NC = 8, BD = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NC-1:0] in_valid = '0;
  tag_t in_tag [NC];
  logic out_valid, out_ready = 1'b0;
  tag_t out_tag;
  logic [31:0] dropped;
  tag_t exp_q[$];
  int checks = 0, failures = 0, exp_dropped = 0, seq = 0;

  tag_serialiser #(.N_CHANNELS(NC), .BATCH_DEPTH(BD)) dut (
    .clk, .rst_n, .in_valid, .in_tag, .out_valid, .out_ready, .out_tag, .dropped
  );

  always #4000 clk = ~clk;

  initial for (int c = 0; c < NC; c++) in_tag[c] = '0;

  // consumer side check
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    checks++;
    if (exp_q.size() == 0 || out_tag != exp_q[0]) begin
      failures++;
      $display("FAIL got %h expected %h", out_tag, exp_q.size() ? exp_q[0] : '0);
    end
    if (exp_q.size()) void'(exp_q.pop_front());
  end

  task automatic drive(input logic [NC-1:0] mask);
    @(negedge clk);
    in_valid = mask;
    for (int c = 0; c < NC; c++) begin
      in_tag[c].chan  = chan_t'(c);
      in_tag[c].stamp = stamp_t'(seq * 16 + c);
    end
    seq++;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // phase 1: light load, the FIFO never fills
    for (int i = 0; i < 400; i++) begin
      logic [NC-1:0] m;
      m = ($urandom_range(0, 5) == 0) ? NC'($urandom()) : '0;
      out_ready = ($urandom_range(0, 3) != 0);
      drive(m);
      if (m != 0) for (int c = 0; c < NC; c++) if (m[c]) exp_q.push_back(in_tag[c]);
    end
    @(negedge clk) in_valid = '0; out_ready = 1'b1;
    repeat (200) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || dropped != 0) begin
      failures++; $display("FAIL phase 1: %0d tags missing, %0d dropped", exp_q.size(), dropped);
    end
    // phase 2: overflow. Consumer stopped: the current register takes one
    // batch, the FIFO BD more; everything after that is dropped.
    out_ready = 1'b0;
    for (int i = 0; i < 10; i++) begin
      drive('1);
      if (i < BD + 1) for (int c = 0; c < NC; c++) exp_q.push_back(in_tag[c]);
      else exp_dropped += NC;
    end
    @(negedge clk) in_valid = '0;
    checks++;
    if (dropped != 32'(exp_dropped)) begin failures++; $display("FAIL dropped %0d expected %0d", dropped, exp_dropped); end
    out_ready = 1'b1;
    repeat (100) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || out_valid) begin failures++; $display("FAIL phase 2: %0d tags missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
