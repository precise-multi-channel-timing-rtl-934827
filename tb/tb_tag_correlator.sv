// tb_tag_correlator: checks the START/STOP correlation controller.
// Sequence: tags offered before calibration is done are swallowed without
// output; a STOP before any START is dropped; then random runs of one
// START followed by several STOPs on channels 1..7, with the result FIFO
// randomly full. Every result must equal STOP - START of the latest START
// (a testbench model), including a START just below 2^40 with STOPs after
// the coarse counter wrapped. The STOP-to-result latency (two cycles after
// the tag is taken, when the FIFO has room) and the stage sequence
// IDLE-CALC-SEND and IDLE-SET are checked as well.
`timescale 1ps/1ps
module tb_tag_correlator;
  import lidar_tdc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, cal_done = 1'b0;
  logic in_valid = 1'b0, in_ready, res_wr, res_full = 1'b0, wrap_fixed, stop_orphan;
  tag_t in_tag = '0;
  result_t res;
  corr_state_t state;
  result_t exp_q[$];
  int checks = 0, failures = 0, wraps = 0, orphans = 0, stalls = 0, starts = 0;
  longint unsigned ref_t;
  bit have_ref = 0;
  bit random_full = 0;

  tag_correlator dut (.clk, .rst_n, .cal_done, .in_valid, .in_ready, .in_tag,
                      .res_wr, .res, .res_full, .state, .wrap_fixed, .stop_orphan);

  always #4000 clk = ~clk;

  always @(negedge clk) if (random_full) res_full = ($urandom_range(0, 3) == 0);

  always @(posedge clk) if (rst_n) begin
    if (wrap_fixed) wraps++;
    if (stop_orphan) orphans++;
    if (state == CORR_SEND && res_full) stalls++;
    if (res_wr) begin
      checks++;
      if (exp_q.size() == 0 || res != exp_q[0]) begin
        failures++;
        $display("FAIL result %h expected %h", res, exp_q.size() ? exp_q[0] : '0);
      end
      if (exp_q.size()) void'(exp_q.pop_front());
    end
  end

  // offer one tag and wait until it is taken
  task automatic send(input int chan, input longint unsigned t);
    @(negedge clk);
    in_valid = 1'b1;
    in_tag.chan = chan_t'(chan);
    in_tag.stamp = stamp_t'(t);
    @(posedge clk);
    while (!in_ready) @(posedge clk);
    #1 in_valid = 1'b0;
    if (cal_done) begin
      if (chan == 0) begin ref_t = t; have_ref = 1; starts++; end
      else if (have_ref) exp_q.push_back({chan_t'(chan), stamp_t'(t - ref_t)});
    end
  endtask

  initial begin
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // INIT: tags taken, nothing produced
    send(0, 1000); send(3, 5000);
    repeat (5) @(negedge clk);
    checks++;
    if (state != CORR_INIT || exp_q.size() != 0) begin failures++; $display("FAIL not in INIT"); end
    cal_done = 1'b1;
    repeat (2) @(negedge clk);
    // orphan STOP
    send(2, 12345);
    repeat (4) @(negedge clk);
    // latency and stage sequence of one START and one STOP
    send(0, 40'd100000);
    checks++; if (state != CORR_SET) begin failures++; $display("FAIL no SET after START"); end
    @(posedge clk) #1;
    checks++; if (state != CORR_IDLE) begin failures++; $display("FAIL SET not followed by IDLE"); end
    send(5, 40'd160000);
    lat = 0;
    checks++; if (state != CORR_CALC) begin failures++; $display("FAIL no CALC after STOP"); end
    while (!res_wr) begin @(posedge clk); #1 lat++; end
    checks++; if (lat != 1 || state != CORR_SEND) begin failures++; $display("FAIL result latency %0d", lat); end
    repeat (3) @(negedge clk);
    // random multi-stop runs with back-pressure
    random_full = 1;
    for (int r = 0; r < 30; r++) begin
      longint unsigned t0;
      t0 = (r == 10) ? ((64'd1 << 40) - 64'd3000) : 64'($urandom()) * 64;
      send(0, t0);
      for (int s = 0; s < $urandom_range(1, 12); s++)
        send($urandom_range(1, 7), (t0 + 64'($urandom_range(1, 2000000))) & ((64'd1 << 40) - 1));
    end
    random_full = 0; res_full = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    checks++;
    if (wraps == 0 || orphans != 1 || stalls == 0) begin
      failures++; $display("FAIL mechanisms: wraps %0d orphans %0d stalls %0d", wraps, orphans, stalls);
    end
    // recalibration sends the controller back to INIT and forgets the START
    cal_done = 1'b0;
    @(negedge clk) cal_done = 1'b1; have_ref = 0;
    send(4, 777);
    repeat (4) @(negedge clk);
    checks++;
    if (orphans != 2) begin failures++; $display("FAIL START kept across recalibration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
