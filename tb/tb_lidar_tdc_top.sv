// tb_lidar_tdc_top: end-to-end test of the eight-channel timing analyser.
// Runs the whole design (delay-line models included) with a short
// calibration (2^11 pulses), small buffers and the coarse counter preset
// near its wrap point, and walks it through every mechanism:
//   start-up calibration through the calibration input, correlator in INIT;
//   a STOP before the first START (dropped);
//   multi-stop runs: one START on channel 0, then STOPs on channels 1..7;
//   a run across the wrap of the 28-bit coarse counter;
//   back-pressure: the result FIFO is left unread until it is full and the
//   correlator waits in SEND;
//   overload: all STOP channels firing back to back every 8.4 ns (a new
//   hit in every clock period, recognised with the input still high), so
//   tags are dropped at the serialiser (results + dropped = STOPs sent);
//   recalibration on cal_start, then another checked run.
// Every checked delta must match the true STOP - START time within 50 ps.
// Each mechanism is counted; one that never happened counts as a failure.
`timescale 1ps/1ps
module tb_lidar_tdc_top;
  import lidar_tdc_pkg::*;
  localparam int NC = 8, OUTD = 16;
  localparam longint P = 8000;
  localparam coarse_t CRESET = coarse_t'((1 << 28) - 9000);

  logic clk = 1'b0, rst_n = 1'b0, cal_trigger = 1'b0, cal_start = 1'b0, fifo_rd_en;
  logic [NC-1:0] hit_in = '0;
  logic cal_done, fifo_empty, wrap_fixed, stop_orphan;
  result_t fifo_dout;
  logic [4:0] fifo_count;
  logic [31:0] tags_dropped;
  corr_state_t corr_state;

  lidar_tdc_top #(.CAL_LOG2(11), .BATCH_DEPTH(4), .OUT_DEPTH(OUTD), .COARSE_RESET(CRESET)) dut (
    .clk, .rst_n, .hit_in, .cal_trigger, .cal_start, .cal_done,
    .fifo_rd_en, .fifo_dout, .fifo_empty, .fifo_count,
    .tags_dropped, .corr_state, .wrap_fixed, .stop_orphan
  );

  int checks = 0, failures = 0;
  // mechanism counters
  int n_cal = 0, n_init = 0, n_set = 0, n_send = 0, n_multi = 0, n_wrap = 0, n_orphan = 0;
  int n_stall = 0, n_drop = 0, n_recal = 0, n_b2b = 0;
  bit reading = 1'b1, checking = 1'b1;
  int unchecked_results = 0;
  typedef struct { int ch; longint d; } exp_t;
  exp_t exp_q[$];

  always #4000 clk = ~clk;
  always begin #10472 cal_trigger = 1'b1; #10471 cal_trigger = 1'b0; end   // phase steps 4943 ps

  assign fifo_rd_en = reading && !fifo_empty;

  always @(posedge clk) if (rst_n) begin
    if (corr_state == CORR_INIT) n_init++;
    if (corr_state == CORR_SET) n_set++;
    if (corr_state == CORR_SEND && fifo_count == 5'(OUTD)) n_stall++;
    if (wrap_fixed) n_wrap++;
    // a hit recognised while the input was already high at the last edge
    if (dut.g_ch[1].u_tdc.enc_valid && dut.g_ch[1].u_tdc.prev0 && dut.g_ch[1].u_tdc.new_edge) n_b2b++;
    if (stop_orphan) n_orphan++;
    if (fifo_rd_en) begin
      if (!checking) unchecked_results++;
      else begin
        longint got;
        got = (longint'(fifo_dout.delta) * P) / 4096;
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL unexpected result ch %0d delta %0d ps", fifo_dout.chan, got);
        end else begin
          exp_t e;
          e = exp_q.pop_front();
          if (int'(fifo_dout.chan) != e.ch || got - e.d > 50 || e.d - got > 50) begin
            failures++;
            $display("FAIL result ch %0d delta %0d ps, expected ch %0d %0d ps", fifo_dout.chan, got, e.ch, e.d);
          end
          n_send++;
        end
      end
    end
  end

  // one input pulse on channel ch, 'at' ps from now
  task automatic fire(input int ch, input longint at, input longint width = 8100);
    fork
      begin
        #(at) hit_in[ch] = 1'b1;
        #(width) hit_in[ch] = 1'b0;
      end
    join_none
  endtask

  // one START and n STOPs on changing channels, gaps of 'gap' ps or more
  task automatic run(input int n, input longint gap);
    longint d;
    d = 0;
    fire(0, 0);
    for (int s = 0; s < n; s++) begin
      int ch;
      d += gap + longint'($urandom_range(0, 9999));
      ch = 1 + (s % 7);
      fire(ch, d);
      exp_q.push_back('{ch, d});
    end
    if (n > 1) n_multi++;
    #(d + 100000);
  endtask

  task automatic wait_drained();
    int guard;
    guard = 0;
    while ((exp_q.size() != 0 || !fifo_empty) && guard < 20000) begin @(posedge clk); guard++; end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); exp_q.delete(); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (cal_done);
    n_cal++;
    #50000;
    // STOP with no START yet
    fire(3, 0);
    #50000;
    // multi-stop runs
    for (int r = 0; r < 4; r++) run(5, 150000);
    wait_drained();
    // a run across the coarse-counter wrap
    wait (dut.coarse == coarse_t'((1 << 28) - 12));
    run(6, 40000);
    wait_drained();
    // back-pressure: leave the FIFO unread until the correlator stalls
    reading = 1'b0;
    run(OUTD + 3, 100000);
    reading = 1'b1;
    wait_drained();
    // overload: every STOP channel fires back to back, 8.1 ns high and
    // 0.3 ns low, after one START
    checking = 1'b0;
    fire(0, 0);
    #100000;
    for (int k = 0; k < 10; k++)
      for (int ch = 1; ch < NC; ch++) fire(ch, 8400 * k + 1000 * ch, 8100);
    #3000000;
    n_drop = int'(tags_dropped);
    checks++;
    if (unchecked_results + n_drop != 70 || n_drop == 0) begin
      failures++; $display("FAIL overload: %0d results + %0d dropped for 70 STOPs", unchecked_results, n_drop);
    end
    checking = 1'b1;
    // recalibration
    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    checks++;
    if (cal_done) begin failures++; $display("FAIL cal_start ignored"); end
    wait (cal_done);
    n_recal++;
    #50000;
    run(7, 120000);
    wait_drained();

    $display("mechanisms: cal %0d init %0d set %0d results %0d multi %0d wrap %0d orphan %0d stall %0d drop %0d recal %0d back-to-back %0d",
             n_cal, n_init, n_set, n_send, n_multi, n_wrap, n_orphan, n_stall, n_drop, n_recal, n_b2b);
    checks++;
    if (n_cal == 0 || n_init == 0 || n_set == 0 || n_send == 0 || n_multi == 0 || n_wrap == 0 ||
        n_orphan == 0 || n_stall == 0 || n_drop == 0 || n_recal == 0 || n_b2b < 5) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
