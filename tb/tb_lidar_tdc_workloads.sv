// tb_lidar_tdc_workloads: the multi-stop and jitter experiments, simulated.
// Runs the complete design (calibration shortened to 2^12 pulses) through
// the measurement set-ups it was built for:
//   test 1: STOPs at 1 MHz on channel 1, START at 200 kHz: 5 STOPs/START;
//   test 2: STOPs at 1 MHz, START at 23.3 kHz: 43 STOPs per START;
//   test 3: STOPs at 275 kHz, START at 2.3 kHz: 120 STOPs per START;
//   jitter: channels 0 and 1 driven by the same 1.057 MHz trigger.
// Tests 1 and 2 run two START periods each, test 3 one. Every delta must
// match the true STOP - START time within 50 ps, every STOP must yield a
// result, and in the jitter run every delta must be within 40 ps of zero.
`timescale 1ps/1ps
module tb_lidar_tdc_workloads;
  import lidar_tdc_pkg::*;
  localparam longint P = 8000;

  logic clk = 1'b0, rst_n = 1'b0, cal_trigger = 1'b0;
  logic [7:0] hit_in = '0;
  logic cal_done, fifo_empty, wrap_fixed, stop_orphan;
  result_t fifo_dout;
  logic [10:0] fifo_count;
  logic [31:0] tags_dropped;
  corr_state_t corr_state;

  lidar_tdc_top #(.CAL_LOG2(12)) dut (
    .clk, .rst_n, .hit_in, .cal_trigger, .cal_start(1'b0), .cal_done,
    .fifo_rd_en(!fifo_empty), .fifo_dout, .fifo_empty, .fifo_count,
    .tags_dropped, .corr_state, .wrap_fixed, .stop_orphan
  );

  int checks = 0, failures = 0, results = 0;
  longint exp_q[$];
  longint max_err = 0;

  always #4000 clk = ~clk;
  always begin #10472 cal_trigger = 1'b1; #10471 cal_trigger = 1'b0; end

  always @(posedge clk) if (rst_n && !fifo_empty) begin
    longint got, e, err;
    got = (longint'(fifo_dout.delta) * P) / 4096;
    results++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected result %0d ps", got);
    end else begin
      e = exp_q.pop_front();
      err = (got > e) ? got - e : e - got;
      if (err > max_err) max_err = err;
      if (err > 50 || fifo_dout.chan != 8'd1) begin
        failures++; $display("FAIL delta %0d ps ch %0d, expected %0d ps", got, fifo_dout.chan, e);
      end
    end
  end

  task automatic fire(input int ch, input longint at);
    fork
      begin
        #(at) hit_in[ch] = 1'b1;
        #(10000) hit_in[ch] = 1'b0;
      end
    join_none
  endtask

  // n_starts START periods of length start_ps; STOPs every stop_ps from an offset
  task automatic multistop(input string name, input longint start_ps, input longint stop_ps,
                           input int n_starts);
    int n0, nstops;
    longint off;
    n0 = results;
    nstops = 0;
    for (int s = 0; s < n_starts; s++) begin
      off = 200000 + longint'($urandom_range(0, 7999));
      fire(0, 0);
      for (longint t = off; t < start_ps; t += stop_ps) begin
        fire(1, t);
        exp_q.push_back(t);
        nstops++;
      end
      #(start_ps);
    end
    #200000;
    checks++;
    if (results - n0 != nstops || exp_q.size() != 0) begin
      failures++; $display("FAIL %s: %0d results for %0d STOPs", name, results - n0, nstops);
    end
    $display("%s: %0d STOPs over %0d START periods, %0d per START", name, nstops, n_starts, nstops / n_starts);
  endtask

  initial begin
    int n0, njit;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (cal_done);
    #100000;
    multistop("test 1", 5000000, 1000000, 2);           // 200 kHz / 1 MHz
    multistop("test 2", 42918455, 1000000, 2);          // 23.3 kHz / 1 MHz
    multistop("test 3", 436363636, 3636363, 1);         // 120 STOPs at 275 kHz
    checks++;
    if (tags_dropped != 0) begin failures++; $display("FAIL %0d tags dropped", tags_dropped); end
    // jitter: the same trigger on the START channel and on channel 1
    n0 = results;
    njit = 1000;
    for (int k = 0; k < njit; k++) begin
      longint ph;
      ph = longint'($urandom_range(0, 7999));
      fire(0, ph);
      fire(1, ph);
      exp_q.push_back(0);
      #946074;                                            // 1.057 MHz
    end
    #100000;
    checks++;
    if (results - n0 != njit) begin failures++; $display("FAIL jitter: %0d results", results - n0); end
    $display("largest delta error %0d ps", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
