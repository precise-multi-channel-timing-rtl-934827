// tb_lidar_tdc_full: the complete design at its default size.
// All parameters at their defaults: 8 channels of 512 taps, calibration
// with 2^16 pulses per channel, 16-batch serialiser FIFO, 1024-entry result
// FIFO. After the start-up calibration (its length in clock cycles is
// checked) it measures two START periods of 5 STOPs each, the STOPs 1 us
// apart and spread over channels 1..7, and checks every delta against the
// true STOP - START time within 40 ps.
`timescale 1ps/1ps
module tb_lidar_tdc_full;
  import lidar_tdc_pkg::*;
  localparam longint P = 8000;

  logic clk = 1'b0, rst_n = 1'b0, cal_trigger = 1'b0;
  logic [7:0] hit_in = '0;
  logic cal_done, fifo_empty, wrap_fixed, stop_orphan;
  result_t fifo_dout;
  logic [10:0] fifo_count;
  logic [31:0] tags_dropped;
  corr_state_t corr_state;

  lidar_tdc_top dut (
    .clk, .rst_n, .hit_in, .cal_trigger, .cal_start(1'b0), .cal_done,
    .fifo_rd_en(!fifo_empty), .fifo_dout, .fifo_empty, .fifo_count,
    .tags_dropped, .corr_state, .wrap_fixed, .stop_orphan
  );

  int checks = 0, failures = 0, results = 0;
  typedef struct { int ch; longint d; } exp_t;
  exp_t exp_q[$];
  longint max_err = 0;
  longint cycles = 0;

  always #4000 clk = ~clk;
  always begin #10472 cal_trigger = 1'b1; #10471 cal_trigger = 1'b0; end
  always @(posedge clk) if (rst_n && !cal_done) cycles++;

  always @(posedge clk) if (rst_n && !fifo_empty) begin
    longint got, err;
    exp_t e;
    got = (longint'(fifo_dout.delta) * P) / 4096;
    results++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected result %0d ps", got);
    end else begin
      e = exp_q.pop_front();
      err = (got > e.d) ? got - e.d : e.d - got;
      if (err > max_err) max_err = err;
      if (err > 40 || int'(fifo_dout.chan) != e.ch) begin
        failures++; $display("FAIL delta %0d ps ch %0d, expected %0d ps ch %0d", got, fifo_dout.chan, e.d, e.ch);
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

  initial begin
    longint min_cycles;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (cal_done);
    // clear 512 + 65536 pulses of 20943 ps + summing 512
    min_cycles = 512 + (longint'(65536) * 20943) / P + 512;
    checks++;
    if (cycles < min_cycles || cycles > min_cycles + 100) begin
      failures++; $display("FAIL calibration took %0d cycles, expected about %0d", cycles, min_cycles);
    end
    $display("calibration took %0d cycles", cycles);
    #100000;
    for (int s = 0; s < 2; s++) begin
      longint off;
      off = 300000 + longint'($urandom_range(0, 7999));
      fire(0, 0);
      for (int k = 0; k < 5; k++) begin
        int ch;
        ch = 1 + ((s * 5 + k) % 7);
        fire(ch, off + k * 1000000);
        exp_q.push_back('{ch, off + k * 1000000});
      end
      #5000000;
    end
    #200000;
    checks++;
    if (results != 10 || exp_q.size() != 0) begin failures++; $display("FAIL %0d results for 10 STOPs", results); end
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
