// tb_tdc_channel: one TDC channel with its delay-line model, end to end.
// Calibration: 2^12 pulses whose phase to the 125 MHz clock steps by
// 4943 ps (mod 8 ns) each time, an even spread that stands in for an
// uncorrelated source; no tag may leave the channel before cal_done. Measurement: 200 hits at known
// picosecond times. Each tag time, converted to ps (x 8000/4096), must
// match the true hit time plus the fixed offset of the coarse count to
// within 40 ps (about two delay elements), and each tag must appear on
// the third clock edge after the edge that sampled the hit. Then 100
// back-to-back pulses with gaps of 0.1-0.5 ns: one tag per pulse, same
// accuracy, so the channel's dead time is one clock period.
`timescale 1ps/1ps
module tb_tdc_channel;
  import lidar_tdc_pkg::*;
  localparam int unsigned N = 512, CL = 12;
  localparam longint PERIOD = 8000;

  logic clk = 1'b0, rst_n = 1'b0, hit = 1'b0, cal_start = 1'b0;
  logic [N-1:0] taps;
  coarse_t coarse;
  logic cal_done, tag_valid;
  tag_t tag;
  int checks = 0, failures = 0;
  longint offset_ps;            // coarse*8000 - edge time, constant
  longint hit_t[$], due_t[$];
  int tags_seen = 0, early_tags = 0;
  bit measuring = 1'b0;
  longint max_err = 0;

  tdc_delay_line #(.N_TAPS(N)) u_line (.hit, .taps);
  tdc_channel #(.N_TAPS(N), .CAL_LOG2(CL), .CHANNEL_ID(8'd3)) dut (
    .clk, .rst_n, .taps, .coarse, .cal_start, .cal_done, .tag_valid, .tag
  );

  always #4000 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) coarse <= '0; else coarse <= coarse + 1'b1;

  // first rising clock edge at or after time t (edges at 4000 + n*8000)
  function automatic longint next_edge(input longint t);
    longint n;
    n = (t - 4000 + PERIOD - 1) / PERIOD;
    if (n < 0) n = 0;
    return 4000 + n * PERIOD;
  endfunction

  always @(posedge clk) if (tag_valid && !cal_done) early_tags++;

  always @(posedge clk) begin
    #1;
    if (tag_valid && measuring) begin
      longint exp_ps, got_ps, err, due;
      tags_seen++;
      checks++;
      if (hit_t.size() == 0) begin
        failures++; $display("FAIL unexpected tag %h", tag);
      end else begin
        exp_ps = hit_t.pop_front() + offset_ps;
        due = due_t.pop_front();
        got_ps = (longint'(tag.stamp) * PERIOD) / 4096;
        err = got_ps - exp_ps;
        if (err < 0) err = -err;
        if (err > max_err) max_err = err;
        if (err > 40 || tag.chan != 8'd3 || ($time - 1) != due) begin
          failures++;
          $display("FAIL tag %h: %0d ps, expected %0d ps, at %0t due %0d", tag, got_ps, exp_ps, $time, due);
        end
      end
    end
  end

  task automatic pulse(input int low_ps, input int high_ps);
    #(low_ps) hit = 1'b1;
    #(high_ps) hit = 1'b0;
  endtask

  initial begin
    int cal_pulses;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cal_pulses = 0;
    while (!cal_done) begin
      pulse(10472, 10471);   // period 20943 ps: phase steps 4943 ps mod 8 ns
      cal_pulses++;
    end
    checks++;
    if (cal_pulses < (1 << CL)) begin failures++; $display("FAIL calibrated after %0d pulses", cal_pulses); end
    checks++;
    if (early_tags != 0) begin failures++; $display("FAIL %0d tags during calibration", early_tags); end
    @(posedge clk) offset_ps = longint'(coarse + 1'b1) * PERIOD - $time;
    #40000;
    measuring = 1'b1;
    for (int i = 0; i < 200; i++) begin
      longint t;
      #(8100 + $urandom_range(0, 7999));
      t = $time;
      hit_t.push_back(t);
      due_t.push_back(next_edge(t + 18) + 3 * PERIOD);
      hit = 1'b1;
      #(8100 + $urandom_range(0, 7999)) hit = 1'b0;
    end
    #100000;
    checks++;
    if (tags_seen != 200 || hit_t.size() != 0) begin
      failures++; $display("FAIL %0d tags for 200 hits", tags_seen);
    end
    // back-to-back pulses: high 8.1-10.1 ns, low only 0.1-0.5 ns, so the
    // input is high at every sampling edge and each new edge is recognised
    // by its short run of ones
    #(8100 + $urandom_range(0, 7999));
    for (int i = 0; i < 100; i++) begin
      longint t;
      t = $time;
      hit_t.push_back(t);
      due_t.push_back(next_edge(t + 18) + 3 * PERIOD);
      hit = 1'b1;
      #(8100 + $urandom_range(0, 2000)) hit = 1'b0;
      #(100 + $urandom_range(0, 400));
    end
    #100000;
    checks++;
    if (tags_seen != 300 || hit_t.size() != 0) begin
      failures++; $display("FAIL %0d tags for 100 back-to-back hits", tags_seen - 200);
    end
    $display("largest time error %0d ps", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
