// tb_tdc_calibration: checks the code-density calibration of one channel.
// With 2^10 calibration hits the testbench feeds raw codes drawn from an
// uneven distribution (some bins twice as likely, the top bins never hit,
// bursts of one code on consecutive cycles to exercise the read-modify-write
// forwarding, gaps between codes). It keeps its own histogram, forms
// fine(i) = min(4095, 4096 * cumulative(i) / 1024) and then checks, code by
// code, that the look-up returns that value exactly one cycle later. Codes
// offered after the 1024th are ignored. The clear phase length (512 cycles)
// is checked, then a second calibration with a new distribution. The
// largest collected code (max_code) is checked after each calibration.
`timescale 1ps/1ps
module tb_tdc_calibration;
  import lidar_tdc_pkg::*;
  localparam int unsigned NB = 512, CL = 10;

  logic clk = 1'b0, rst_n = 1'b0, cal_start = 1'b0;
  logic code_valid = 1'b0;
  logic [8:0] code = '0;
  logic fine_valid, cal_done;
  logic [8:0] max_code;
  int exp_max;
  fine_t fine;
  int checks = 0, failures = 0;
  int hist [NB];
  int forwarded = 0;

  tdc_calibration #(.N_BINS(NB), .CAL_LOG2(CL)) dut (
    .clk, .rst_n, .cal_start, .code_valid, .code, .fine_valid, .fine, .cal_done, .max_code
  );

  always #4000 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic int draw(input int variant);
    int c;
    c = $urandom_range(0, 371);
    if (variant == 0 && (c % 4) == 3 && $urandom_range(0, 1) == 1) c = c - 1;  // uneven bins
    if (variant == 1 && c > 200) c = c - 100;
    return c;
  endfunction

  task automatic calibrate(input int variant);
    int given, last, n;
    int ccount;
    for (int i = 0; i < NB; i++) hist[i] = 0;
    exp_max = 0;
    // clear phase: 512 cycles from the start of calibration
    ccount = 0;
    while (dut.state == CAL_CLEAR) begin @(posedge clk); ccount++; end
    chk(ccount == NB + 1, $sformatf("clear took %0d cycles", ccount));
    given = 0; last = -1;
    while (given < (1 << CL) + 20) begin
      @(negedge clk);
      if ($urandom_range(0, 3) == 0) begin
        code_valid = 1'b0;
      end else begin
        if (last >= 0 && $urandom_range(0, 2) == 0) n = last; else n = draw(variant);
        if (n == last) forwarded++;
        code_valid = 1'b1;
        code = 9'(n);
        if (given < (1 << CL)) begin hist[n]++; if (n > exp_max) exp_max = n; end
        given++;
        last = n;
      end
    end
    @(negedge clk) code_valid = 1'b0;
    wait (cal_done);
    chk(max_code == 9'(exp_max), $sformatf("max_code %0d expected %0d", max_code, exp_max));
  endtask

  task automatic check_lut();
    int cum;
    int exp_fine;
    cum = 0;
    for (int i = 0; i < NB; i++) begin
      cum += hist[i];
      exp_fine = (cum * 4096) / (1 << CL);
      if (exp_fine > 4095) exp_fine = 4095;
      @(negedge clk);
      code_valid = 1'b1; code = 9'(i);
      @(negedge clk);
      code_valid = 1'b0;
      chk(fine_valid, $sformatf("no fine_valid one cycle after code %0d", i));
      chk(fine == fine_t'(exp_fine), $sformatf("code %0d fine %0d expected %0d", i, fine, exp_fine));
    end
    @(negedge clk);
    chk(!fine_valid, "fine_valid without a code");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    chk(!cal_done, "cal_done out of reset");
    calibrate(0);
    check_lut();
    chk(forwarded > 50, "back-to-back equal codes were not exercised");
    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    chk(!cal_done, "cal_start did not restart calibration");
    calibrate(1);
    check_lut();
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
