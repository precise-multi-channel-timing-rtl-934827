// tb_tdc_delay_line: checks the delay-line model's tap timing.
// A rising hit edge is launched at a known time; for a set of taps the
// testbench checks that the tap is still low 1 ps before its expected
// arrival time (sum of element delays: three fast, one slow per group of
// four) and high at it. It also checks that one 8 ns period covers about
// 372 taps and that the falling edge travels the same way.
`timescale 1ps/1ps
module tb_tdc_delay_line;
  localparam int unsigned N = 512;
  logic hit = 1'b0;
  logic [N-1:0] taps;
  int checks = 0, failures = 0;

  tdc_delay_line #(.N_TAPS(N)) dut (.hit, .taps);

  function automatic int arrival(input int i);   // ps from hit to taps[i]
    return (i + 1) * 17 + ((i + 1) / 4) * 18;
  endfunction

  task automatic expect_bit(input int i, input logic v, input string what);
    checks++;
    if (taps[i] !== v) begin
      failures++;
      $display("FAIL %s tap %0d = %b at %0t", what, i, taps[i], $time);
    end
  endtask

  initial begin
    int ones;
    #20000;                             // line settles low
    hit = 1'b1;
    fork
      for (int i = 0; i < N; i += 37) begin
        automatic int k = i;
        fork
          begin #(arrival(k) - 1) expect_bit(k, 1'b0, "rise early"); #2 expect_bit(k, 1'b1, "rise"); end
        join_none
      end
    join
    #8000;
    ones = $countones(taps);
    checks++;
    if (ones < 368 || ones > 376) begin
      failures++;
      $display("FAIL %0d taps covered by 8 ns, expected about 372", ones);
    end
    #4000;                              // whole line high now
    expect_bit(N - 1, 1'b1, "settled");
    hit = 1'b0;
    #(arrival(100) + 1) expect_bit(100, 1'b0, "fall");
    expect_bit(101, 1'b1, "fall front");
    #30000;
    checks++;
    if (taps != '0) begin failures++; $display("FAIL line not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
