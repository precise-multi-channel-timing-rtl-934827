// tb_tdc_priority_encoder: checks the thermometer-to-code conversion.
// For every code k from 0 to 511 it builds a thermometer whose run of ones
// ends at tap k, followed by a zero and random leftover bits, and checks
// that the encoder returns k. It also checks the all-ones line (511) and
// the empty line (valid low).
`timescale 1ps/1ps
module tb_tdc_priority_encoder;
  localparam int unsigned N = 512;
  logic [N-1:0] therm;
  logic         valid;
  logic [8:0]   code;
  int checks = 0, failures = 0;

  tdc_priority_encoder #(.N_TAPS(N)) dut (.therm, .valid, .code);

  initial begin
    for (int k = 0; k < N; k++) begin
      for (int rep = 0; rep < 3; rep++) begin
        for (int b = 0; b < N; b++) therm[b] = (b <= k) ? 1'b1 : ((b == k + 1) ? 1'b0 : ($urandom_range(0, 1) == 1));
        #1;
        checks++;
        if (!valid || code != 9'(k)) begin
          failures++;
          $display("FAIL k=%0d got valid=%b code=%0d", k, valid, code);
        end
      end
    end
    therm = '1; #1;
    checks++;
    if (code != 9'd511) begin failures++; $display("FAIL all ones -> %0d", code); end
    therm = '0; therm[N-1] = 1'b1; #1;
    checks++;
    if (valid) begin failures++; $display("FAIL valid without tap 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
