// tdc_priority_encoder: thermometer code to raw bin code.
//
// The sampled delay line shows a run of ones starting at tap 0: the hit
// has passed those taps before the clock edge. The raw code is the index
// of the last one of that run, so a 512-bit thermometer becomes a 9-bit
// code (0 to 511). The encoder looks for the first zero counted from tap
// 0, which makes it blind to ones further up the line left behind by an
// earlier pulse; stray zeros inside the run ("bubbles") shorten the code.
// Searching for the first zero is this design's choice; the published
// design only says that a priority encoder makes the 9-bit code.
// valid is tap 0, i.e. the line holds a hit front at all.
// Purely combinational.
`timescale 1ps/1ps
module tdc_priority_encoder #(
  parameter int unsigned N_TAPS    = 512,
  parameter int unsigned CODE_BITS = $clog2(N_TAPS)
) (
  input  logic [N_TAPS-1:0]    therm,
  output logic                 valid,
  output logic [CODE_BITS-1:0] code
);

  always_comb begin
    logic found;
    found = 1'b0;
    code  = CODE_BITS'(N_TAPS - 1);
    for (int unsigned i = 1; i < N_TAPS; i++) begin
      if (!found && !therm[i]) begin
        code  = CODE_BITS'(i - 1);
        found = 1'b1;
      end
    end
    valid = therm[0];
  end

endmodule
