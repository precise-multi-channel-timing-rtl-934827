// tdc_delay_line: behavioural model of the carry-chain tapped delay line.
//
// This is a simulation model, not synthesizable logic. In the FPGA the line
// is a chain of carry primitives, four carry elements per slice, and its
// element delays come from the silicon and the routing. Here each stage is
// a delayed copy of the one before it: taps[i] is the hit input delayed by
// the sum of the first i+1 element delays. The hit edge therefore moves
// up the taps, and a register that samples all taps on a clock edge sees a
// thermometer code whose length measures how long ago the hit arrived.
//
// The three element delays inside a slice are FAST_PS, and the fourth,
// which leaves the slice through general routing, is SLOW_PS. The defaults
// (17 ps and 35 ps) average 21.5 ps per element, so one 8 ns clock period
// spans about 372 of the 512 elements, as in the published design; the
// split between fast and slow elements is this model's choice and gives
// the uneven bins that the calibration has to remove.
// Interface: hit (asynchronous input), taps (N_TAPS asynchronous outputs).
`timescale 1ps/1ps
module tdc_delay_line #(
  parameter int unsigned N_TAPS  = 512,
  parameter int unsigned FAST_PS = 17,
  parameter int unsigned SLOW_PS = 35
) (
  input  logic              hit,
  output logic [N_TAPS-1:0] taps
);

  logic [N_TAPS-1:0] line = '0;
  assign taps = line;

  // Every edge of hit starts its own walk along the line, so several edges
  // can travel at once (transport delay, as in the carry chain).
  always begin
    @(hit);
    fork
      begin : walk
        automatic logic level = hit;
        for (int unsigned i = 0; i < N_TAPS; i++) begin
          #((((i % 4) == 3) ? SLOW_PS : FAST_PS)) line[i] = level;
        end
      end
    join_none
  end

endmodule
