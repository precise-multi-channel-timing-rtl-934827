// coarse_counter: free-running coarse time base shared by all TDC channels.
//
// The counter advances by one on every rising edge of the 125 MHz system
// clock, so one count is 8 ns; with the default 28 bits it wraps after
// 2.147 s, which is the dynamic range of the time tags. Every channel reads
// the same counter, so tags of different channels share one time axis.
// RESET_VALUE is this design's addition: it lets a simulation start the
// counter just below its wrap point. Reset is asynchronous, active low.
`timescale 1ps/1ps
module coarse_counter #(
  parameter int unsigned WIDTH       = 28,
  parameter logic [WIDTH-1:0] RESET_VALUE = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [WIDTH-1:0] count
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= RESET_VALUE;
    else        count <= count + 1'b1;
  end

endmodule
