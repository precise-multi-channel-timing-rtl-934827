// sdp_ram: simple dual-port RAM with one write and one registered read port.
//
// The shape of an FPGA block RAM: a write port and a read port on the same
// clock, read data one cycle after the address. A read of the address
// being written in the same cycle returns the old contents. The contents
// are not reset; users clear what they read before relying on it.
`timescale 1ps/1ps
module sdp_ram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 17,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
