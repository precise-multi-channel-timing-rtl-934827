// tb_coarse_counter: checks the shared coarse counter.
// Starts the counter five counts below its wrap point, then compares it on
// every clock with a reference count kept by the testbench, across the
// wrap from 2^28-1 to 0 and through a second reset.
`timescale 1ps/1ps
module tb_coarse_counter;
  localparam int unsigned W = 28;
  localparam logic [W-1:0] START = 28'hFFF_FFFB;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] count, model;
  int checks = 0, failures = 0, wraps = 0;

  coarse_counter #(.WIDTH(W), .RESET_VALUE(START)) dut (.clk, .rst_n, .count);

  always #4000 clk = ~clk;

  task automatic check(input logic [W-1:0] exp);
    checks++;
    if (count !== exp) begin
      failures++;
      $display("FAIL count=%h expected %h", count, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 check(START);
    rst_n = 1'b1;
    model = START;
    for (int i = 0; i < 40; i++) begin
      @(posedge clk); #1;
      model = model + 1'b1;
      if (model == '0) wraps++;
      check(model);
    end
    rst_n = 1'b0; #1 check(START);
    checks++;
    if (wraps != 1) begin failures++; $display("FAIL wrap not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
