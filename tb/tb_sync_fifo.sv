// tb_sync_fifo: checks the FIFO against a queue model.
// Random writes and reads on a 16-entry FIFO, with phases that fill it to
// full and drain it to empty; data, full, empty and count are compared
// with the model on every cycle.
`timescale 1ps/1ps
module tb_sync_fifo;
  localparam int W = 48, D = 16;
  logic clk = 1'b0, rst_n = 1'b0, wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] din = '0, dout;
  logic full, empty;
  logic [4:0] count;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0, fulls = 0, empties = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .wr_en, .din, .full, .rd_en, .dout, .empty, .count);

  always #4000 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int pw;
      @(negedge clk);
      checks++;
      if (full != (q.size() == D) || empty != (q.size() == 0) || count != 5'(q.size()) ||
          (q.size() > 0 && dout != q[0])) begin
        failures++;
        $display("FAIL cycle %0d size %0d full %b empty %b count %0d", i, q.size(), full, empty, count);
      end
      if (full) fulls++;
      if (empty) empties++;
      pw = ((i / 200) % 2 == 0) ? 75 : 25;        // alternate filling and draining
      wr_en = ($urandom_range(0, 99) < pw) && !full;
      rd_en = ($urandom_range(0, 99) < 50) && !empty;
      din = {$urandom(), 16'($urandom())};
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(din);
    end
    checks++;
    if (fulls == 0 || empties == 0) begin failures++; $display("FAIL full or empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
