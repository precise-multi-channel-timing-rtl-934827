// tb_tdc_tag_former: checks tag assembly.
// Random coarse and fine values, including coarse = 0 (where the
// subtraction wraps below zero) and fine = 0, are sent in; one cycle later
// the tag must carry the channel identifier and the time
// (coarse * 4096 - fine) modulo 2^40.
`timescale 1ps/1ps
module tb_tdc_tag_former;
  import lidar_tdc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, tag_valid;
  coarse_t coarse = '0;
  fine_t fine = '0;
  tag_t tag;
  int checks = 0, failures = 0;
  longint unsigned exp_t;

  tdc_tag_former #(.CHANNEL_ID(8'd5)) dut (.clk, .rst_n, .in_valid, .coarse, .fine, .tag_valid, .tag);

  always #4000 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      coarse = (i < 5) ? coarse_t'(0) : coarse_t'($urandom());
      fine = (i % 7 == 0) ? fine_t'(0) : fine_t'($urandom());
      exp_t = ((longint'(coarse) * 4096) - longint'(fine)) & ((64'd1 << 40) - 1);
      @(negedge clk);
      checks++;
      if (tag_valid !== in_valid || (in_valid && (tag.chan != 8'd5 || tag.stamp != stamp_t'(exp_t)))) begin
        failures++;
        $display("FAIL coarse=%h fine=%h valid=%b tag=%h", coarse, fine, tag_valid, tag);
      end
      in_valid = 1'b0;
    end
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
