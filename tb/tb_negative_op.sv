// Self-checking test of negative_op: every gray level 0..255 goes in, and
// each result, one clock later, must be 255 minus the level; valid must
// follow in_valid with one clock of latency.
module tb_negative_op;
  import img_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pix_t in_pix = '0, out_pix;
  int checks = 0, failures = 0;

  negative_op dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk); in_valid = (i % 3 != 1); in_pix = pix_t'(i);
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid || (in_valid && out_pix !== pix_t'(255 - i))) begin
        failures++;
        $display("FAIL in=%0d out=%0d valid=%0b", i, out_pix, out_valid);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
