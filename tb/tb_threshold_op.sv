// Self-checking test of threshold_op: random levels and thresholds, plus the
// edges (level equal to the threshold, thresholds 0 and 255). The result one
// clock later must be 255 for a level at or above the threshold, else 0.
module tb_threshold_op;
  import img_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pix_t in_pix = '0, level = '0, out_pix;
  int checks = 0, failures = 0;

  threshold_op dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int p, input int t);
    int exp;
    @(negedge clk); in_valid = 1; in_pix = pix_t'(p); level = pix_t'(t);
    @(posedge clk); #1;
    exp = (p >= t) ? 255 : 0;
    checks++;
    if (!out_valid || out_pix !== pix_t'(exp)) begin
      failures++;
      $display("FAIL p=%0d t=%0d out=%0d exp=%0d", p, t, out_pix, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(100, 100); one(99, 100); one(0, 0); one(255, 255); one(254, 255); one(0, 1);
    for (int i = 0; i < 2000; i++) one($urandom_range(255), $urandom_range(255));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
