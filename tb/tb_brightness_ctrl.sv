// Self-checking test of brightness_ctrl: positive and negative offsets, with
// saturation at both ends. The expected level is worked out with integer
// arithmetic and clamped to 0..255; the result must appear one clock later.
module tb_brightness_ctrl;
  import img_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pix_t in_pix = '0, out_pix;
  logic [8:0] offset = '0;
  int checks = 0, failures = 0, sat_hi = 0, sat_lo = 0;

  brightness_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int p, input int off);
    int exp;
    @(negedge clk); in_valid = 1; in_pix = pix_t'(p); offset = 9'(off);
    @(posedge clk); #1;
    exp = p + off;
    if (exp > 255) begin exp = 255; sat_hi++; end
    if (exp < 0)   begin exp = 0;   sat_lo++; end
    checks++;
    if (!out_valid || out_pix !== pix_t'(exp)) begin
      failures++;
      $display("FAIL p=%0d off=%0d out=%0d exp=%0d", p, off, out_pix, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(200, 100); one(10, -50); one(255, 255); one(0, -256); one(128, 0); one(100, 155); one(100, -100);
    for (int i = 0; i < 2000; i++) one($urandom_range(255), int'($urandom_range(511)) - 256);
    if (sat_hi == 0 || sat_lo == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
