// Self-checking test of contrast_stretch. For random ranges [low, high] the
// gain is computed as 255*256/(high-low); every input level is checked against
// clamp(((r - low) * gain) / 256, 0, 255), with 0 below low. Levels at low and
// at high must map to 0 and close to 255, as a stretch should.
module tb_contrast_stretch;
  import img_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pix_t in_pix = '0, low = '0, out_pix;
  logic [15:0] gain = '0;
  int checks = 0, failures = 0;

  contrast_stretch dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int p, input int lo, input int g);
    int exp;
    @(negedge clk); in_valid = 1; in_pix = pix_t'(p); low = pix_t'(lo); gain = 16'(g);
    @(posedge clk); #1;
    if (p < lo) exp = 0;
    else begin
      exp = ((p - lo) * g) / 256;
      if (exp > 255) exp = 255;
    end
    checks++;
    if (!out_valid || out_pix !== pix_t'(exp)) begin
      failures++;
      $display("FAIL p=%0d low=%0d gain=%0d out=%0d exp=%0d", p, lo, g, out_pix, exp);
    end
  endtask

  initial begin
    int lo, hi, g;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // identity: low 0, gain 1.0
    for (int p = 0; p < 256; p++) one(p, 0, 256);
    for (int k = 0; k < 40; k++) begin
      lo = $urandom_range(200);
      hi = lo + 1 + $urandom_range(254 - lo);
      g  = (255 * 256) / (hi - lo);
      for (int p = 0; p < 256; p++) one(p, lo, g);
      // the ends of the range
      @(negedge clk); in_pix = pix_t'(hi);
      @(posedge clk); #1; checks++;
      if (out_pix < 8'd250) begin failures++; $display("FAIL high end lo=%0d hi=%0d out=%0d", lo, hi, out_pix); end
    end
    one(255, 0, 65535);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
