// Self-checking test of spatial_fu: a random pixel stream with gaps in valid
// and random tuning values. Each cycle's four results must equal independently
// computed contrast, brightness, threshold and negative values of the pixel
// that entered one clock earlier, all in the same cycle.
module tb_spatial_fu;
  import img_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  pix_t in_pix = '0;
  tune_t tune = '0;
  fu_result_t out_res;
  int checks = 0, failures = 0;

  spatial_fu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clamp(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  initial begin
    int p, lo, g, off, th;
    fu_result_t exp;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (i % 100 == 0) begin
        tune.cs_low    = pix_t'($urandom_range(100));
        tune.cs_gain   = 16'($urandom_range(256, 1024));
        tune.br_offset = 9'($urandom);
        tune.th_level  = pix_t'($urandom);
      end
      in_valid = ($urandom_range(3) != 0);
      in_pix   = pix_t'($urandom);
      p   = in_pix;
      lo  = tune.cs_low;
      g   = tune.cs_gain;
      off = $signed(tune.br_offset);
      th  = tune.th_level;
      exp.contrast = pix_t'((p < lo) ? 0 : clamp(((p - lo) * g) / 256));
      exp.bright   = pix_t'(clamp(p + off));
      exp.thresh   = (p >= th) ? 8'd255 : 8'd0;
      exp.negative = pix_t'(255 - p);
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid || (in_valid && out_res !== exp)) begin
        failures++;
        $display("FAIL p=%0d got %h exp %h", p, out_res, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
