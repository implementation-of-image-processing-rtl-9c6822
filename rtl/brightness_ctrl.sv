// Brightness control of one gray level per cycle: s = sat(r + offset), with a
// signed 9-bit offset (-256..255) and saturation to 0..255. The operation is
// the design's; the offset width and saturation are this design's choices.
// Timing: one register stage, result and valid one cycle after the input.
module brightness_ctrl
  import img_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  pix_t       in_pix,
  input  logic [8:0] offset,   // two's complement
  output logic       out_valid,
  output pix_t       out_pix
);
  logic signed [10:0] sum;
  pix_t               s;

  always_comb begin
    sum = $signed({3'b000, in_pix}) + $signed({{2{offset[8]}}, offset});
    if (sum < 0)                         s = '0;
    else if (sum > $signed(11'(PIX_MAX))) s = pix_t'(PIX_MAX);
    else                                 s = sum[PIX_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      out_pix   <= s;
    end
  end
endmodule
