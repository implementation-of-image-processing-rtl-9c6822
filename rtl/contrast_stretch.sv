// Linear contrast stretching of one gray level per cycle.
//   s = clamp(((r - low) * gain) >> GAIN_FRAC, 0, 255), and s = 0 for r < low.
// gain is unsigned fixed point with GAIN_FRAC fraction bits, so a host that
// wants to map the input range [low, high] onto [0, 255] loads
// gain = round(255 * 2^GAIN_FRAC / (high - low)); no divider is needed in
// hardware. The stretch itself is the operation the design is built for; the
// fixed-point form and the tuning inputs are this design's choices.
// Timing: one register stage, result and valid appear one cycle after the input.
module contrast_stretch
  import img_pkg::*;
#(
  parameter int unsigned GAIN_FRAC = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  pix_t        in_pix,
  input  pix_t        low,
  input  logic [15:0] gain,
  output logic        out_valid,
  output pix_t        out_pix
);
  logic [PIX_W:0]    diff;      // r - low, with borrow in the top bit
  logic [PIX_W+15:0] prod;
  logic [PIX_W+15:0] scaled;
  pix_t              s;

  always_comb begin
    diff   = {1'b0, in_pix} - {1'b0, low};
    prod   = diff[PIX_W-1:0] * gain;
    scaled = prod >> GAIN_FRAC;
    if (diff[PIX_W])                 s = '0;            // below low
    else if (scaled > (PIX_W+16)'(PIX_MAX)) s = pix_t'(PIX_MAX);
    else                             s = scaled[PIX_W-1:0];
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
