// Binary threshold of one gray level per cycle: s = 255 if r >= level, else 0.
// The operation is the design's; "at or above" is this design's choice.
// Timing: one register stage, result and valid one cycle after the input.
module threshold_op
  import img_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t in_pix,
  input  pix_t level,
  output logic out_valid,
  output pix_t out_pix
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      out_pix   <= (in_pix >= level) ? pix_t'(PIX_MAX) : '0;
    end
  end
endmodule
