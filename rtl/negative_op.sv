// Negative transformation (image invert) of one gray level per cycle:
// s = (L - 1) - r with L = 256 levels. Timing: one register stage, result and
// valid one cycle after the input, matching the other point operations.
module negative_op
  import img_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  pix_t in_pix,
  output logic out_valid,
  output pix_t out_pix
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      out_pix   <= pix_t'(PIX_MAX) - in_pix;
    end
  end
endmodule
