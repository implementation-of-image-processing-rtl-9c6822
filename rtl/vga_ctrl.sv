// VGA display controller. Generates 640x480 at 60 Hz timing (800 x 525 pixel
// clocks per frame, negative horizontal and vertical syncs) and shows an
// IMG_W x IMG_H gray-scale image in the top-left corner of the screen, with
// black around it. The gray level goes to all three 8-bit colour channels of
// the video DAC. The timing numbers are the usual VGA ones, not the design's.
//
// The controller runs on the system clock; pix_ce marks the clock cycles that
// are pixel clocks. It fetches each pixel from a buffer with a one-clock read
// latency: the counters advance on a pix_ce cycle, the buffer reads in the
// next clock, and all outputs (syncs, blank_n, r/g/b) are registered together
// two clocks after the pix_ce cycle, so they stay aligned with each other.
module vga_ctrl
  import img_pkg::*;
#(
  parameter int unsigned IMG_W  = 256,
  parameter int unsigned IMG_H  = 256,
  parameter int unsigned H_ACT  = 640,
  parameter int unsigned H_FP   = 16,
  parameter int unsigned H_SYNC = 96,
  parameter int unsigned H_BP   = 48,
  parameter int unsigned V_ACT  = 480,
  parameter int unsigned V_FP   = 10,
  parameter int unsigned V_SYNC = 2,
  parameter int unsigned V_BP   = 33,
  parameter int unsigned AW     = $clog2(IMG_W * IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pix_ce,
  output logic [AW-1:0] rd_addr,
  input  pix_t          rd_data,
  output logic          hsync_n,
  output logic          vsync_n,
  output logic          blank_n,
  output pix_t          vga_r,
  output pix_t          vga_g,
  output pix_t          vga_b,
  output logic          frame_start   // one-clock pulse when (0,0) is output
);
  localparam int unsigned H_TOT = H_ACT + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOT = V_ACT + V_FP + V_SYNC + V_BP;
  localparam int unsigned HW    = $clog2(H_TOT);
  localparam int unsigned VW    = $clog2(V_TOT);

  logic [HW-1:0] hc;
  logic [VW-1:0] vc;
  logic          ce_d1, ce_d2;

  // stage 1: timing of the pixel being fetched
  logic s1_hs, s1_vs, s1_de, s1_img, s1_first;
  logic hs, vs, de, in_img;

  always_comb begin
    hs      = (hc >= HW'(H_ACT + H_FP)) && (hc < HW'(H_ACT + H_FP + H_SYNC));
    vs      = (vc >= VW'(V_ACT + V_FP)) && (vc < VW'(V_ACT + V_FP + V_SYNC));
    de      = (hc < HW'(H_ACT)) && (vc < VW'(V_ACT));
    in_img  = (hc < HW'(IMG_W)) && (vc < VW'(IMG_H));
    rd_addr = in_img ? AW'(vc * IMG_W + hc) : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc          <= '0;
      vc          <= '0;
      ce_d1       <= 1'b0;
      ce_d2       <= 1'b0;
      s1_hs       <= 1'b0;
      s1_vs       <= 1'b0;
      s1_de       <= 1'b0;
      s1_img      <= 1'b0;
      s1_first    <= 1'b0;
      hsync_n     <= 1'b1;
      vsync_n     <= 1'b1;
      blank_n     <= 1'b0;
      vga_r       <= '0;
      vga_g       <= '0;
      vga_b       <= '0;
      frame_start <= 1'b0;
    end else begin
      ce_d1       <= pix_ce;
      ce_d2       <= ce_d1;
      frame_start <= 1'b0;
      if (pix_ce) begin
        if (hc == HW'(H_TOT - 1)) begin
          hc <= '0;
          vc <= (vc == VW'(V_TOT - 1)) ? '0 : vc + 1'b1;
        end else begin
          hc <= hc + 1'b1;
        end
      end
      if (ce_d1) begin
        s1_hs    <= hs;
        s1_vs    <= vs;
        s1_de    <= de;
        s1_img   <= in_img;
        s1_first <= (hc == '0) && (vc == '0);
      end
      if (ce_d2) begin
        hsync_n     <= !s1_hs;
        vsync_n     <= !s1_vs;
        blank_n     <= s1_de;
        vga_r       <= (s1_de && s1_img) ? rd_data : '0;
        vga_g       <= (s1_de && s1_img) ? rd_data : '0;
        vga_b       <= (s1_de && s1_img) ? rd_data : '0;
        frame_start <= s1_first;
      end
    end
  end
endmodule
