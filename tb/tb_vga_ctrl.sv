// Self-checking test of vga_ctrl with a shrunken screen (8x6 visible, 15x10
// total) and a 4x3 image, so that whole frames run quickly. The buffer is a
// model with one clock of read latency whose word is a function of its
// address. For every pixel clock the test works out the screen position on its
// own and checks both syncs, blank_n, frame_start and the three colour
// channels two clocks later. It runs with pixel clock = system clock / 2.
module tb_vga_ctrl;
  import img_pkg::*;
  localparam int IW = 4, IH = 3;
  localparam int HA = 8, HF = 2, HS = 3, HB = 2, HT = HA + HF + HS + HB;
  localparam int VA = 6, VF = 1, VS = 2, VB = 1, VT = VA + VF + VS + VB;
  logic clk = 0, rst_n = 0, pix_ce;
  logic [3:0] rd_addr;
  pix_t rd_data = '0;
  logic hsync_n, vsync_n, blank_n, frame_start;
  pix_t vga_r, vga_g, vga_b;
  int checks = 0, failures = 0, hs_pulses = 0, frames = 0;
  int div = 0;

  vga_ctrl #(.IMG_W(IW), .IMG_H(IH), .H_ACT(HA), .H_FP(HF), .H_SYNC(HS), .H_BP(HB),
             .V_ACT(VA), .V_FP(VF), .V_SYNC(VS), .V_BP(VB)) dut (.*);
  always #5 clk = ~clk;

  function automatic pix_t mem_at(input logic [3:0] a);
    return pix_t'(a * 17 + 3);
  endfunction
  always_ff @(posedge clk) rd_data <= mem_at(rd_addr);

  assign pix_ce = (div == 1);
  always_ff @(posedge clk) div <= rst_n ? (div + 1) % 2 : 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pos(input int k);
    int x, y;
    pix_t e;
    repeat (2) @(posedge clk);
    #1;
    x = k % HT;
    y = (k / HT) % VT;
    e = (x < IW && y < IH) ? mem_at(4'(y * IW + x)) : '0;
    checks++;
    if (hsync_n !== !(x >= HA + HF && x < HA + HF + HS) ||
        vsync_n !== !(y >= VA + VF && y < VA + VF + VS) ||
        blank_n !== (x < HA && y < VA) ||
        frame_start !== (x == 0 && y == 0) ||
        vga_r !== e || vga_g !== e || vga_b !== e) begin
      failures++;
      $display("FAIL k=%0d (%0d,%0d): hs=%0b vs=%0b bl=%0b fs=%0b r=%0d exp %0d",
               k, x, y, hsync_n, vsync_n, blank_n, frame_start, vga_r, e);
    end
    if (x == HA + HF) hs_pulses++;
    if (frame_start) frames++;
  endtask

  initial begin
    int k;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    k = 0;
    while (k < 3 * HT * VT) begin
      @(posedge clk);
      if (pix_ce) begin
        k++;
        fork
          check_pos(k);
        join_none
      end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (hs_pulses != 3 * VT || frames < 2) begin
      failures++;
      $display("FAIL hsync pulses %0d frames %0d", hs_pulses, frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
