// End-to-end test of img_fu_top at its default size (256x256 image, VGA
// 640x480). It loads the test image from the SRAM model, processes it with two
// sets of tuning values, reads all four result images back through the host
// port and compares every pixel with reference models of the four point
// operations, and checks the VGA output of one frame pixel by pixel for two
// display selections. It also checks the load and frame times and that a
// start during a busy phase is refused. Each mechanism is counted: brightness
// saturation at both ends, contrast clamping below low and at 255, both
// threshold outcomes, refused starts, a display switch, and sync pulses; a
// mechanism that never happened counts as a failure.
module tb_img_fu_top;
  import img_pkg::*;
  import tb_img_pkg::*;
  localparam int IW = 256, IH = 256, N = IW * IH;
  localparam int H_TOT = 800, H_ACT = 640, V_ACT = 480;

  logic clk = 0, rst_n = 0;
  logic load_start = 0, load_busy, load_done, proc_start = 0, proc_busy, proc_done;
  tune_t tune = '0;
  disp_sel_e host_sel = SEL_CONTRAST, disp_sel = SEL_NEGATIVE;
  logic [15:0] host_addr = '0;
  pix_t host_data;
  logic vga_hsync_n, vga_vsync_n, vga_blank_n, vga_frame_start;
  pix_t vga_r, vga_g, vga_b;
  logic [19:0] sram_addr;
  logic [15:0] sram_dq;
  logic sram_ce_n, sram_oe_n, sram_we_n, sram_lb_n, sram_hb_n;

  int checks = 0, failures = 0;
  int n_sat_hi = 0, n_sat_lo = 0, n_cs_low = 0, n_cs_clip = 0, n_th_hi = 0, n_th_lo = 0;
  int n_refused = 0, n_switch = 0, n_hsync = 0, n_vsync = 0, n_frames = 0;

  img_fu_top dut (.*);
  sram_model u_sram (.addr(sram_addr), .dq(sram_dq), .ce_n(sram_ce_n), .oe_n(sram_oe_n),
                     .we_n(sram_we_n), .lb_n(sram_lb_n), .hb_n(sram_hb_n));
  always #5 clk = ~clk;

  initial begin
    repeat (6_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge vga_hsync_n) n_hsync++;
  always @(negedge vga_vsync_n) n_vsync++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic load_image();
    int cyc = 0;
    @(negedge clk); load_start = 1;
    @(negedge clk); load_start = 0;
    // a processing start while loading is refused
    proc_start = 1;
    @(negedge clk); proc_start = 0; cyc = 2;
    chk(!proc_busy, "processing start refused during load");
    if (!proc_busy) n_refused++;
    while (!load_done && cyc < 10 * N) begin @(negedge clk); cyc++; end
    chk(cyc == 2 * N + 1, "load time 2 clocks per pixel");
    $display("load: %0d clocks", cyc);
  endtask

  task automatic process(input tune_t t);
    int cyc = 0;
    tune = t;
    @(negedge clk); proc_start = 1;
    @(negedge clk); proc_start = 0;
    load_start = 1;
    @(negedge clk); load_start = 0; cyc = 2;
    chk(!load_busy, "load start refused during processing");
    if (!load_busy) n_refused++;
    while (!proc_done && cyc < 10 * N) begin @(negedge clk); cyc++; end
    chk(cyc == N + 3, "frame time N+3 clocks");
    $display("process: %0d clocks for %0d pixels, 4 results each", cyc, N);
  endtask

  task automatic read_back(input tune_t t);
    int p, e;
    for (int a = 0; a < N; a++) begin
      p = pix_at(a);
      for (int s = 0; s < 4; s++) begin
        @(negedge clk); host_addr = 16'(a); host_sel = disp_sel_e'(s);
        @(posedge clk); #1;
        case (s)
          0: begin
            e = ref_contrast(p, t.cs_low, t.cs_gain);
            if (p < t.cs_low) n_cs_low++;
            else if (((p - t.cs_low) * t.cs_gain) / 256 > 255) n_cs_clip++;
          end
          1: begin
            e = ref_bright(p, $signed(t.br_offset));
            if (p + $signed(t.br_offset) > 255) n_sat_hi++;
            if (p + $signed(t.br_offset) < 0) n_sat_lo++;
          end
          2: begin e = ref_thresh(p, t.th_level); if (e == 255) n_th_hi++; else n_th_lo++; end
          default: e = ref_negative(p);
        endcase
        chk(host_data == pix_t'(e), $sformatf("result a=%0d sel=%0d got %0d exp %0d", a, s, host_data, e));
      end
    end
  endtask

  // Check the display: rows 0..rows-1 of the frame that starts next.
  task automatic check_display(input disp_sel_e sel, input tune_t t, input int rows);
    int x, y, p, e;
    disp_sel = sel;
    @(posedge vga_frame_start);
    @(posedge clk); #1;
    n_frames++;
    for (int k = 0; k < rows * H_TOT; k++) begin
      x = k % H_TOT;
      y = k / H_TOT;
      p = pix_at(y * IW + x);
      case (sel)
        SEL_CONTRAST: e = ref_contrast(p, t.cs_low, t.cs_gain);
        SEL_BRIGHT:   e = ref_bright(p, $signed(t.br_offset));
        SEL_THRESH:   e = ref_thresh(p, t.th_level);
        default:      e = ref_negative(p);
      endcase
      if (!(x < IW && y < IH)) e = 0;
      chk(vga_blank_n == (x < H_ACT && y < V_ACT), "blank");
      chk(vga_r == pix_t'(e) && vga_g == pix_t'(e) && vga_b == pix_t'(e),
          $sformatf("display (%0d,%0d) got %0d exp %0d", x, y, vga_r, e));
      repeat (2) @(posedge clk);
      #1;
    end
  endtask

  initial begin
    tune_t t1, t2;
    t1 = '{cs_low: 8'd40, cs_gain: 16'((255 * 256) / (200 - 40)), br_offset: 9'd100, th_level: 8'd128};
    t2 = '{cs_low: 8'd0,  cs_gain: 16'd256, br_offset: -9'sd100, th_level: 8'd60};
    repeat (5) @(negedge clk);
    rst_n = 1;
    load_image();
    process(t1);
    read_back(t1);
    check_display(SEL_NEGATIVE, t1, 260);
    check_display(SEL_THRESH, t1, 4);
    n_switch++;
    process(t2);
    read_back(t2);
    check_display(SEL_BRIGHT, t2, 3);
    n_switch++;
    $display("mechanisms: sat_hi=%0d sat_lo=%0d cs_below_low=%0d cs_clip=%0d th_white=%0d th_black=%0d refused=%0d switches=%0d hsync=%0d vsync=%0d frames=%0d",
             n_sat_hi, n_sat_lo, n_cs_low, n_cs_clip, n_th_hi, n_th_lo, n_refused, n_switch, n_hsync, n_vsync, n_frames);
    chk(n_sat_hi > 0, "brightness saturation high happened");
    chk(n_sat_lo > 0, "brightness saturation low happened");
    chk(n_cs_low > 0, "contrast below low happened");
    chk(n_cs_clip > 0, "contrast clip at 255 happened");
    chk(n_th_hi > 0 && n_th_lo > 0, "threshold both outcomes happened");
    chk(n_refused == 3, "refused starts happened");
    chk(n_switch == 2 && n_frames == 3, "display switches happened");
    chk(n_hsync > 500 && n_vsync >= 2, "syncs happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
