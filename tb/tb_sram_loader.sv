// Self-checking test of sram_loader with a 64-pixel image and the behavioural
// SRAM model (8 ns access, 10 ns clock, one wait state). Every buffer write
// must carry the right pixel to the right address, in order, write enable must
// stay inactive, and the load must take 4 clocks per SRAM word (2 per pixel).
module tb_sram_loader;
  import img_pkg::*;
  import tb_img_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [19:0] sram_addr;
  logic [15:0] sram_dq;
  logic sram_ce_n, sram_oe_n, sram_we_n, sram_lb_n, sram_hb_n;
  logic idb_we;
  logic [5:0] idb_waddr;
  pix_t idb_wdata;
  int checks = 0, failures = 0;

  sram_loader #(.N_PIX(N)) dut (.*);
  sram_model u_sram (.addr(sram_addr), .dq(sram_dq), .ce_n(sram_ce_n), .oe_n(sram_oe_n),
                     .we_n(sram_we_n), .lb_n(sram_lb_n), .hb_n(sram_hb_n));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nw, cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      nw = 0; cyc = 1;
      while (!done && cyc < 1000) begin
        @(posedge clk);
        if (idb_we) begin
          checks++;
          if (idb_waddr != 6'(nw) || idb_wdata != pix_at(nw)) begin
            failures++;
            $display("FAIL write %0d: addr %0d data %0d exp %0d", nw, idb_waddr, idb_wdata, pix_at(nw));
          end
          nw++;
        end
        checks++;
        if (!sram_we_n) failures++;
        #1; cyc++;
      end
      checks++;
      if (nw != N) begin failures++; $display("FAIL %0d writes", nw); end
      checks++;
      if (cyc != 2 * N + 1) begin failures++; $display("FAIL load took %0d clocks", cyc); end
      $display("load %0d: %0d clocks", rep, cyc);
      @(negedge clk);
      checks++;
      if (busy || !sram_ce_n) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
