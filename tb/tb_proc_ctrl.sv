// Self-checking test of proc_ctrl with a 16-pixel frame. It checks that read
// addresses run 0..15 one per cycle starting the cycle after start, that
// fu_valid follows each read by one clock and the write address each read by
// two, that busy/done bracket the frame with done N+3 clocks after start, and
// that a start pulse during a frame is ignored.
module tb_proc_ctrl;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, start = 0, busy, done, fu_valid, wr_en;
  logic [3:0] rd_addr, wr_addr;
  int checks = 0, failures = 0;

  proc_ctrl #(.N_PIX(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int cyc, nwr, nfv, done_cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 2; frame++) begin
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1; nwr = 0; nfv = 0; done_cyc = -1;
      while (done_cyc < 0 && cyc < 100) begin
        if (cyc == 5) start = 1;          // ignored: frame in progress
        if (cyc == 6) start = 0;
        if (cyc >= 1 && cyc <= N) chk(busy && rd_addr == 4'(cyc - 1), "read address");
        if (fu_valid) begin chk(cyc == nfv + 2, "fu_valid timing"); nfv++; end
        if (wr_en) begin chk(wr_addr == 4'(nwr) && cyc == nwr + 3, "write address/timing"); nwr++; end
        if (done) begin done_cyc = cyc; chk(!busy, "busy low at done"); end
        @(negedge clk); cyc++;
      end
      chk(done_cyc == N + 3, "done latency");
      chk(nwr == N && nfv == N, "one write per pixel");
      $display("frame %0d: done %0d clocks after start", frame, done_cyc);
      repeat (3) @(negedge clk);
      chk(!busy && !wr_en, "idle after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
