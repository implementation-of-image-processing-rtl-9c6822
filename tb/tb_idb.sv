// Self-checking test of idb: fills a small buffer with random pixels, then
// reads every address and checks the word one clock after the address, and
// that a read during a write to the same address returns the old word.
module tb_idb;
  import img_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, wr_en = 0;
  logic [7:0] wr_addr = '0, rd_addr = '0;
  pix_t wr_data = '0, rd_data;
  pix_t model [DEPTH];
  int checks = 0, failures = 0;

  idb #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); wr_en = 1; wr_addr = 8'(a); wr_data = pix_t'($urandom); model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int k = 0; k < 1000; k++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      @(negedge clk); rd_addr = 8'(a);
      if (k % 7 == 0) begin wr_en = 1; wr_addr = 8'(a); wr_data = pix_t'($urandom); end
      else wr_en = 0;
      @(posedge clk); #1;
      checks++;
      if (rd_data !== model[a]) begin failures++; $display("FAIL a=%0d got %0d exp %0d", a, rd_data, model[a]); end
      if (wr_en) model[a] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
