// Self-checking test of odb: random writes and reads on both read ports at
// once; each port must show the word at its own address one clock later.
module tb_odb;
  import img_pkg::*;
  localparam int DEPTH = 256;
  logic clk = 0, wr_en = 0;
  logic [7:0] wr_addr = '0, rd_addr_a = '0, rd_addr_b = '0;
  pix_t wr_data = '0, rd_data_a, rd_data_b;
  pix_t model [DEPTH];
  int checks = 0, failures = 0;

  odb #(.DEPTH(DEPTH)) dut (.*);
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
    for (int k = 0; k < 1000; k++) begin
      int a, b;
      a = $urandom_range(DEPTH - 1);
      b = $urandom_range(DEPTH - 1);
      @(negedge clk); rd_addr_a = 8'(a); rd_addr_b = 8'(b);
      wr_en = (k % 5 == 0); wr_addr = 8'($urandom); wr_data = pix_t'($urandom);
      @(posedge clk); #1;
      checks += 2;
      if (rd_data_a !== model[a]) begin failures++; $display("FAIL A a=%0d", a); end
      if (rd_data_b !== model[b]) begin failures++; $display("FAIL B b=%0d", b); end
      if (wr_en) model[wr_addr] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
