// Input data buffer: on-chip RAM that holds the input gray-scale image, one
// pixel per word. One write port fills it (from the SRAM loader) and one read
// port feeds the functional unit. The read is synchronous: rd_data shows the
// word at rd_addr one clock after the address, as block RAM does. A write and
// a read of the same address in one cycle return the old word.
// The buffer itself belongs to the architecture; its port set, one-clock
// read and size are this design's choices.
module idb
  import img_pkg::*;
#(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  pix_t          wr_data,
  input  logic [AW-1:0] rd_addr,
  output pix_t          rd_data
);
  pix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end
endmodule
