// Output data buffer: on-chip RAM that holds one processed image. Each
// algorithm of the functional unit has its own ODB, so all four results of a
// pixel are stored in the same cycle. One write port (from the unit) and two
// synchronous read ports: port A for host read-back, port B for the display.
// Each read port shows the word one clock after its address.
// One buffer per algorithm is how this design stores the parallel results;
// the two read ports and the latency are its own choices.
module odb
  import img_pkg::*;
#(
  parameter int unsigned DEPTH = 65536,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  pix_t          wr_data,
  input  logic [AW-1:0] rd_addr_a,
  output pix_t          rd_data_a,
  input  logic [AW-1:0] rd_addr_b,
  output pix_t          rd_data_b
);
  pix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data_a <= mem[rd_addr_a];
    rd_data_b <= mem[rd_addr_b];
  end
endmodule
