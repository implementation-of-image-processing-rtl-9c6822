// Behavioural model of the board's asynchronous 16-bit SRAM, read side only,
// for testbenches. Its contents are not stored but computed: word a holds
// pixel 2a in the low byte and pixel 2a+1 in the high byte, both from
// tb_img_pkg::pix_at. The data bus follows address, chip enable, output enable
// and the byte masks after ACCESS_NS; a disabled byte reads as 0 (this
// simulator has no high-impedance state). Writes are not modelled: the
// assertion flags any write strobe.
module sram_model #(
  parameter int unsigned ACCESS_NS = 8
) (
  input  logic [19:0] addr,
  output logic [15:0] dq,
  input  logic        ce_n,
  input  logic        oe_n,
  input  logic        we_n,
  input  logic        lb_n,
  input  logic        hb_n
);
  import tb_img_pkg::*;
  logic [15:0] word;

  always_comb begin
    word = '0;
    if (!ce_n && !oe_n) begin
      if (!lb_n) word[7:0]  = pix_at(2 * addr);
      if (!hb_n) word[15:8] = pix_at(2 * addr + 1);
    end
  end

  assign #(ACCESS_NS) dq = word;

  always @(we_n) assert (we_n) else $error("sram_model: write strobe, writes are not modelled");
endmodule
