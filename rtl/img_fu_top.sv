// Gray-scale image enhancement engine built on spatial parallelism.
//
// An input image is copied from the board SRAM into the on-chip input data
// buffer (IDB). The frame controller then streams the IDB, one pixel per
// clock, through the spatially parallel functional unit, where contrast
// stretching, brightness control, threshold and negative transformation work
// on the same pixel at the same time; each writes its result into its own
// on-chip output data buffer (ODB). Four enhanced images therefore take the
// time of one. Two output multiplexers pick one of the four images: one for
// host read-back (host_sel/host_addr, data one clock later), one for the VGA
// display (disp_sel). The four algorithms, the two buffers, the multiplexer,
// the SRAM and the VGA output are the design's; their widths, handshakes,
// formulas and the 256x256 image size are this implementation's choices.
//
// Operation: pulse load_start (ignored while a frame is being processed),
// wait for load_done; set tune and pulse proc_start (ignored while loading or
// processing), wait for proc_done (N+3 clocks later). The display runs all
// the time. clk is the processing clock, which a PLL outside this module
// provides; the VGA pixel clock is clk divided by PIX_DIV, as a clock enable.
module img_fu_top
  import img_pkg::*;
#(
  parameter int unsigned IMG_W   = 256,
  parameter int unsigned IMG_H   = 256,
  parameter int unsigned PIX_DIV = 2,
  parameter int unsigned N_PIX   = IMG_W * IMG_H,
  parameter int unsigned AW      = $clog2(N_PIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  // control
  input  logic          load_start,
  output logic          load_busy,
  output logic          load_done,
  input  logic          proc_start,
  output logic          proc_busy,
  output logic          proc_done,
  input  tune_t         tune,
  // host read-back of a processed image
  input  disp_sel_e     host_sel,
  input  logic [AW-1:0] host_addr,
  output pix_t          host_data,
  // display
  input  disp_sel_e     disp_sel,
  output logic          vga_hsync_n,
  output logic          vga_vsync_n,
  output logic          vga_blank_n,
  output pix_t          vga_r,
  output pix_t          vga_g,
  output pix_t          vga_b,
  output logic          vga_frame_start,
  // board SRAM (read only)
  output logic [19:0]   sram_addr,
  input  logic [15:0]   sram_dq,
  output logic          sram_ce_n,
  output logic          sram_oe_n,
  output logic          sram_we_n,
  output logic          sram_lb_n,
  output logic          sram_hb_n
);
  // ---- loading: SRAM -> IDB ----
  logic          idb_we;
  logic [AW-1:0] idb_waddr;
  pix_t          idb_wdata;

  sram_loader #(.N_PIX(N_PIX), .SRAM_AW(20)) u_loader (
    .clk, .rst_n,
    .start(load_start && !proc_busy),
    .busy(load_busy), .done(load_done),
    .sram_addr, .sram_dq, .sram_ce_n, .sram_oe_n, .sram_we_n, .sram_lb_n, .sram_hb_n,
    .idb_we, .idb_waddr, .idb_wdata
  );

  // ---- processing: IDB -> four parallel units -> four ODBs ----
  logic [AW-1:0] idb_raddr;
  pix_t          idb_rdata;
  logic          fu_in_valid;
  logic          odb_we;
  logic [AW-1:0] odb_waddr;
  logic          fu_out_valid;
  fu_result_t    fu_res;

  idb #(.DEPTH(N_PIX)) u_idb (
    .clk,
    .wr_en(idb_we), .wr_addr(idb_waddr), .wr_data(idb_wdata),
    .rd_addr(idb_raddr), .rd_data(idb_rdata)
  );

  proc_ctrl #(.N_PIX(N_PIX)) u_ctrl (
    .clk, .rst_n,
    .start(proc_start && !load_busy),
    .busy(proc_busy), .done(proc_done),
    .rd_addr(idb_raddr), .fu_valid(fu_in_valid),
    .wr_en(odb_we), .wr_addr(odb_waddr)
  );

  spatial_fu u_fu (
    .clk, .rst_n,
    .in_valid(fu_in_valid), .in_pix(idb_rdata), .tune,
    .out_valid(fu_out_valid), .out_res(fu_res)
  );

  a_fu_aligned: assert property (@(posedge clk) disable iff (!rst_n) fu_out_valid == odb_we);

  // ---- output buffers, one per algorithm ----
  logic [AW-1:0] vga_raddr;
  fu_result_t    host_res, disp_res;

  odb #(.DEPTH(N_PIX)) u_odb_contrast (
    .clk, .wr_en(odb_we), .wr_addr(odb_waddr), .wr_data(fu_res.contrast),
    .rd_addr_a(host_addr), .rd_data_a(host_res.contrast),
    .rd_addr_b(vga_raddr), .rd_data_b(disp_res.contrast)
  );
  odb #(.DEPTH(N_PIX)) u_odb_bright (
    .clk, .wr_en(odb_we), .wr_addr(odb_waddr), .wr_data(fu_res.bright),
    .rd_addr_a(host_addr), .rd_data_a(host_res.bright),
    .rd_addr_b(vga_raddr), .rd_data_b(disp_res.bright)
  );
  odb #(.DEPTH(N_PIX)) u_odb_thresh (
    .clk, .wr_en(odb_we), .wr_addr(odb_waddr), .wr_data(fu_res.thresh),
    .rd_addr_a(host_addr), .rd_data_a(host_res.thresh),
    .rd_addr_b(vga_raddr), .rd_data_b(disp_res.thresh)
  );
  odb #(.DEPTH(N_PIX)) u_odb_negative (
    .clk, .wr_en(odb_we), .wr_addr(odb_waddr), .wr_data(fu_res.negative),
    .rd_addr_a(host_addr), .rd_data_a(host_res.negative),
    .rd_addr_b(vga_raddr), .rd_data_b(disp_res.negative)
  );

  // ---- output multiplexers ----
  pix_t disp_pix;

  out_mux u_host_mux (.sel(host_sel), .in_res(host_res), .out_pix(host_data));
  out_mux u_disp_mux (.sel(disp_sel), .in_res(disp_res), .out_pix(disp_pix));

  // ---- VGA display ----
  localparam int unsigned DW = (PIX_DIV > 1) ? $clog2(PIX_DIV) : 1;
  logic [DW-1:0] div_cnt;
  logic          pix_ce;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            div_cnt <= '0;
    else if (div_cnt == DW'(PIX_DIV - 1))  div_cnt <= '0;
    else                                   div_cnt <= div_cnt + 1'b1;
  end
  assign pix_ce = (div_cnt == DW'(PIX_DIV - 1));

  vga_ctrl #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_vga (
    .clk, .rst_n, .pix_ce,
    .rd_addr(vga_raddr), .rd_data(disp_pix),
    .hsync_n(vga_hsync_n), .vsync_n(vga_vsync_n), .blank_n(vga_blank_n),
    .vga_r, .vga_g, .vga_b, .frame_start(vga_frame_start)
  );
endmodule
