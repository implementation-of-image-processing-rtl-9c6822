// SRAM image loader. Copies N_PIX gray-scale pixels from the board's
// asynchronous 16-bit SRAM into the input data buffer. Each SRAM word holds two
// pixels: the low byte is the even pixel, the high byte the odd one. The SRAM
// pins are those of a common asynchronous SRAM with active-low chip enable,
// output enable, write enable and low/high byte masks; the loader only reads,
// so write enable stays high and the data bus is an input.
//
// Per word: the address is driven for RD_WAIT+1 cycles, then the word is
// sampled and its low pixel written to the buffer in the same cycle, and the
// high pixel is written in the next cycle, so a word takes RD_WAIT+3 cycles:
// with RD_WAIT = 1 a frame of N_PIX pixels takes 2*N_PIX cycles. A start pulse
// while idle begins loading; done pulses for one cycle at the end. The word
// packing and the wait state are this design's choices. With the default
// 65,536 pixels only the low 15 address bits move; the upper bits and the
// write enable are constant by design.
module sram_loader
  import img_pkg::*;
#(
  parameter int unsigned N_PIX   = 65536,    // even
  parameter int unsigned SRAM_AW = 20,
  parameter int unsigned RD_WAIT = 1,        // extra cycles for SRAM access time
  parameter int unsigned AW      = $clog2(N_PIX)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               busy,
  output logic               done,
  // SRAM pins
  output logic [SRAM_AW-1:0] sram_addr,
  input  logic [15:0]        sram_dq,
  output logic               sram_ce_n,
  output logic               sram_oe_n,
  output logic               sram_we_n,
  output logic               sram_lb_n,
  output logic               sram_hb_n,
  // input buffer write port
  output logic               idb_we,
  output logic [AW-1:0]      idb_waddr,
  output pix_t               idb_wdata
);
  localparam int unsigned N_WORDS = N_PIX / 2;
  localparam int unsigned WW      = (RD_WAIT > 1) ? $clog2(RD_WAIT + 1) : 1;

  typedef enum logic [1:0] {S_IDLE, S_ADDR, S_LO, S_HI} state_e;
  state_e            state;
  logic [AW-2:0]     word;
  logic [WW-1:0]     wait_cnt;
  pix_t              hi_byte;

  assign busy      = (state != S_IDLE);
  assign sram_addr = SRAM_AW'(word);
  assign sram_ce_n = !(state == S_ADDR || state == S_LO);
  assign sram_oe_n = sram_ce_n;
  assign sram_we_n = 1'b1;
  assign sram_lb_n = sram_ce_n;
  assign sram_hb_n = sram_ce_n;

  always_comb begin
    idb_we    = 1'b0;
    idb_waddr = {word, 1'b0};
    idb_wdata = sram_dq[7:0];
    if (state == S_LO) begin
      idb_we = 1'b1;
    end else if (state == S_HI) begin
      idb_we    = 1'b1;
      idb_waddr = {word, 1'b1};
      idb_wdata = hi_byte;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      word     <= '0;
      wait_cnt <= '0;
      hi_byte  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state    <= S_ADDR;
          word     <= '0;
          wait_cnt <= '0;
        end
        S_ADDR: begin
          if (wait_cnt == WW'(RD_WAIT)) state <= S_LO;
          else                          wait_cnt <= wait_cnt + 1'b1;
        end
        S_LO: begin
          hi_byte <= sram_dq[15:8];
          state   <= S_HI;
        end
        S_HI: begin
          wait_cnt <= '0;
          if (word == (AW-1)'(N_WORDS - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            word  <= word + 1'b1;
            state <= S_ADDR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
