// Frame controller of the functional unit. A start pulse while idle begins a
// frame: the controller reads the input buffer at addresses 0..N_PIX-1, one
// per cycle, marks each pixel valid for the functional unit once the buffer's
// one-cycle read latency has passed, and presents the matching output-buffer
// write address and enable after the unit's one-cycle latency. busy is high
// from the cycle after start until the last write; done pulses for one cycle
// after it. A start while busy is ignored. Timing: the first read address is
// issued the cycle after start, the last write happens N_PIX+2 cycles after
// start, done is high in the cycle after that. The sequencing is this
// design's own; one pixel per cycle is the rate it chooses.
module proc_ctrl #(
  parameter int unsigned N_PIX = 65536,
  parameter int unsigned AW    = $clog2(N_PIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic [AW-1:0] rd_addr,    // to the input buffer
  output logic          fu_valid,   // input pixel of the unit is valid
  output logic          wr_en,      // to the output buffers
  output logic [AW-1:0] wr_addr
);
  localparam logic [AW-1:0] LAST = AW'(N_PIX - 1);

  logic          reading;
  logic [AW-1:0] addr;
  logic [AW-1:0] a1;
  logic          v2;
  logic [AW-1:0] a2;

  assign rd_addr = addr;
  assign wr_en   = v2;
  assign wr_addr = a2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading  <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
      addr     <= '0;
      a1       <= '0;
      fu_valid <= 1'b0;
      v2       <= 1'b0;
      a2       <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        reading <= 1'b1;
        busy    <= 1'b1;
        addr    <= '0;
      end else if (reading) begin
        if (addr == LAST) reading <= 1'b0;
        else              addr    <= addr + 1'b1;
      end
      // stage 1: buffer data valid, stage 2: unit result valid
      fu_valid <= reading;
      a1       <= addr;
      v2       <= fu_valid;
      a2       <= a1;
      if (v2 && a2 == LAST) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  a_done_only_when_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
endmodule
