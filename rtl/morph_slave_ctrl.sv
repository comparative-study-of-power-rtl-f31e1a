// Slave-side control of the morphology IP. It runs on the ungated clock and
// stays active at all times, so software can always reach the IP even when
// both switchable clock domains are stopped.
//
// It decodes Avalon-MM slave transfers (register map in morph_pkg):
//  * CTRL holds the two clock enables and the interrupt enable; writing it
//    with bit 0 set produces a one-cycle `start` pulse that clears the
//    processing counters and marks the IP busy.
//  * STATUS reports BUSY and DONE; DONE is set by `done_in` from the master
//    side and cleared by writing 1 to it. `irq` = DONE and IRQ_EN, a level
//    held until cleared.
//  * A PIXEL write becomes a one-cycle `pix_valid`. When the result side has
//    no room (`can_accept` low) the write is stalled with avs_waitrequest.
//    While the processing clock is stopped pixel writes complete at once and
//    are discarded, so the bus can never hang on the IP.
//  * Any other write is a parameter write (`param_we`) for the parameter
//    memory; reads of those words return `param_rdata`.
// Reads have no wait states: avs_readdata is valid in the cycle of avs_read.
//
// Which logic stays on the ungated clock follows the design; the register
// map, the stall rule and the interrupt behaviour are this design's choices.
module morph_slave_ctrl
  import morph_pkg::*;
(
  input  logic              clk,
  input  logic              reset_n,
  input  logic [REG_AW-1:0] avs_address,
  input  logic              avs_write,
  input  logic [BUS_W-1:0]  avs_writedata,
  input  logic              avs_read,
  output logic [BUS_W-1:0]  avs_readdata,
  output logic              avs_waitrequest,
  input  logic [BUS_W-1:0]  param_rdata,
  input  logic              can_accept,
  input  logic              done_in,
  output logic              param_we,
  output logic              pix_valid,
  output pix_t              pix,
  output logic              start,
  output logic              mem_clk_en,
  output logic              proc_clk_en,
  output logic              busy,
  output logic              irq
);

  logic irq_en, done;
  logic wr_ctrl, wr_status, wr_pixel;

  assign wr_ctrl   = avs_write && avs_address == REG_CTRL;
  assign wr_status = avs_write && avs_address == REG_STATUS;
  assign wr_pixel  = avs_write && avs_address == REG_PIXEL;
  assign param_we  = avs_write && !wr_ctrl && !wr_status && !wr_pixel;

  assign avs_waitrequest = wr_pixel && proc_clk_en && !can_accept;
  assign pix_valid       = wr_pixel && proc_clk_en && can_accept;
  assign pix             = avs_writedata[PIX_W-1:0];
  assign irq             = done && irq_en;

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      mem_clk_en  <= 1'b0;
      proc_clk_en <= 1'b0;
      irq_en      <= 1'b0;
      start       <= 1'b0;
      busy        <= 1'b0;
      done        <= 1'b0;
    end else begin
      start <= wr_ctrl && avs_writedata[CTRL_START];
      if (wr_ctrl) begin
        mem_clk_en  <= avs_writedata[CTRL_MEM_CLK_EN];
        proc_clk_en <= avs_writedata[CTRL_PROC_CLK_EN];
        irq_en      <= avs_writedata[CTRL_IRQ_EN];
      end
      if (wr_ctrl && avs_writedata[CTRL_START]) begin
        busy <= 1'b1;
        done <= 1'b0;
      end else if (done_in) begin
        busy <= 1'b0;
        done <= 1'b1;
      end else if (wr_status && avs_writedata[STAT_DONE]) begin
        done <= 1'b0;
      end
    end
  end

  always_comb begin
    unique case (avs_address)
      REG_CTRL: begin
        avs_readdata = '0;
        avs_readdata[CTRL_MEM_CLK_EN]  = mem_clk_en;
        avs_readdata[CTRL_PROC_CLK_EN] = proc_clk_en;
        avs_readdata[CTRL_IRQ_EN]      = irq_en;
      end
      REG_STATUS: begin
        avs_readdata = '0;
        avs_readdata[STAT_BUSY] = busy;
        avs_readdata[STAT_DONE] = done;
      end
      REG_PIXEL: avs_readdata = '0;
      default:   avs_readdata = param_rdata;
    endcase
    if (!avs_read) avs_readdata = '0;
  end

  // Avalon: a stalled write keeps its address and data.
  a_stall_hold : assert property (@(posedge clk) disable iff (!reset_n)
    avs_write && avs_waitrequest |=> avs_write && $stable(avs_address));

endmodule
