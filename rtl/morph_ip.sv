// Greyscale morphology IP: erosion and dilation of an 8-bit image with a
// square structuring element of up to 23x23, attached to an Avalon-MM system
// bus as a slave (configuration and pixel input) and a master (results).
//
// Data flow. Software writes the mask, operation, image size, mask size a
// and result address into the parameter memory, enables the clocks and sets
// START. A DMA then writes the image to the PIXEL register in column-wise
// quasi raster order: for each horizontal mask position c = 0 .. w-a, the l
// rows of the strip of columns c .. c+a-1, top to bottom, a pixels per row.
// Every pixel is therefore sent up to a times. The FIFO assembles each row
// strip into a line, the kernel keeps the last a lines and produces the
// masked minimum or maximum for each window position once a lines of the
// pass have arrived, and the master writer stores result n at byte address
// DEST + n (all (w-a+1)*(l-a+1) results, column pass after column pass, top
// to bottom). After the last result has been written, STATUS.DONE is set and
// `irq` raised if enabled.
//
// Clocks. Three clock regions: the slave control on `clk`, always running;
// the parameter memory on a gated memory clock; FIFO, kernel, scan control
// and master writer on a gated processing clock. Both enables are bits of
// CTRL, so software can stop the memory once configured and both when idle.
//
// Timing. One pixel per clock is accepted while the result queue has room;
// a result reaches the master queue two clocks after the last pixel of its
// line. With PACK32 = 1 up to four results share one 32-bit transfer;
// PACK32 = 0 gives one 8-bit transfer per result.
//
// The four-part structure, the scan order, the two gated domains, the
// interrupt and both master widths follow the design. The register map,
// result addressing, border handling (no results for windows reaching
// outside the image) and flow control are this design's choices.
module morph_ip
  import morph_pkg::*;
#(
  parameter int unsigned MASK_MAX_P = MASK_MAX,
  parameter bit          PACK32     = 1'b1,
  parameter int unsigned QDEPTH     = 4
) (
  input  logic               clk,
  input  logic               reset_n,
  // Avalon-MM slave
  input  logic [REG_AW-1:0]  avs_address,
  input  logic               avs_write,
  input  logic [BUS_W-1:0]   avs_writedata,
  input  logic               avs_read,
  output logic [BUS_W-1:0]   avs_readdata,
  output logic               avs_waitrequest,
  // Avalon-MM master
  output logic [ADDR_W-1:0]  avm_address,
  output logic               avm_write,
  output logic [BUS_W-1:0]   avm_writedata,
  output logic [BUS_W/8-1:0] avm_byteenable,
  input  logic               avm_waitrequest,
  // Interrupt
  output logic               irq
);

  logic mem_clk_en, proc_clk_en, clk_mem, clk_proc;
  logic param_we, pix_valid, start, can_accept, done;
  pix_t pix;
  logic [BUS_W-1:0] param_rdata;

  morph_op_e          op;
  dim_t               width, height, mask_size;
  logic [ADDR_W-1:0]  dest;
  logic [MASK_MAX_P-1:0][MASK_MAX_P-1:0] mask;

  logic                  line_valid, window_full, last_line;
  pix_t [MASK_MAX_P-1:0] line;
  logic                  res_valid, res_last;
  pix_t                  res;

  morph_slave_ctrl u_slave (
    .clk, .reset_n,
    .avs_address, .avs_write, .avs_writedata, .avs_read, .avs_readdata, .avs_waitrequest,
    .param_rdata, .can_accept, .done_in(done),
    .param_we, .pix_valid, .pix, .start, .mem_clk_en, .proc_clk_en, .busy(), .irq
  );

  morph_clock_gate u_cg_mem  (.clk, .en(mem_clk_en),  .gclk(clk_mem));
  morph_clock_gate u_cg_proc (.clk, .en(proc_clk_en), .gclk(clk_proc));

  morph_param_memory #(.MASK_MAX_P(MASK_MAX_P)) u_param (
    .clk_mem, .reset_n, .wr_en(param_we), .addr(avs_address), .wdata(avs_writedata),
    .rdata(param_rdata), .op, .width, .height, .mask_size, .dest, .mask
  );

  morph_pixel_fifo #(.MASK_MAX_P(MASK_MAX_P)) u_fifo (
    .clk(clk_proc), .reset_n, .clear(start), .mask_size, .pix_valid, .pix, .line_valid, .line
  );

  morph_scan_ctrl u_scan (
    .clk(clk_proc), .reset_n, .clear(start), .width, .height, .mask_size, .line_valid,
    .window_full, .last_line, .result_count(), .row(), .col()
  );

  morph_kernel #(.MASK_MAX_P(MASK_MAX_P)) u_kernel (
    .clk(clk_proc), .reset_n, .op, .mask_size, .mask, .line_valid, .line, .window_full,
    .res_valid, .res
  );

  // The last-result flag travels with the kernel's one-cycle latency.
  always_ff @(posedge clk_proc or negedge reset_n) begin
    if (!reset_n)   res_last <= 1'b0;
    else if (start) res_last <= 1'b0;
    else            res_last <= line_valid && last_line;
  end

  morph_master_writer #(.PACK32(PACK32), .QDEPTH(QDEPTH)) u_master (
    .clk(clk_proc), .reset_n, .clear(start), .dest, .res_valid, .res, .res_last,
    .can_accept, .done, .avm_address, .avm_write, .avm_writedata, .avm_byteenable,
    .avm_waitrequest
  );

endmodule
