// Shared constants and types of the greyscale morphology IP (erosion and
// dilation with a square structuring element of up to 23x23).
//
// The IP is programmed through an Avalon-MM slave with the word register map
// below. The map itself is this design's own choice: the IP is only specified
// to take image pixels, mask coefficients, image size and "other process
// parameters" (operation, destination address) through the slave, and to have
// the clocks of its parts switched on and off by software commands.
//
//   word  name       access  contents
//   0     CTRL       RW      [0] START (write 1: clear counters, begin a run,
//                                reads 0)
//                            [1] MEM_CLK_EN   clock of the parameter memory
//                            [2] PROC_CLK_EN  clock of FIFO, kernel, scan and
//                                             master logic
//                            [3] IRQ_EN
//   1     STATUS     RW1C    [0] BUSY (read only), [1] DONE: the last result
//                            has been written; write 1 to clear it and the
//                            interrupt
//   2     OP         RW      [0] 0 = erosion (minimum), 1 = dilation (maximum)
//   3     WIDTH      RW      image width  w in pixels
//   4     HEIGHT     RW      image height l in pixels (lines per column pass)
//   5     MASK_SIZE  RW      mask size a, 1..MASK_MAX (normally odd)
//   6     DEST       RW      byte address of the result image in memory
//   7     PIXEL      W       [7:0] next pixel of the input stream
//   32+i  MASK_ROW i RW      row i of the mask, bit j = column j (i, j < a)
//
// Registers 2..6 and the mask rows live in the parameter memory and can only
// be written while its clock is enabled.
package morph_pkg;

  // Sizes taken from the design: 8-bit greyscale pixels, a mask of at most
  // 23x23 and a 32-bit system bus.
  localparam int unsigned PIX_W    = 8;
  localparam int unsigned MASK_MAX = 23;
  localparam int unsigned BUS_W    = 32;
  localparam int unsigned ADDR_W   = 32;   // Avalon master byte address
  localparam int unsigned DIM_W    = 16;   // width of image dimension registers
  localparam int unsigned REG_AW   = 6;    // slave word address width

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [DIM_W-1:0] dim_t;

  typedef enum logic { OP_ERODE = 1'b0, OP_DILATE = 1'b1 } morph_op_e;

  // Slave word addresses
  localparam logic [REG_AW-1:0] REG_CTRL      = 6'd0;
  localparam logic [REG_AW-1:0] REG_STATUS    = 6'd1;
  localparam logic [REG_AW-1:0] REG_OP        = 6'd2;
  localparam logic [REG_AW-1:0] REG_WIDTH     = 6'd3;
  localparam logic [REG_AW-1:0] REG_HEIGHT    = 6'd4;
  localparam logic [REG_AW-1:0] REG_MASK_SIZE = 6'd5;
  localparam logic [REG_AW-1:0] REG_DEST      = 6'd6;
  localparam logic [REG_AW-1:0] REG_PIXEL     = 6'd7;
  localparam logic [REG_AW-1:0] REG_MASK_BASE = 6'd32;

  // CTRL bit positions
  localparam int unsigned CTRL_START       = 0;
  localparam int unsigned CTRL_MEM_CLK_EN  = 1;
  localparam int unsigned CTRL_PROC_CLK_EN = 2;
  localparam int unsigned CTRL_IRQ_EN      = 3;

  // STATUS bit positions
  localparam int unsigned STAT_BUSY = 0;
  localparam int unsigned STAT_DONE = 1;

  // One write request of the Avalon master: a byte address, a 32-bit data
  // word and its byte enables.
  typedef struct packed {
    logic [ADDR_W-1:0]  addr;
    logic [BUS_W-1:0]   data;
    logic [BUS_W/8-1:0] be;
  } mwr_t;

endpackage
