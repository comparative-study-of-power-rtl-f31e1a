// Parameter memory of the morphology IP: the structuring element (mask) and
// the image parameters of a run.
//
// It holds the operation (erosion or dilation), the image width and height,
// the mask size a, the byte address where results are written and MASK_MAX
// mask rows of MASK_MAX bits. All of it is written through the Avalon slave
// (word addresses in morph_pkg) and read back combinationally on rdata. The
// mask goes to the kernel in parallel and the rest to the control logic as
// static configuration.
//
// The block is clocked by its own gated clock, the memory clock domain, so
// software can stop it once configured; a write while that clock is stopped
// is lost. Storing everything in registers, and clamping the mask size to
// 1..MASK_MAX, are this design's choices. Timing: a write takes effect at the
// next rising edge of clk_mem.
module morph_param_memory
  import morph_pkg::*;
#(
  parameter int unsigned MASK_MAX_P = MASK_MAX
) (
  input  logic                                 clk_mem,
  input  logic                                 reset_n,
  input  logic                                 wr_en,
  input  logic [REG_AW-1:0]                    addr,
  input  logic [BUS_W-1:0]                     wdata,
  output logic [BUS_W-1:0]                     rdata,
  output morph_op_e                            op,
  output dim_t                                 width,
  output dim_t                                 height,
  output dim_t                                 mask_size,
  output logic [ADDR_W-1:0]                    dest,
  output logic [MASK_MAX_P-1:0][MASK_MAX_P-1:0] mask   // [row][column]
);

  dim_t wsize;

  // Mask size clamped to the supported range 1..MASK_MAX_P
  always_comb begin
    wsize = wdata[DIM_W-1:0];
    if (wsize == '0) wsize = dim_t'(1);
    else if (wsize > dim_t'(MASK_MAX_P)) wsize = dim_t'(MASK_MAX_P);
  end

  always_ff @(posedge clk_mem or negedge reset_n) begin
    if (!reset_n) begin
      op        <= OP_ERODE;
      width     <= '0;
      height    <= '0;
      mask_size <= dim_t'(1);
      dest      <= '0;
      mask      <= '0;
    end else if (wr_en) begin
      unique case (addr)
        REG_OP:        op        <= morph_op_e'(wdata[0]);
        REG_WIDTH:     width     <= wdata[DIM_W-1:0];
        REG_HEIGHT:    height    <= wdata[DIM_W-1:0];
        REG_MASK_SIZE: mask_size <= wsize;
        REG_DEST:      dest      <= wdata[ADDR_W-1:0];
        default: begin
          for (int unsigned i = 0; i < MASK_MAX_P; i++)
            if (addr == REG_MASK_BASE + REG_AW'(i)) mask[i] <= wdata[MASK_MAX_P-1:0];
        end
      endcase
    end
  end

  always_comb begin
    rdata = '0;
    unique case (addr)
      REG_OP:        rdata = BUS_W'(op);
      REG_WIDTH:     rdata = BUS_W'(width);
      REG_HEIGHT:    rdata = BUS_W'(height);
      REG_MASK_SIZE: rdata = BUS_W'(mask_size);
      REG_DEST:      rdata = BUS_W'(dest);
      default: begin
        for (int unsigned i = 0; i < MASK_MAX_P; i++)
          if (addr == REG_MASK_BASE + REG_AW'(i)) rdata = BUS_W'(mask[i]);
      end
    endcase
  end

endmodule
