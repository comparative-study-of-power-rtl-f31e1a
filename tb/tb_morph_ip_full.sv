// Full-size testbench of the morphology IP at its default parameters: one
// erosion of a 202x202 8-bit greyscale image with a full 23x23 square mask,
// the configuration the IP was built for, followed by a dilation of the
// same image.
//
// The testbench configures the IP through the slave, streams the image in
// the column-wise strip order (180 column passes of 202 lines of 23 pixels,
// 836,280 pixel writes per run) with a memory without wait states, waits
// for the interrupt and compares all 180x180 results with a reference
// computed here. It checks that the stream is accepted at one pixel per
// clock and reports the clock count of each run.
module tb_morph_ip_full;
  import morph_pkg::*;

  localparam int W = 202, H = 202, A = 23;
  localparam int DEST = 32'h100;
  localparam int MEMSZ = 40000;

  logic clk = 1'b0, reset_n = 1'b1;
  initial #1 reset_n = 1'b0;
  always #5 clk = ~clk;

  logic [REG_AW-1:0] avs_address = '0;
  logic              avs_write = 1'b0, avs_read = 1'b0;
  logic [31:0]       avs_writedata = '0, avs_readdata;
  logic              avs_waitrequest;
  logic [31:0]       avm_address, avm_writedata;
  logic              avm_write;
  logic [3:0]        avm_byteenable;
  logic              irq;

  morph_ip u_dut (
    .clk, .reset_n, .avs_address, .avs_write, .avs_writedata, .avs_read, .avs_readdata,
    .avs_waitrequest, .avm_address, .avm_write, .avm_writedata, .avm_byteenable,
    .avm_waitrequest(1'b0), .irq
  );

  int checks = 0, failures = 0, n_xfer = 0;
  logic [7:0] mem [MEMSZ];
  logic [7:0] img [H][W];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk)
    if (avm_write) begin
      n_xfer++;
      for (int b = 0; b < 4; b++)
        if (avm_byteenable[b]) mem[{avm_address[31:2], 2'b00} + b] <= avm_writedata[8*b +: 8];
    end

  task automatic wr_stream(input logic [REG_AW-1:0] a, input logic [31:0] d);
    avs_address = a; avs_writedata = d; avs_write = 1'b1;
    #1;
    while (avs_waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
  endtask

  task automatic wr(input logic [REG_AW-1:0] a, input logic [31:0] d);
    wr_stream(a, d);
    avs_write = 1'b0;
  endtask

  task automatic run(input morph_op_e op);
    longint t0, t1;
    int npix = 0, nres = 0;
    n_xfer = 0;
    for (int i = 0; i < MEMSZ; i++) mem[i] = 8'h00;
    wr(REG_CTRL, 32'h2);
    wr(REG_OP, 32'(op));
    wr(REG_WIDTH, W);
    wr(REG_HEIGHT, H);
    wr(REG_MASK_SIZE, A);
    wr(REG_DEST, DEST);
    for (int i = 0; i < A; i++) wr(REG_MASK_BASE + 6'(i), (32'd1 << A) - 1);
    wr(REG_CTRL, 32'hD);
    t0 = $time;
    for (int c = 0; c + A <= W; c++)
      for (int r = 0; r < H; r++)
        for (int j = 0; j < A; j++) begin
          wr_stream(REG_PIXEL, {24'h0, img[r][c+j]});
          npix++;
        end
    avs_write = 1'b0;
    t1 = $time;
    for (int k = 0; k < 1000 && !irq; k++) @(negedge clk);
    check(irq, "interrupt after the last result");
    check(int'((t1 - t0) / 10) == npix, $sformatf("one pixel per clock: %0d clocks for %0d pixels",
                                                   (t1 - t0) / 10, npix));
    $display("op=%0d: %0d pixel writes, %0d clocks to stream, %0d master transfers",
             op, npix, (t1 - t0) / 10, n_xfer);
    for (int c = 0; c + A <= W; c++)
      for (int r = 0; r + A <= H; r++) begin
        logic [7:0] e;
        e = (op == OP_ERODE) ? 8'hFF : 8'h00;
        for (int i = 0; i < A; i++)
          for (int j = 0; j < A; j++)
            if ((op == OP_ERODE) ? (img[r+i][c+j] < e) : (img[r+i][c+j] > e)) e = img[r+i][c+j];
        check(mem[DEST + nres] == e, $sformatf("op=%0d c=%0d r=%0d got %0d exp %0d", op, c, r,
                                               mem[DEST + nres], e));
        nres++;
      end
    check(nres == 180 * 180, "result count");
    check(n_xfer == 180 * 180 / 4, "32-bit transfers");
    wr(REG_STATUS, 32'h2);
  endtask

  initial begin
    // smooth random image: a gradient plus noise, so the results vary
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) img[r][c] = 8'((r + c) / 2 + $urandom_range(0, 60));
    repeat (3) @(negedge clk);
    reset_n = 1'b1;
    @(negedge clk);
    run(OP_ERODE);
    run(OP_DILATE);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
