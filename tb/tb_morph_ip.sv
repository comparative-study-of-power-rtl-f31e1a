// End-to-end testbench of the morphology IP.
//
// The testbench plays processor and DMA on the Avalon slave and a memory
// with random wait states on the Avalon master. Two instances are tested,
// one with the packed 32-bit master (the default) and one with the 8-bit
// master, each at the default 23x23 mask capacity. For every run it
// programs the parameters, sends a random image in the column-wise strip
// order, waits for the interrupt and compares every result byte with a
// reference erosion/dilation computed here from the definition (masked
// minimum/maximum over the window). Bytes just outside the result area must
// stay untouched. Binary images coded 0/255 and 0/1 are run too. It also
// checks the clock gating (writes to a stopped
// domain are lost), the interrupt clear, register read-back and, with no
// memory wait states, that one pixel is accepted per clock.
//
// Each mechanism (slave stall, master stall, erosion, dilation, partial
// word write, gated-clock write loss, interrupt) is counted and must occur.
module tb_morph_ip;
  import morph_pkg::*;

  localparam int MEMSZ = 4096;

  logic clk = 1'b0, reset_n = 1'b1;
  initial #1 reset_n = 1'b0;   // a real falling edge for the asynchronous reset
  always #5 clk = ~clk;

  // shared bus signals, steered to the selected instance
  int                 sel = 0;
  logic [REG_AW-1:0]  avs_address = '0;
  logic               avs_write = 1'b0, avs_read = 1'b0;
  logic [BUS_W-1:0]   avs_writedata = '0;
  logic [BUS_W-1:0]   avs_readdata [2];
  logic               avs_waitrequest [2];
  logic [ADDR_W-1:0]  avm_address [2];
  logic               avm_write [2];
  logic [BUS_W-1:0]   avm_writedata [2];
  logic [3:0]         avm_byteenable [2];
  logic               avm_waitrequest = 1'b0;
  logic               irq [2];

  morph_ip u_dut32 (
    .clk, .reset_n, .avs_address, .avs_write(avs_write && sel == 0), .avs_writedata,
    .avs_read(avs_read && sel == 0), .avs_readdata(avs_readdata[0]),
    .avs_waitrequest(avs_waitrequest[0]), .avm_address(avm_address[0]), .avm_write(avm_write[0]),
    .avm_writedata(avm_writedata[0]), .avm_byteenable(avm_byteenable[0]),
    .avm_waitrequest(avm_waitrequest || sel != 0), .irq(irq[0])
  );

  morph_ip #(.PACK32(1'b0)) u_dut8 (
    .clk, .reset_n, .avs_address, .avs_write(avs_write && sel == 1), .avs_writedata,
    .avs_read(avs_read && sel == 1), .avs_readdata(avs_readdata[1]),
    .avs_waitrequest(avs_waitrequest[1]), .avm_address(avm_address[1]), .avm_write(avm_write[1]),
    .avm_writedata(avm_writedata[1]), .avm_byteenable(avm_byteenable[1]),
    .avm_waitrequest(avm_waitrequest || sel != 1), .irq(irq[1])
  );

  int checks = 0, failures = 0;
  int n_slave_stall = 0, n_master_stall = 0, n_erode = 0, n_dilate = 0;
  int n_binary = 0, n_partial = 0, n_gated_loss = 0, n_irq = 0, n_byte_xfer = 0, n_word_xfer = 0;
  int wait_pct = 0;

  logic [7:0] mem [MEMSZ];
  logic [7:0] img [64][64];
  logic [MASK_MAX-1:0] msk [MASK_MAX];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // memory model on the master side, random wait states
  always @(posedge clk) begin
    if (avm_write[sel] && avm_waitrequest) n_master_stall++;
    if (avm_write[sel] && !avm_waitrequest) begin
      if (avm_byteenable[sel] == 4'hF) n_word_xfer++;
      else if ($countones(avm_byteenable[sel]) == 1) n_byte_xfer++;
      if (sel == 0 && avm_byteenable[sel] != 4'hF) n_partial++;
      for (int b = 0; b < 4; b++)
        if (avm_byteenable[sel][b]) begin
          int unsigned a;
          a = {avm_address[sel][31:2], 2'b00} + b;
          if (a < MEMSZ) mem[a] <= avm_writedata[sel][8*b +: 8];
          else begin failures++; $display("FAIL: write outside memory %h", a); end
        end
    end
    avm_waitrequest <= ($urandom_range(99) < wait_pct);
  end

  always @(posedge clk) if (avs_write && avs_waitrequest[sel]) n_slave_stall++;

  // Bus tasks are entered and left at a falling clock edge; inputs change
  // there and waitrequest is sampled before the next rising edge.
  task automatic wr_stream(input logic [REG_AW-1:0] a, input logic [31:0] d);
    avs_address   = a;
    avs_writedata = d;
    avs_write     = 1'b1;
    #1;
    while (avs_waitrequest[sel]) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
  endtask

  task automatic wr(input logic [REG_AW-1:0] a, input logic [31:0] d);
    wr_stream(a, d);
    avs_write = 1'b0;
  endtask

  task automatic rd(input logic [REG_AW-1:0] a, output logic [31:0] d);
    avs_address = a;
    avs_read    = 1'b1;
    #1;
    d = avs_readdata[sel];
    @(negedge clk);
    avs_read = 1'b0;
  endtask

  function automatic logic [7:0] ref_pix(input int op, input int a, input int r, input int c);
    logic [7:0] v;
    v = (op == 0) ? 8'hFF : 8'h00;
    for (int i = 0; i < a; i++)
      for (int j = 0; j < a; j++)
        if (msk[i][j]) begin
          if (op == 0 && img[r+i][c+j] < v) v = img[r+i][c+j];
          if (op == 1 && img[r+i][c+j] > v) v = img[r+i][c+j];
        end
    return v;
  endfunction

  // One complete run on instance `s`.
  task automatic run(input int s, input int w, input int h, input int a, input int op,
                     input int dest, input int density, input int wpct, input bit check_rate,
                     input int bin = 0);
    logic [31:0] d;
    int nres, t0, t1, npix;
    sel = s;
    wait_pct = 0;
    // bin: 0 greyscale, 1 binary image coded 0/255, 2 binary image coded 0/1
    for (int r = 0; r < h; r++)
      for (int c = 0; c < w; c++)
        img[r][c] = (bin == 0) ? 8'($urandom) : ($urandom_range(3) != 0) ? ((bin == 1) ? 8'd255 : 8'd1) : 8'd0;
    for (int i = 0; i < MASK_MAX; i++) begin
      msk[i] = '0;
      for (int j = 0; j < MASK_MAX; j++) msk[i][j] = ($urandom_range(99) < density);
    end
    for (int i = 0; i < MEMSZ; i++) mem[i] = 8'hA5;
    wr(REG_CTRL, 32'h2);                         // memory clock only
    wr(REG_OP, op);
    wr(REG_WIDTH, w);
    wr(REG_HEIGHT, h);
    wr(REG_MASK_SIZE, a);
    wr(REG_DEST, dest);
    for (int i = 0; i < MASK_MAX; i++) wr(REG_MASK_BASE + 6'(i), 32'(msk[i]));
    rd(REG_MASK_SIZE, d); check(d == 32'(a), "mask size read-back");
    rd(REG_DEST, d);      check(d == 32'(dest), "dest read-back");
    // memory clock off, processing clock and interrupt on, start
    wr(REG_CTRL, 32'hD);
    rd(REG_CTRL, d); check(d[3:1] == 3'b110, "ctrl read-back");
    // a write while the memory clock is stopped must be lost
    wr(REG_WIDTH, w + 7);
    rd(REG_WIDTH, d);
    check(d == 32'(w), "write to gated parameter memory lost");
    if (d == 32'(w)) n_gated_loss++;
    rd(REG_STATUS, d); check(d[0] == 1'b1, "busy after start");
    wait_pct = wpct;
    npix = 0;
    t0 = $time / 10;
    for (int c = 0; c + a <= w; c++)
      for (int r = 0; r < h; r++)
        for (int j = 0; j < a; j++) begin
          wr_stream(REG_PIXEL, {24'h0, img[r][c+j]});
          npix++;
        end
    avs_write = 1'b0;
    t1 = $time / 10;
    if (check_rate) check(t1 - t0 == npix, $sformatf("one pixel per clock (%0d clocks, %0d pixels)", t1 - t0, npix));
    for (int k = 0; k < 20000 && !irq[s]; k++) @(negedge clk);
    check(irq[s] == 1'b1, "interrupt raised");
    if (irq[s]) n_irq++;
    rd(REG_STATUS, d); check(d[1:0] == 2'b10, "status done, not busy");
    wr(REG_STATUS, 32'h2);
    check(irq[s] == 1'b0, "interrupt cleared");
    nres = 0;
    for (int c = 0; c + a <= w; c++)
      for (int r = 0; r + a <= h; r++) begin
        logic [7:0] e;
        e = ref_pix(op, a, r, c);
        check(mem[dest + nres] == e, $sformatf("result c=%0d r=%0d got %0d exp %0d", c, r, mem[dest + nres], e));
        nres++;
      end
    check(mem[dest - 1] == 8'hA5 && mem[dest + nres] == 8'hA5, "no write outside the result area");
    if (op == 0) n_erode++; else n_dilate++;
    if (bin != 0) n_binary++;
    // a pixel written while the processing clock is stopped is discarded
    wr(REG_CTRL, 32'h0);
    wr(REG_PIXEL, 32'h12);
    rd(REG_STATUS, d);
    check(d[1:0] == 2'b00 && !avs_waitrequest[s], "idle with clocks stopped");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset_n = 1'b1;
    // packed 32-bit master
    run(0, 12, 10, 5, 0, 16'h101, 70, 0, 1'b1);
    run(0, 12, 10, 5, 1, 16'h200, 70, 40, 1'b0);
    run(0, 9, 11, 3, 1, 16'h300, 100, 60, 1'b0);
    run(0, 7, 6, 1, 0, 16'h402, 100, 30, 1'b0);
    run(0, 30, 27, 23, 0, 16'h500, 60, 50, 1'b0);
    // 8-bit master
    run(1, 12, 10, 5, 1, 16'h600, 70, 50, 1'b0);
    run(1, 8, 9, 3, 0, 16'h703, 80, 70, 1'b0);
    run(1, 25, 24, 23, 1, 16'h800, 40, 20, 1'b0);
    // binary images in both codings, full square mask
    run(0, 26, 25, 23, 0, 16'h900, 100, 20, 1'b0, 1);
    run(0, 26, 25, 23, 0, 16'hA00, 100, 20, 1'b0, 2);
    run(0, 14, 12, 5, 1, 16'hB01, 100, 20, 1'b0, 2);
    // every mechanism must have happened
    check(n_slave_stall > 0, "slave stall seen");
    check(n_master_stall > 0, "master stall seen");
    check(n_erode > 0 && n_dilate > 0, "both operations run");
    check(n_partial > 0, "partial 32-bit word written");
    check(n_word_xfer > 0, "full 32-bit transfers");
    check(n_byte_xfer > 0, "single-byte transfers");
    check(n_gated_loss > 0, "gated-clock write loss");
    check(n_irq > 0, "interrupts");
    check(n_binary > 0, "binary images");
    $display("mechanisms: slave_stall=%0d master_stall=%0d erode=%0d dilate=%0d partial_word=%0d word_xfer=%0d byte_xfer=%0d gated_loss=%0d irq=%0d binary=%0d",
             n_slave_stall, n_master_stall, n_erode, n_dilate, n_partial, n_word_xfer, n_byte_xfer, n_gated_loss, n_irq, n_binary);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
