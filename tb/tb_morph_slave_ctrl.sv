// Testbench of the slave control: checks the CTRL bits and their read-back,
// the one-cycle start pulse, BUSY/DONE, the interrupt and its clear, the
// parameter-write decode and read pass-through, pixel writes becoming
// pix_valid, the stall while can_accept is low and the silent discard of
// pixels while the processing clock is off.
module tb_morph_slave_ctrl;
  import morph_pkg::*;
  logic clk = 1'b0, reset_n = 1'b1;
  logic [REG_AW-1:0] avs_address = '0;
  logic avs_write = 1'b0, avs_read = 1'b0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic avs_waitrequest;
  logic [31:0] param_rdata = 32'hCAFE_0042;
  logic can_accept = 1'b1, done_in = 1'b0;
  logic param_we, pix_valid, start, mem_clk_en, proc_clk_en, busy, irq;
  pix_t pix;
  int checks = 0, failures = 0, n_start = 0, n_pix = 0, n_pwe = 0;

  always #5 clk = ~clk;

  morph_slave_ctrl u_dut (.*);

  always @(posedge clk) begin
    if (start) n_start++;
    if (pix_valid) n_pix++;
    if (param_we) n_pwe++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [REG_AW-1:0] a, input logic [31:0] d);
    avs_address = a; avs_writedata = d; avs_write = 1'b1;
    #1;
    while (avs_waitrequest) begin @(negedge clk); #1; end
    @(negedge clk);
    avs_write = 1'b0;
  endtask

  task automatic rd(input logic [REG_AW-1:0] a, output logic [31:0] d);
    avs_address = a; avs_read = 1'b1; #1; d = avs_readdata; @(negedge clk); avs_read = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    int stall;
    #1 reset_n = 1'b0;
    #3 reset_n = 1'b1;
    @(negedge clk);
    check(!mem_clk_en && !proc_clk_en && !irq && !busy, "reset state");
    wr(REG_CTRL, 32'hA);  // mem clock + irq enable, no start
    check(mem_clk_en && !proc_clk_en && n_start == 0, "ctrl bits");
    rd(REG_CTRL, d); check(d == 32'hA, "ctrl read-back");
    wr(REG_WIDTH, 32'd99);
    wr(REG_MASK_BASE + 6'd3, 32'h7);
    check(n_pwe == 2, "parameter writes decoded");
    rd(REG_HEIGHT, d); check(d == 32'hCAFE_0042, "parameter read pass-through");
    // pixel while processing clock off: discarded, no stall
    wr(REG_PIXEL, 32'h55);
    check(n_pix == 0, "pixel discarded with clock off");
    wr(REG_CTRL, 32'hF);  // everything on, start
    check(start && busy, "start pulse and busy");
    @(negedge clk);
    check(n_start == 1 && !start, "start lasts one clock");
    rd(REG_CTRL, d); check(d == 32'hE, "start bit reads 0");
    wr(REG_PIXEL, 32'h1AB);
    check(n_pix == 1 && pix == 8'hAB, "pixel accepted");
    // stall while the result side is full
    can_accept = 1'b0;
    fork
      wr(REG_PIXEL, 32'h33);
      begin
        stall = 0;
        repeat (4) begin #1; if (avs_waitrequest) stall++; @(negedge clk); end
        can_accept = 1'b1;
      end
    join
    check(stall == 4 && n_pix == 2, "pixel stalled, then accepted once");
    // done and interrupt
    @(negedge clk); done_in = 1'b1; @(negedge clk); done_in = 1'b0;
    check(irq && !busy, "interrupt after done");
    rd(REG_STATUS, d); check(d[1:0] == 2'b10, "status done");
    wr(REG_STATUS, 32'h2);
    check(!irq, "interrupt cleared");
    // interrupt masked
    @(negedge clk); done_in = 1'b1; @(negedge clk); done_in = 1'b0;
    wr(REG_CTRL, 32'h6);
    check(!irq, "interrupt disabled");
    rd(REG_STATUS, d); check(d[1] == 1'b1, "done still visible");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
