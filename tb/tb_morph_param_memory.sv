// Testbench of the parameter memory: writes every parameter word and every
// mask row with random values and reads them back, checks the mask-size
// clamp, that writes only land while the memory clock runs, and that
// unrelated addresses do not disturb stored values.
module tb_morph_param_memory;
  import morph_pkg::*;
  logic clk = 1'b0, run = 1'b1, reset_n = 1'b1, wr_en = 1'b0;
  logic clk_mem;
  logic [REG_AW-1:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  morph_op_e op;
  dim_t width, height, mask_size;
  logic [31:0] dest;
  logic [MASK_MAX-1:0][MASK_MAX-1:0] mask;
  logic [MASK_MAX-1:0] exp_mask [MASK_MAX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  assign clk_mem = clk & run;

  morph_param_memory u_dut (.clk_mem, .reset_n, .wr_en, .addr, .wdata, .rdata, .op, .width,
                            .height, .mask_size, .dest, .mask);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [REG_AW-1:0] a, input logic [31:0] d);
    addr = a; wdata = d; wr_en = 1'b1;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic rd(input logic [REG_AW-1:0] a, output logic [31:0] d);
    addr = a; #1; d = rdata;
  endtask

  initial begin
    logic [31:0] d, w, h, dst;
    #1 reset_n = 1'b0;
    #3 reset_n = 1'b1;
    @(negedge clk);
    check(mask_size == 1 && mask == '0 && op == OP_ERODE, "reset values");
    w = $urandom_range(1, 1000); h = $urandom_range(1, 1000); dst = $urandom;
    wr(REG_OP, 1); wr(REG_WIDTH, w); wr(REG_HEIGHT, h); wr(REG_DEST, dst); wr(REG_MASK_SIZE, 9);
    for (int i = 0; i < MASK_MAX; i++) begin
      exp_mask[i] = MASK_MAX'($urandom);
      wr(REG_MASK_BASE + 6'(i), {9'h1FF, exp_mask[i]});
    end
    wr(REG_PIXEL, 32'hFFFF_FFFF);     // not a parameter word
    check(op == OP_DILATE && width == dim_t'(w) && height == dim_t'(h) && dest == dst && mask_size == 9,
          "parameter outputs");
    rd(REG_WIDTH, d);  check(d == w, "width read");
    rd(REG_HEIGHT, d); check(d == h, "height read");
    rd(REG_DEST, d);   check(d == dst, "dest read");
    rd(REG_OP, d);     check(d == 1, "op read");
    for (int i = 0; i < MASK_MAX; i++) begin
      check(mask[i] == exp_mask[i], $sformatf("mask row %0d", i));
      rd(REG_MASK_BASE + 6'(i), d);
      check(d == 32'(exp_mask[i]), $sformatf("mask row %0d read", i));
    end
    @(negedge clk);
    wr(REG_MASK_SIZE, 40); check(mask_size == MASK_MAX, "clamp high");
    wr(REG_MASK_SIZE, 0);  check(mask_size == 1, "clamp low");
    run = 1'b0;
    wr(REG_WIDTH, w + 1);
    check(width == dim_t'(w), "write lost while clock stopped");
    run = 1'b1;
    wr(REG_WIDTH, w + 1);
    check(width == dim_t'(w + 1), "write lands when clock runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
