// Testbench of the kernel: feeds column passes of random lines for several
// mask sizes, masks and both operations, keeps its own copy of the lines and
// checks every result against a masked minimum/maximum computed here, with a
// latency of exactly one clock. Includes an all-zero mask (neutral result),
// a full mask and gaps between lines.
module tb_morph_kernel;
  import morph_pkg::*;
  logic clk = 1'b0, reset_n = 1'b1, line_valid = 1'b0, window_full = 1'b0;
  morph_op_e op = OP_ERODE;
  dim_t mask_size = 3;
  logic [MASK_MAX-1:0][MASK_MAX-1:0] mask = '0;
  pix_t [MASK_MAX-1:0] line = '0;
  logic res_valid;
  pix_t res;
  pix_t [MASK_MAX-1:0] hist [$];
  int checks = 0, failures = 0, n_res = 0;

  always #5 clk = ~clk;

  morph_kernel u_dut (.clk, .reset_n, .op, .mask_size, .mask, .line_valid, .line, .window_full,
                      .res_valid, .res);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // window rows: hist[0] oldest of the last a lines
  function automatic pix_t ref_res(input int a);
    pix_t v;
    int base;
    v = (op == OP_ERODE) ? 8'hFF : 8'h00;
    base = hist.size() - a;
    for (int i = 0; i < a; i++)
      for (int j = 0; j < a; j++)
        if (mask[i][j]) begin
          if (op == OP_ERODE && hist[base+i][j] < v) v = hist[base+i][j];
          if (op == OP_DILATE && hist[base+i][j] > v) v = hist[base+i][j];
        end
    return v;
  endfunction

  task automatic pass(input int a, input int rows, input int density, input morph_op_e o);
    pix_t e;
    mask_size = dim_t'(a);
    op = o;
    for (int i = 0; i < MASK_MAX; i++)
      for (int j = 0; j < MASK_MAX; j++) mask[i][j] = ($urandom_range(99) < density);
    hist.delete();
    for (int r = 0; r < rows; r++) begin
      line = '0;
      for (int j = 0; j < a; j++) line[j] = 8'($urandom);
      hist.push_back(line);
      line_valid  = 1'b1;
      window_full = (r + 1 >= a);
      e = (r + 1 >= a) ? ref_res(a) : 8'h00;
      @(negedge clk);
      line_valid = 1'b0;
      check(res_valid == (r + 1 >= a), "res_valid one clock after a full window");
      if (r + 1 >= a) begin
        check(res == e, $sformatf("a=%0d op=%0d row %0d got %0d exp %0d", a, o, r, res, e));
        n_res++;
      end
      if ($urandom_range(3) == 0) begin
        @(negedge clk);
        check(!res_valid, "no result without a line");
      end
    end
  endtask

  initial begin
    #1 reset_n = 1'b0;
    #3 reset_n = 1'b1;
    @(negedge clk);
    pass(1, 6, 100, OP_ERODE);
    pass(3, 12, 60, OP_DILATE);
    pass(5, 14, 50, OP_ERODE);
    pass(5, 10, 0, OP_ERODE);
    pass(5, 10, 0, OP_DILATE);
    pass(7, 15, 100, OP_DILATE);
    pass(MASK_MAX, 40, 50, OP_ERODE);
    pass(MASK_MAX, 30, 20, OP_DILATE);
    pass(2, 8, 70, OP_ERODE);
    check(n_res > 0, "results produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
