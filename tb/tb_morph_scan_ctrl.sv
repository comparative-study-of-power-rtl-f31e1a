// Testbench of the scan control: drives the lines of whole images for
// several sizes and checks, line by line, the row and column counters, the
// window-full flag, the last-line flag (exactly once, on the final line)
// and the result count (w-a+1)*(l-a+1).
module tb_morph_scan_ctrl;
  import morph_pkg::*;
  logic clk = 1'b0, reset_n = 1'b1, clear = 1'b0, line_valid = 1'b0;
  dim_t width, height, mask_size, row, col;
  logic window_full, last_line;
  logic [31:0] result_count;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  morph_scan_ctrl u_dut (.clk, .reset_n, .clear, .width, .height, .mask_size, .line_valid,
                         .window_full, .last_line, .result_count, .row, .col);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic image(input int w, input int h, input int a);
    int n_last = 0, n_full = 0;
    width = dim_t'(w); height = dim_t'(h); mask_size = dim_t'(a);
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    check(result_count == 32'((w - a + 1) * (h - a + 1)), "result count");
    for (int c = 0; c + a <= w; c++)
      for (int r = 0; r < h; r++) begin
        line_valid = 1'b1;
        #1;
        check(row == dim_t'(r) && col == dim_t'(c), $sformatf("position c=%0d r=%0d", c, r));
        check(window_full == (r + 1 >= a), "window full");
        check(last_line == (c + a == w && r + 1 == h), "last line");
        if (last_line) n_last++;
        if (window_full) n_full++;
        @(negedge clk);
        line_valid = 1'b0;
        if ($urandom_range(4) == 0) @(negedge clk);
      end
    check(n_last == 1, "exactly one last line");
    check(n_full == (w - a + 1) * (h - a + 1), "window-full count equals result count");
  endtask

  initial begin
    #1 reset_n = 1'b0;
    #3 reset_n = 1'b1;
    @(negedge clk);
    image(8, 6, 3);
    image(5, 5, 5);
    image(7, 4, 1);
    image(30, 25, 23);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
