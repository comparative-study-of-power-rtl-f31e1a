// Testbench of the pixel FIFO: streams random pixels (with random gaps) for
// several mask sizes and checks that each line of a pixels comes out once,
// one clock after its last pixel, with the pixels in arrival order and the
// unused elements zero; also checks that clear drops a partial line.
module tb_morph_pixel_fifo;
  import morph_pkg::*;
  logic clk = 1'b0, reset_n = 1'b1, clear = 1'b0, pix_valid = 1'b0;
  dim_t mask_size = 5;
  pix_t pix = '0;
  logic line_valid;
  pix_t [MASK_MAX-1:0] line, exp_line;
  int checks = 0, failures = 0, lines_seen = 0;

  always #5 clk = ~clk;

  morph_pixel_fifo u_dut (.clk, .reset_n, .clear, .mask_size, .pix_valid, .pix, .line_valid, .line);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (line_valid) lines_seen++;

  initial begin
    #1 reset_n = 1'b0;
    #3 reset_n = 1'b1;
    @(negedge clk);
    for (int t = 0; t < 4; t++) begin
      mask_size = dim_t'(t == 0 ? 1 : t == 1 ? 3 : t == 2 ? 5 : MASK_MAX);
      for (int l = 0; l < 6; l++) begin
        exp_line = '0;
        for (int k = 0; k < int'(mask_size); k++) begin
          exp_line[k] = 8'($urandom);
          pix = exp_line[k]; pix_valid = 1'b1;
          @(negedge clk);
          pix_valid = 1'b0;
          if (k + 1 < int'(mask_size)) begin
            check(!line_valid, "no line before the last pixel");
            repeat ($urandom_range(0, 2)) @(negedge clk);
          end
        end
        check(line_valid, "line valid one clock after last pixel");
        check(line == exp_line, $sformatf("line content a=%0d", mask_size));
        @(negedge clk);
        check(!line_valid, "line valid lasts one clock");
      end
    end
    check(lines_seen == 24, $sformatf("line count %0d", lines_seen));
    // clear drops a partial line
    mask_size = 4;
    pix = 8'h11; pix_valid = 1'b1; @(negedge clk);
    pix_valid = 1'b0; clear = 1'b1; @(negedge clk); clear = 1'b0;
    exp_line = '0;
    for (int k = 0; k < 4; k++) begin
      exp_line[k] = 8'(k + 1); pix = 8'(k + 1); pix_valid = 1'b1; @(negedge clk);
    end
    pix_valid = 1'b0;
    check(line_valid && line == exp_line, "clear restarts the line");
    // a pixel arriving together with clear is the first of the new line
    mask_size = 2;
    pix = 8'h21; pix_valid = 1'b1; @(negedge clk);
    pix = 8'h22; clear = 1'b1; @(negedge clk); clear = 1'b0;
    pix = 8'h23; @(negedge clk); pix_valid = 1'b0;
    exp_line = '0; exp_line[0] = 8'h22; exp_line[1] = 8'h23;
    check(line_valid && line == exp_line, "pixel together with clear kept");
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
