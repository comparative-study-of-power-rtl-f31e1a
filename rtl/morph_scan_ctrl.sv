// Scan control of the morphology IP: follows the column-wise quasi raster
// order in which the host sends the image.
//
// For each horizontal mask position c = 0 .. w-a the host sends the l image
// rows of the strip c .. c+a-1 from top to bottom, one line of a pixels per
// row; the mask thus moves down the column, and after the last row the strip
// moves one pixel right. This block counts lines (`row`) within the current
// column pass and the passes (`col`). For the line being delivered it says
// whether the kernel window is full (row >= a-1) and whether this line
// produces the last result of the image (last row of the last pass). It also
// gives the number of results of the run, (w-a+1)*(l-a+1).
//
// The scan order follows the design; computing only window positions that
// lie fully inside the image (no border padding) is this design's choice.
// Timing: outputs are combinational on the registered counters and describe
// the line presented with `line_valid` in the same cycle; counters advance
// at the clock edge.
module morph_scan_ctrl
  import morph_pkg::*;
(
  input  logic        clk,
  input  logic        reset_n,
  input  logic        clear,
  input  dim_t        width,
  input  dim_t        height,
  input  dim_t        mask_size,
  input  logic        line_valid,
  output logic        window_full,
  output logic        last_line,
  output logic [31:0] result_count,
  output dim_t        row,
  output dim_t        col
);

  dim_t cols, rows_out;

  assign cols         = width  - mask_size + dim_t'(1);
  assign rows_out     = height - mask_size + dim_t'(1);
  assign result_count = 32'(cols) * 32'(rows_out);
  assign window_full  = (row + dim_t'(1) >= mask_size);
  assign last_line    = window_full && (row + dim_t'(1) >= height) &&
                        (col + dim_t'(1) >= cols);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      row <= '0;
      col <= '0;
    end else if (clear) begin
      row <= '0;
      col <= '0;
    end else if (line_valid) begin
      if (row + dim_t'(1) >= height) begin
        row <= '0;
        col <= col + dim_t'(1);
      end else begin
        row <= row + dim_t'(1);
      end
    end
  end

endmodule
