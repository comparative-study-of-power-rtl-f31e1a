// Kernel of the morphology IP: masked minimum (erosion) or maximum
// (dilation) over an a x a window that moves down one image column.
//
// The kernel receives one line of a pixels per `line_valid` (element j is
// the j-th pixel of the line, left to right). It keeps the previous
// MASK_MAX-1 lines of the current column pass in a shift register; together
// with the incoming line they form the window, the incoming line being its
// bottom row. Mask row i (top = 0) is applied to the line received a-1-i
// lines earlier, and mask column j to line element j. Only positions whose
// mask bit is set take part in the reduction.
//
// Both operations share one unpipelined comparator tree: every pixel is
// complemented for erosion, a masked-out position contributes 0, each window
// row is reduced by a tree of 2-input maximum units, the row results by a
// second tree, and the result is complemented back for erosion
// (min(x) = ~max(~x)). An all-zero mask therefore gives 255 for erosion and 0
// for dilation.
//
// Timing: when `line_valid` and `window_full` are high together, `res` is
// valid, with `res_valid` high, on the next clock (latency 1). `window_full`
// comes from the scan control and says that at least a lines of this column
// pass, this one included, have arrived.
//
// The masked min/max function, the 23-pixel line input and the comparator
// tree without pipeline registers follow the design; the shared tree with
// complemented inputs is this design's choice.
module morph_kernel
  import morph_pkg::*;
#(
  parameter int unsigned MASK_MAX_P = MASK_MAX
) (
  input  logic                                  clk,
  input  logic                                  reset_n,
  input  morph_op_e                             op,
  input  dim_t                                  mask_size,
  input  logic [MASK_MAX_P-1:0][MASK_MAX_P-1:0] mask,       // [row][column]
  input  logic                                  line_valid,
  input  pix_t [MASK_MAX_P-1:0]                 line,
  input  logic                                  window_full,
  output logic                                  res_valid,
  output pix_t                                  res
);

  localparam int unsigned TW = 1 << $clog2(MASK_MAX_P);   // tree width

  // Balanced maximum tree over TW inputs, reduced in place level by level.
  function automatic pix_t max_tree(input pix_t [TW-1:0] v);
    pix_t [TW-1:0] t;
    t = v;
    for (int unsigned w = TW / 2; w >= 1; w = w / 2)
      for (int unsigned i = 0; i < w; i++)
        t[i] = (t[2*i] > t[2*i+1]) ? t[2*i] : t[2*i+1];
    return t[0];
  endfunction

  // hist[k] = line received k+1 lines before the current one
  pix_t [MASK_MAX_P-2:0][MASK_MAX_P-1:0] hist;

  pix_t [MASK_MAX_P-1:0][MASK_MAX_P-1:0] win;     // [slot][column], slot 0 = newest
  logic [MASK_MAX_P-1:0][MASK_MAX_P-1:0] wmask;   // mask aligned to slots
  pix_t [TW-1:0]                         row_max;
  pix_t [TW-1:0]                         terms;
  pix_t                                  tree_out;

  always_comb begin
    win[0] = line;
    for (int unsigned k = 1; k < MASK_MAX_P; k++) win[k] = hist[k-1];

    // Slot k holds the window row a-1-k; slots at or beyond a are unused,
    // and so are mask columns at or beyond a.
    for (int unsigned k = 0; k < MASK_MAX_P; k++) begin
      wmask[k] = '0;
      for (int unsigned i = 0; i < MASK_MAX_P; i++)
        if (dim_t'(i + k + 1) == mask_size) wmask[k] = mask[i];
    end

    row_max = '0;
    for (int unsigned k = 0; k < MASK_MAX_P; k++) begin
      terms = '0;
      for (int unsigned j = 0; j < MASK_MAX_P; j++)
        if (wmask[k][j] && dim_t'(j) < mask_size) terms[j] = (op == OP_ERODE) ? ~win[k][j] : win[k][j];
      row_max[k] = max_tree(terms);
    end
    tree_out = max_tree(row_max);
  end

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      hist      <= '0;
      res_valid <= 1'b0;
      res       <= '0;
    end else begin
      res_valid <= line_valid && window_full;
      if (line_valid) begin
        hist[0] <= line;
        for (int unsigned k = 1; k < MASK_MAX_P - 1; k++) hist[k] <= hist[k-1];
        if (window_full) res <= (op == OP_ERODE) ? ~tree_out : tree_out;
      end
    end
  end

endmodule
