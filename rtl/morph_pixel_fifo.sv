// Pixel FIFO of the morphology IP: turns the serial pixel stream written to
// the slave into lines of a pixels for the kernel (a = mask size).
//
// Pixels arrive one per accepted slave write. The k-th pixel of a line is
// stored in slot k of a line register; when the a-th pixel arrives the whole
// line (pixel k in element k, elements a.. zero) is presented on `line` with
// `line_valid` high for one cycle, one clock after that last pixel. The next
// pixel starts a new line, so a host that sends each line of a column pass
// as a consecutive pixels needs no other framing. `clear` (start of a run)
// drops a partly received line; a pixel arriving with it starts the new one.
//
// Serial-in, parallel-out behaviour follows the design; the write-indexed
// register (instead of a shifting chain) is this design's choice.
module morph_pixel_fifo
  import morph_pkg::*;
#(
  parameter int unsigned MASK_MAX_P = MASK_MAX
) (
  input  logic                       clk,
  input  logic                       reset_n,
  input  logic                       clear,
  input  dim_t                       mask_size,
  input  logic                       pix_valid,
  input  pix_t                       pix,
  output logic                       line_valid,
  output pix_t [MASK_MAX_P-1:0]      line
);

  localparam int unsigned CW = $clog2(MASK_MAX_P + 1);

  pix_t [MASK_MAX_P-1:0] buf_q;
  logic [CW-1:0]         cnt, cur;
  logic                  last_pix;

  // A pixel that arrives together with `clear` is the first of a new line.
  assign cur      = clear ? '0 : cnt;
  assign last_pix = pix_valid && (dim_t'(cur) + dim_t'(1) >= mask_size);

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      buf_q      <= '0;
      cnt        <= '0;
      line_valid <= 1'b0;
      line       <= '0;
    end else begin
      line_valid <= 1'b0;
      if (pix_valid) begin
        if (last_pix) begin
          cnt        <= '0;
          line_valid <= 1'b1;
          for (int unsigned k = 0; k < MASK_MAX_P; k++) begin
            if (k == 32'(cur))                  line[k] <= pix;
            else if (dim_t'(k) < mask_size)  line[k] <= buf_q[k];
            else                             line[k] <= '0;
          end
        end else begin
          buf_q[cur] <= pix;
          cnt        <= cur + 1'b1;
        end
      end else if (clear) begin
        cnt <= '0;
      end
    end
  end

endmodule
