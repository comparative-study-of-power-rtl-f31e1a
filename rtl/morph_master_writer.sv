// Result writer of the morphology IP: an Avalon-MM write master that stores
// the kernel results in system memory.
//
// Result n of a run goes to byte address dest + n (results are produced
// column pass by column pass, top to bottom). With PACK32 = 0 every result is
// one bus transfer with a single byte enable, the byte replicated on all
// four lanes. With PACK32 = 1 a packing buffer collects the results that
// share a 32-bit word and issues one transfer per word; a word is sent when
// its byte lane 3 is filled or the last result of the run arrives, so a
// partial first or last word carries partial byte enables. Transfers wait
// in a queue of QDEPTH entries and are issued in order; a transfer completes
// in a cycle where avm_write is high and avm_waitrequest low.
//
// `can_accept` is high while the queue has room for three more transfers:
// that covers the results still in the FIFO-to-kernel pipeline plus one new
// pixel, so the slave may accept a pixel whenever it is high. `done` pulses
// for one cycle after the transfer holding the last result completes.
//
// The single-pixel and the packed 32-bit master, with an extra buffer for
// the latter, follow the design; the queue depth, the address order and the
// flow-control rule are this design's choices.
module morph_master_writer
  import morph_pkg::*;
#(
  parameter bit          PACK32 = 1'b1,
  parameter int unsigned QDEPTH = 4
) (
  input  logic               clk,
  input  logic               reset_n,
  input  logic               clear,
  input  logic [ADDR_W-1:0]  dest,
  input  logic               res_valid,
  input  pix_t               res,
  input  logic               res_last,
  output logic               can_accept,
  output logic               done,
  output logic [ADDR_W-1:0]  avm_address,
  output logic               avm_write,
  output logic [BUS_W-1:0]   avm_writedata,
  output logic [BUS_W/8-1:0] avm_byteenable,
  input  logic               avm_waitrequest
);

  localparam int unsigned PW = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;

  mwr_t [QDEPTH-1:0]  q;
  logic [PW-1:0]      rd_ptr, wr_ptr;
  logic [PW:0]        count;
  logic [ADDR_W-1:0]  n;            // results of this run so far
  logic [ADDR_W-1:0]  addr;         // byte address of the incoming result
  logic [1:0]         lane;
  logic [BUS_W-1:0]   pk_data;      // packing buffer
  logic [BUS_W/8-1:0] pk_be;
  logic               last_queued;
  mwr_t               entry;
  logic               push, pop;

  assign addr = dest + n;
  assign lane = addr[1:0];

  always_comb begin
    entry = '0;
    push  = 1'b0;
    if (res_valid) begin
      if (PACK32) begin
        entry.addr = {addr[ADDR_W-1:2], 2'b00};
        entry.data = pk_data;
        entry.data[8*lane +: 8] = res;
        entry.be   = pk_be | (4'b0001 << lane);
        push       = (lane == 2'd3) || res_last;
      end else begin
        entry.addr = addr;
        entry.data = {4{res}};
        entry.be   = 4'b0001 << lane;
        push       = 1'b1;
      end
    end
  end

  assign pop            = avm_write && !avm_waitrequest;
  assign avm_write      = (count != '0);
  assign avm_address    = q[rd_ptr].addr;
  assign avm_writedata  = q[rd_ptr].data;
  assign avm_byteenable = q[rd_ptr].be;
  assign can_accept     = (count + 3 <= (PW+1)'(QDEPTH));

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(QDEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      q           <= '0;
      rd_ptr      <= '0;
      wr_ptr      <= '0;
      count       <= '0;
      n           <= '0;
      pk_data     <= '0;
      pk_be       <= '0;
      last_queued <= 1'b0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        rd_ptr      <= '0;
        wr_ptr      <= '0;
        count       <= '0;
        n           <= '0;
        pk_data     <= '0;
        pk_be       <= '0;
        last_queued <= 1'b0;
      end else begin
        if (res_valid) begin
          n <= n + 1'b1;
          if (PACK32) begin
            if (push) begin
              pk_data <= '0;
              pk_be   <= '0;
            end else begin
              pk_data <= entry.data;
              pk_be   <= entry.be;
            end
          end
          if (res_last) last_queued <= 1'b1;
        end
        if (push) begin
          q[wr_ptr] <= entry;
          wr_ptr    <= inc(wr_ptr);
        end
        if (pop) rd_ptr <= inc(rd_ptr);
        count <= count + (PW+1)'(push) - (PW+1)'(pop);
        if (last_queued && pop && count == (PW+1)'(1) && !push) begin
          done        <= 1'b1;
          last_queued <= 1'b0;
        end
      end
    end
  end

  // The writer is never offered a result it has no room for.
  a_no_overflow : assert property (@(posedge clk) disable iff (!reset_n)
    push && !pop |-> count < (PW+1)'(QDEPTH));
  // Avalon: a pending write holds its address and data while stalled.
  a_hold : assert property (@(posedge clk) disable iff (!reset_n || clear)
    avm_write && avm_waitrequest |=> avm_write && $stable(avm_address) && $stable(avm_writedata));

endmodule
