// Glitch-free clock gate for the two switchable clock domains of the
// morphology IP (parameter memory; FIFO, kernel and master logic).
//
// The enable is captured by a latch that is transparent while clk is low, and
// the gated clock is clk AND the latched enable. An enable change therefore
// only takes effect from the next rising edge and can never shorten a high
// phase. Interface: clk, en (synchronous to clk), gclk. Timing: gclk follows
// clk from the first rising edge after en was high during the low phase.
//
// The IP gates its clocks in the HDL and lets software switch them; the
// latch-and-AND structure is this design's choice. The latch is intended: it
// is the standard integrated-clock-gate structure and the reason a lint tool
// reports a latch here. On an FPGA it may be replaced by the vendor's clock
// control primitive.
module morph_clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule
