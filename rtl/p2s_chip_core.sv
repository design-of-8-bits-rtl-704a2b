// p2s_chip_core: top of the 8-bit parallel-to-serial converter.
//
// In the OFDM baseband transmitter this stage sits between the IFFT, which
// delivers a parallel word, and the cyclic-prefix stage, which takes the
// serial stream. On the chip it is the logic inside the pad ring: one input
// pad per data bit, one for clk, one for load and one output pad for dout.
// The pads are library cells and are not modelled; their core-side signals
// are this module's ports. An active-low asynchronous reset is added so
// that the serial output is defined (low) from power-up.
//
// Interface and timing are those of serial_converter: a word on d is taken
// on a rising edge with load high, then leaves on dout MSB first, one bit
// per clock, followed by zeros until the next load.
module p2s_chip_core
  import p2s_pkg::*;
#(
  parameter int unsigned WIDTH = P2S_WIDTH
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] d,
  output logic             dout
);

  serial_converter #(
    .WIDTH(WIDTH)
  ) u_converter (
    .clk  (clk),
    .rst_n(rst_n),
    .load (load),
    .d    (d),
    .dout (dout)
  );

endmodule : p2s_chip_core
