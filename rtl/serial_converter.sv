// serial_converter: parallel-in, serial-out shift register.
//
// A word on d is captured on a rising clock edge while load is high. The
// register's MSB drives dout, so for as long as load stays high the loaded
// word's MSB is at the output. On every rising edge with load low the
// register shifts one place toward the MSB and a 0 enters at bit 0: dout
// then shows d[WIDTH-2], d[WIDTH-3], ... d[0], one bit per clock, and after
// all WIDTH bits have left it stays 0 until the next load. Load has priority
// over shifting, so a load during a transmission replaces what is left of
// the old word.
//
// Interface
//   clk    rising-edge clock
//   rst_n  asynchronous active-low reset; clears the register (dout = 0)
//   load   synchronous load strobe, active high
//   d      parallel word, WIDTH bits
//   dout   serial output, registered (comes straight from a flip-flop)
//
// Timing: the edge that samples load = 1 puts d[WIDTH-1] on dout. The k-th
// edge with load = 0 after that puts d[WIDTH-1-k] on dout, for k = 1 ..
// WIDTH-1; from edge WIDTH on dout is 0. A word takes WIDTH clock periods
// to send, one bit per period, with no idle cycle needed between words.
//
// The load/shift behaviour, MSB-first order and zero fill follow the
// converter's description. The reset is this design's addition: the
// original register has none, and without it dout would be undefined
// before the first load.
//
// Lint reports rst_n as used both asynchronously and synchronously. The
// synchronous use is only the disable condition of the two assertions
// below; the register itself is reset asynchronously.
module serial_converter
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

  logic [WIDTH-1:0] shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg <= '0;
    end else if (load) begin
      shreg <= d;
    end else begin
      shreg <= {shreg[WIDTH-2:0], 1'b0};
    end
  end

  assign dout = shreg[WIDTH-1];

  // After a load edge the output carries the MSB of the word that was loaded.
  a_load_msb : assert property (@(posedge clk) disable iff (!rst_n)
                                load |=> dout == $past(d[WIDTH-1]))
    else $error("serial_converter: dout is not the loaded MSB after load");

  // After a shift edge the output carries the bit that sat below the MSB.
  a_shift_next : assert property (@(posedge clk) disable iff (!rst_n)
                                  !load |=> dout == $past(shreg[WIDTH-2]))
    else $error("serial_converter: dout is not the next bit after a shift");

  initial begin
    assert (WIDTH >= 2)
      else $fatal(1, "serial_converter: WIDTH must be at least 2");
  end

endmodule : serial_converter
