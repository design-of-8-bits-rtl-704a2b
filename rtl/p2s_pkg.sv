// p2s_pkg: constants shared by the parallel-to-serial converter and its top.
//
// P2S_WIDTH is the word length of the converter, 8 bits, the size the
// design is built for. Both serial_converter and p2s_chip_core take it as
// the default of their WIDTH parameter, so changing it here changes the
// whole design.
package p2s_pkg;

  // Bits per parallel word, sent MSB first.
  localparam int unsigned P2S_WIDTH = 8;

endpackage : p2s_pkg
