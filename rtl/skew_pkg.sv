// skew_pkg: sizes and types shared by the skewed, parity-protected bus link.
//
// A data word of DATA_W bits travels with one parity bit, so a coded word is
// WORD_W = DATA_W + 1 bits. Two coded words are in flight at once, one on the
// even wires and one on the odd wires of the bus, so the bus is BUS_W = 2*WORD_W
// wires wide: 32 data bits give 33-bit coded words and a 66-wire bus, the sizes
// of the reference design. Coded word layout: bit WORD_W-1 is the parity bit,
// bits DATA_W-1..0 the data. Bus layout: wire 2*i carries bit i of the word of
// the even group, wire 2*i+1 bit i of the word of the odd group, so the two
// parity bits are the two highest wires.
package skew_pkg;

  parameter int unsigned DATA_W = 32;
  parameter int unsigned WORD_W = DATA_W + 1;
  parameter int unsigned BUS_W  = 2 * WORD_W;

  // Which half of the bus a word travels on. The even group is launched on the
  // rising edge of the transmission clock, the odd group on its falling edge.
  typedef enum logic {
    GRP_EVEN = 1'b0,
    GRP_ODD  = 1'b1
  } group_e;

  // Edge of the transmission clock on which a sender bank launches its word.
  typedef enum logic {
    EDGE_RISE = 1'b0,
    EDGE_FALL = 1'b1
  } tx_edge_e;

endpackage
