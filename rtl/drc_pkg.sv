// drc_pkg: widths and defaults shared by the Direct Receiving Card (DRC) blocks.
//
// The card receives a serial bit stream and its bit clock from a satellite
// demodulator, turns it into 4-bit nibbles in the receiver stage and into
// 32-bit words in the FPGA, and queues the words in a FIFO that the PCI
// chipset empties by DMA. The 4-bit receiver output and the 32-bit FIFO word
// are the card's own widths; the FIFO depth is this design's choice (the
// card is only said to use a "high density" FIFO).
package drc_pkg;

  // Width of the receiver's parallel output (serial-to-parallel stage).
  localparam int unsigned NIB_W = 4;
  // Width of a FIFO word and of the data path to the PCI chipset.
  localparam int unsigned WORD_W = 32;
  // Nibbles merged into one word.
  localparam int unsigned NIBS_PER_WORD = WORD_W / NIB_W;
  // Default FIFO depth in words (a 16K x 32 part).
  localparam int unsigned FIFO_DEPTH_DEFAULT = 16384;

  typedef logic [NIB_W-1:0]  nibble_t;
  typedef logic [WORD_W-1:0] word_t;

endpackage
