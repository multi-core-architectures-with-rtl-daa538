// Shared definitions of the two-step sorting IP core.
//
// The core sorts a packet of N words received over an AXI4-Stream slave port
// and returns the sorted packet on an AXI4-Stream master port. This package
// holds the default configuration (8 words of 32 bits, the configuration the
// core was evaluated with on hardware), the state encodings of the two stream
// controllers, and small helper functions used by the sorting network.
package sort_pkg;

  // Default number of words per packet and word width.
  localparam int unsigned DEFAULT_N = 8;
  localparam int unsigned DEFAULT_W = 32;

  // States of the stream receiver (slave side).
  typedef enum logic [1:0] {
    RX_IDLE       = 2'd0,  // buffer held clear, waiting for TVALID
    RX_WRITE_FIFO = 2'd1,  // TREADY high, every accepted beat written
    RX_PROCESSING = 2'd2   // packet complete, waiting for the sender
  } rx_state_t;

  // States of the stream sender (master side).
  typedef enum logic [1:0] {
    TX_IDLE          = 2'd0,  // waiting for NEW_DATA_READY
    TX_READY_TO_SEND = 2'd1,  // one cycle for the sort to complete
    TX_SEND_STREAM   = 2'd2,  // streaming the sorted words
    TX_DONE          = 2'd3   // packet sent, waiting for the receiver
  } tx_state_t;

  // Number of pairwise comparisons among n words: n(n-1)/2.
  function automatic int unsigned num_pairs(int unsigned n);
    return n * (n - 1) / 2;
  endfunction

  // Position of comparison (i,j), i < j, in the binary vector. The upper
  // triangle of the edge matrix is read column by column, top to bottom:
  // (0,1)->0, (0,2)->1, (1,2)->2, (0,3)->3, (1,3)->4, (2,3)->5, ...
  function automatic int unsigned pair_index(int unsigned i, int unsigned j);
    return j * (j - 1) / 2 + i;
  endfunction

endpackage
