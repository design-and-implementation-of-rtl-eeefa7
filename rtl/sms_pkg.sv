// Shared constants and types of the 4x4 shared-memory switch fabric.
//
// A cell is 64 bytes: 16 words of 32 bits. A cell time is 16 clocks, one word
// per port per clock. Four interleaved banks, each 32 bits wide, hold the
// cells; one cell takes a 4-word block at the same block address in every
// bank. A bank address is 12 bits: the block number followed by two bits that
// select the word inside the block, so a bank has 4096 words and the buffer
// holds 1024 cells. The port count, word width, cell length and bank address
// width follow the original design; everything below them is derived.
package sms_pkg;
  localparam int unsigned N_PORTS    = 4;
  localparam int unsigned WORD_W     = 32;
  localparam int unsigned CELL_WORDS = N_PORTS * N_PORTS;   // 16
  localparam int unsigned SLOT_W     = $clog2(CELL_WORDS);  // 4
  localparam int unsigned PORT_W     = $clog2(N_PORTS);     // 2
  localparam int unsigned BANK_AW    = 12;
  localparam int unsigned BANK_DEPTH = 1 << BANK_AW;        // 4096

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [PORT_W-1:0] port_t;
  typedef logic [SLOT_W-1:0] slot_t;

  // Input FIFO entry: a word and the destination port sampled with it.
  typedef struct packed {
    port_t dest;
    word_t data;
  } in_entry_t;
endpackage
