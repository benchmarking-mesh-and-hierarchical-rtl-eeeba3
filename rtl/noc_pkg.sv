// noc_pkg: constants and types shared by the hierarchical bus and the mesh.
//
// Both networks move fixed-size packets of 32-bit words: a three-word header
// followed by eight payload words, eleven words in all, one word per clock
// cycle on every link. Word size, header and payload length follow the
// benchmark configuration; the meaning of the header words is this design's
// own choice:
//   word 0  destination agent index (only the low bits are decoded)
//   word 1  source agent index (carried, not decoded by the network)
//   word 2  free for the agents (sequence number, tag)
// Agents are numbered 0..N-1. In the mesh agent i sits at row i / COLS and
// column i % COLS; in the hierarchical bus agent i sits on segment i / 4.
package noc_pkg;

  localparam int unsigned WORD_W      = 32;
  localparam int unsigned HDR_WORDS   = 3;
  localparam int unsigned PAY_WORDS   = 8;
  localparam int unsigned PKT_WORDS   = HDR_WORDS + PAY_WORDS;

  typedef logic [WORD_W-1:0] word_t;

  // Mesh directions, also the index of a router's input and output ports.
  typedef enum logic [2:0] {
    DIR_N = 3'd0,
    DIR_E = 3'd1,
    DIR_S = 3'd2,
    DIR_W = 3'd3,
    DIR_L = 3'd4   // the local agent
  } dir_e;

  localparam int unsigned NPORTS = 5;

  // One unidirectional mesh link: a word and its valid flag. Flow control is a
  // separate "room" signal running the other way.
  typedef struct packed {
    logic  valid;
    word_t data;
  } link_t;

  // What one bus master drives onto its segment in the request group. The
  // acknowledge and data-valid lines travel as separate one-bit signals, so
  // that no resolved signal depends on itself through a wrapper.
  typedef struct packed {
    logic  av;     // address valid: owner offers the header in data
    logic  last;   // last word of the packet being transferred
    word_t data;   // header or payload word
  } bus_req_t;

endpackage
