// Shared constants and types of the CusComNet inter-FPGA network.
//
// The network connects the FPGA accelerators of a cluster directly through
// their serial transceivers, in a 2D torus. Every node holds the same logic:
// a data link per transceiver lane and one packet switch (PKTIF) that also
// wraps the user application. This package fixes the build-time choices that
// all of those blocks must agree on.
//
// From the published design: a 16-node cluster in a 4x4 torus, 4 links per
// node, 64-byte maximum payload, a 16-bit header (packets are 16 to 528 bits),
// source and destination fields sized from the node count, a type field
// (data / control), a priority field and a unique packet identifier, 8B/10B
// special characters for IDLE, SYNC, SOF and EOF, and a 16-bit link word
// (2 Gb/s line rate at 100 MHz is 16 data bits per cycle after 8B/10B).
//
// Own choices: the field order inside the header, the width of the type field
// (2 bits), two priority levels, the packet identifier taking the bits left
// over (5), the payload counted in 16-bit words, and the K-character codes
// (standard 8B/10B K28.5, K28.1, K27.7, K29.7, K23.7, K30.7). ACK and NAK are
// extra control characters used by the link acknowledgement.
package cuscomnet_pkg;

  // ---------------- cluster and topology ----------------
  localparam int unsigned NUM_NODES  = 16;
  localparam int unsigned TORUS_COLS = 4;
  localparam int unsigned TORUS_ROWS = NUM_NODES / TORUS_COLS;
  localparam int unsigned NODE_W     = $clog2(NUM_NODES);
  localparam int unsigned NUM_LANES  = 4;   // GTP tiles per node
  localparam int unsigned NUM_PORTS  = NUM_LANES + 1; // + the local node

  // Switch port numbering: 0 is the local node, 1..4 are GTP lanes 0..3.
  // Lane numbering follows the cabling of a node: 0 North, 1 East,
  // 2 West, 3 South.
  localparam int unsigned PORT_LOCAL = 0;
  localparam int unsigned PORT_NORTH = 1;
  localparam int unsigned PORT_EAST  = 2;
  localparam int unsigned PORT_WEST  = 3;
  localparam int unsigned PORT_SOUTH = 4;
  localparam int unsigned PORT_W     = $clog2(NUM_PORTS);

  // ---------------- packet format ----------------
  localparam int unsigned WORD_W        = 16;  // link word
  localparam int unsigned HDR_W         = 16;
  localparam int unsigned MAX_PAYLOAD_B = 64;  // bytes
  localparam int unsigned MAX_WORDS     = MAX_PAYLOAD_B * 8 / WORD_W;
  localparam int unsigned LEN_W         = $clog2(MAX_WORDS + 1);
  localparam int unsigned PRIO_LEVELS   = 2;
  localparam int unsigned PRIO_W        = (PRIO_LEVELS > 1) ? $clog2(PRIO_LEVELS) : 1;
  localparam int unsigned TYPE_W        = 2;
  localparam int unsigned ID_W          = HDR_W - 2 * NODE_W - TYPE_W - PRIO_W;

  typedef logic [WORD_W-1:0] word_t;

  typedef enum logic [TYPE_W-1:0] {
    PT_DATA    = 2'd0,
    PT_CONTROL = 2'd1,
    PT_USER2   = 2'd2,
    PT_USER3   = 2'd3
  } pkt_type_e;

  typedef struct packed {
    logic [NODE_W-1:0] dest;
    logic [NODE_W-1:0] src;
    pkt_type_e         ptype;
    logic [PRIO_W-1:0] prio;
    logic [ID_W-1:0]   id;
  } pkt_hdr_t;

  // A packet as it is stored in a queue: header, payload length in words,
  // and the payload (word 0 is sent first).
  typedef struct packed {
    pkt_hdr_t                      hdr;
    logic [LEN_W-1:0]              len;
    logic [MAX_WORDS-1:0][WORD_W-1:0] data;
  } packet_t;

  // ---------------- 8B/10B special characters ----------------
  localparam logic [7:0] K28_5 = 8'hBC; // comma, IDLE
  localparam logic [7:0] K28_1 = 8'h3C; // second byte of SYNC
  localparam logic [7:0] K27_7 = 8'hFB; // SOF
  localparam logic [7:0] K29_7 = 8'hFD; // EOF
  localparam logic [7:0] K23_7 = 8'hF7; // ACK
  localparam logic [7:0] K30_7 = 8'hFE; // NAK

  // Control words (both bytes flagged as K characters).
  localparam word_t W_IDLE = {K28_5, K28_5};
  localparam word_t W_SYNC = {K28_5, K28_1};
  localparam word_t W_SOF  = {K27_7, K27_7};
  localparam word_t W_EOF  = {K29_7, K29_7};
  localparam word_t W_ACK  = {K23_7, K23_7};
  localparam word_t W_NAK  = {K30_7, K30_7};

endpackage
