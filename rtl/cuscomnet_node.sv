// CusComNet node: the inter-FPGA network logic of one cluster node.
//
// Each FPGA accelerator of the cluster has four serial transceivers (GTP
// tiles) cabled to four neighbours, so that the nodes form a 2D torus (16
// nodes as 4 x 4 in the published prototype). This module is the network
// wrapped around those four tiles: per lane a GTPIF (word alignment) and a
// data link layer (framing, CRC, acknowledgement and retransmission), and one
// network layer, PKTIF, that routes packets between the four links and the
// user application. User logic sends a payload with a destination node and
// a priority and receives the packets addressed to its node; packets for
// other nodes are forwarded without involving the host CPU.
//
// The transceivers themselves (8B/10B coding, serialisation, clocking) are
// outside: this module exchanges the tiles' 2-byte parallel words and K
// flags through the gtp_* ports. Lane l connects to cable port l:
// 0 North, 1 East, 2 West, 3 South.
//
// The node number is an input, so that one build serves every node.
// Parameters: QUEUE_DEPTH packets per priority level of each output queue
// (64 in the prototype), LEVEL_DEPTH to give each level its own depth
// instead, and SYNC_PERIOD and ACK_TIMEOUT of the data links (build-time in
// the published design, values not given: own choice).
//
// Timing: one clock for everything (100 MHz in the prototype, 16 bits per
// cycle per lane = 1.6 Gb/s of data on a 2 Gb/s line).
module cuscomnet_node
  import cuscomnet_pkg::*;
#(
  parameter int unsigned QUEUE_DEPTH = 64,
  parameter logic [PRIO_LEVELS-1:0][15:0] LEVEL_DEPTH = {PRIO_LEVELS{16'(QUEUE_DEPTH)}},
  parameter int unsigned SYNC_PERIOD = 1024,
  parameter int unsigned ACK_TIMEOUT = 256
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NODE_W-1:0]     node_id,
  // GTP tiles, parallel side
  output logic [NUM_LANES-1:0][15:0] gtp_tx_data,
  output logic [NUM_LANES-1:0][1:0]  gtp_tx_charisk,
  input  logic [NUM_LANES-1:0][15:0] gtp_rx_data,
  input  logic [NUM_LANES-1:0][1:0]  gtp_rx_charisk,
  // user application, send
  input  logic                  usr_tx_valid,
  output logic                  usr_tx_ready,
  input  logic [NODE_W-1:0]     usr_tx_dest,
  input  logic [PRIO_W-1:0]     usr_tx_prio,
  input  pkt_type_e             usr_tx_type,
  input  logic [LEN_W-1:0]      usr_tx_len,
  input  logic [MAX_WORDS-1:0][WORD_W-1:0] usr_tx_data,
  // user application, receive
  output logic                  usr_rx_valid,
  input  logic                  usr_rx_ready,
  output packet_t               usr_rx_pkt,
  // link and network statistics
  output logic [NUM_LANES-1:0]       link_up,
  output logic [NUM_LANES-1:0][15:0] crc_errors,
  output logic [NUM_LANES-1:0][15:0] busy_naks,
  output logic [NUM_LANES-1:0][15:0] retransmits,
  output logic [NUM_LANES-1:0][15:0] timeouts,
  output logic [NUM_LANES-1:0][15:0] kchar_errors,
  output logic [NUM_LANES-1:0][15:0] realigns,
  output logic [15:0]                dup_drops,
  output logic [15:0]                routed_pkts
);

  logic [NUM_LANES-1:0] rx_valid, rx_ready, tx_valid, tx_ready;
  packet_t              rx_pkt [NUM_LANES];
  packet_t              tx_pkt [NUM_LANES];

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane
    word_t tx_word, rx_word;
    logic  tx_k, rx_k, rx_kerr, realign;

    gtpif u_gtpif (
      .clk, .rst_n,
      .gtp_tx_data(gtp_tx_data[l]), .gtp_tx_charisk(gtp_tx_charisk[l]),
      .gtp_rx_data(gtp_rx_data[l]), .gtp_rx_charisk(gtp_rx_charisk[l]),
      .tx_word, .tx_k, .rx_word, .rx_k, .rx_kerr, .realign
    );

    datalink #(.SYNC_PERIOD(SYNC_PERIOD), .ACK_TIMEOUT(ACK_TIMEOUT)) u_link (
      .clk, .rst_n,
      .tx_valid(tx_valid[l]), .tx_ready(tx_ready[l]), .tx_pkt(tx_pkt[l]),
      .rx_valid(rx_valid[l]), .rx_ready(rx_ready[l]), .rx_pkt(rx_pkt[l]),
      .tx_word, .tx_k, .rx_word, .rx_k, .rx_kerr,
      .link_up(link_up[l]), .crc_errors(crc_errors[l]), .busy_naks(busy_naks[l]),
      .retransmits(retransmits[l]), .timeouts(timeouts[l]),
      .kchar_errors(kchar_errors[l])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)       realigns[l] <= '0;
      else if (realign) realigns[l] <= realigns[l] + 1'b1;
    end
  end

  pktif #(.QUEUE_DEPTH(QUEUE_DEPTH), .LEVEL_DEPTH(LEVEL_DEPTH)) u_pktif (
    .clk, .rst_n, .node_id,
    .usr_tx_valid, .usr_tx_ready, .usr_tx_dest, .usr_tx_prio, .usr_tx_type,
    .usr_tx_len, .usr_tx_data,
    .usr_rx_valid, .usr_rx_ready, .usr_rx_pkt,
    .lane_rx_valid(rx_valid), .lane_rx_ready(rx_ready), .lane_rx_pkt(rx_pkt),
    .lane_tx_valid(tx_valid), .lane_tx_ready(tx_ready), .lane_tx_pkt(tx_pkt),
    .dup_drops, .routed_pkts
  );

endmodule
