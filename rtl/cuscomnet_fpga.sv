// CusComNet cluster node with the N-body result exchange: the network logic
// of one FPGA accelerator together with the application circuitry that
// shares the partial results of an N-body iteration with every other node.
//
// The network (cuscomnet_node: four GTP lanes, their data links and the
// packet switch) has one user port. Here that port is shared between the
// user application outside this module and the result_exchange block,
// selected by the exch_sel input: while exch_sel is 1 the exchange block
// sends and receives, otherwise the outside user does. exch_sel is meant
// to be changed only while both are idle (no packet offered or arriving for
// the user); a packet that arrives for the user while exch_sel is 1 would
// be taken by the exchange block. The published design runs the exchange
// in place of the host's MPI transfer; how the application and the exchange
// share the network port it leaves open, so the select is this design's own
// choice.
//
// Interface: gtp_* to the four transceivers, usr_* as on cuscomnet_node,
// exch_* start/busy/done of one exchange iteration, loc_rd_* into the
// memory of the local results and glb_wr_* into the memory of all
// particles (both memories are outside, in the accelerator's DRAM or block
// RAM), and the statistics of the network. One clock.
module cuscomnet_fpga
  import cuscomnet_pkg::*;
#(
  parameter int unsigned QUEUE_DEPTH    = 64,
  parameter logic [PRIO_LEVELS-1:0][15:0] LEVEL_DEPTH = {PRIO_LEVELS{16'(QUEUE_DEPTH)}},
  parameter int unsigned SYNC_PERIOD    = 1024,
  parameter int unsigned ACK_TIMEOUT    = 256,
  parameter int unsigned PARTS_PER_NODE = 5120,
  parameter int unsigned REC_WORDS      = 12,
  localparam int unsigned LOC_W = $clog2(PARTS_PER_NODE * REC_WORDS),
  localparam int unsigned GLB_W = $clog2(NUM_NODES * PARTS_PER_NODE * REC_WORDS)
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
  // N-body result exchange
  input  logic                  exch_sel,
  input  logic                  exch_start,
  output logic                  exch_busy,
  output logic                  exch_done,
  output logic                  loc_rd_en,
  output logic [LOC_W-1:0]      loc_rd_addr,
  input  word_t                 loc_rd_data,
  output logic                  glb_wr_en,
  output logic [GLB_W-1:0]      glb_wr_addr,
  output word_t                 glb_wr_data,
  output logic [31:0]           exch_pkts_sent,
  output logic [31:0]           exch_recs_received,
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
  // network user port
  logic                  n_tx_valid, n_tx_ready, n_rx_valid, n_rx_ready;
  logic [NODE_W-1:0]     n_tx_dest;
  logic [PRIO_W-1:0]     n_tx_prio;
  pkt_type_e             n_tx_type;
  logic [LEN_W-1:0]      n_tx_len;
  logic [MAX_WORDS-1:0][WORD_W-1:0] n_tx_data;
  packet_t               n_rx_pkt;
  // exchange block's port
  logic                  x_tx_valid, x_rx_ready;
  logic [NODE_W-1:0]     x_tx_dest;
  logic [PRIO_W-1:0]     x_tx_prio;
  pkt_type_e             x_tx_type;
  logic [LEN_W-1:0]      x_tx_len;
  logic [MAX_WORDS-1:0][WORD_W-1:0] x_tx_data;

  always_comb begin
    if (exch_sel) begin
      n_tx_valid = x_tx_valid;
      n_tx_dest  = x_tx_dest;
      n_tx_prio  = x_tx_prio;
      n_tx_type  = x_tx_type;
      n_tx_len   = x_tx_len;
      n_tx_data  = x_tx_data;
      n_rx_ready = x_rx_ready;
    end else begin
      n_tx_valid = usr_tx_valid;
      n_tx_dest  = usr_tx_dest;
      n_tx_prio  = usr_tx_prio;
      n_tx_type  = usr_tx_type;
      n_tx_len   = usr_tx_len;
      n_tx_data  = usr_tx_data;
      n_rx_ready = usr_rx_ready;
    end
  end
  assign usr_tx_ready = !exch_sel && n_tx_ready;
  assign usr_rx_valid = !exch_sel && n_rx_valid;
  assign usr_rx_pkt   = n_rx_pkt;

  cuscomnet_node #(
    .QUEUE_DEPTH(QUEUE_DEPTH), .LEVEL_DEPTH(LEVEL_DEPTH), .SYNC_PERIOD(SYNC_PERIOD), .ACK_TIMEOUT(ACK_TIMEOUT)
  ) u_net (
    .clk, .rst_n, .node_id,
    .gtp_tx_data, .gtp_tx_charisk, .gtp_rx_data, .gtp_rx_charisk,
    .usr_tx_valid(n_tx_valid), .usr_tx_ready(n_tx_ready), .usr_tx_dest(n_tx_dest),
    .usr_tx_prio(n_tx_prio), .usr_tx_type(n_tx_type), .usr_tx_len(n_tx_len),
    .usr_tx_data(n_tx_data),
    .usr_rx_valid(n_rx_valid), .usr_rx_ready(n_rx_ready), .usr_rx_pkt(n_rx_pkt),
    .link_up, .crc_errors, .busy_naks, .retransmits, .timeouts, .kchar_errors,
    .realigns, .dup_drops, .routed_pkts
  );

  result_exchange #(
    .NODES(NUM_NODES), .PARTS_PER_NODE(PARTS_PER_NODE), .REC_WORDS(REC_WORDS)
  ) u_exch (
    .clk, .rst_n, .node_id,
    .start(exch_start && exch_sel), .busy(exch_busy), .done(exch_done),
    .loc_rd_en, .loc_rd_addr, .loc_rd_data,
    .glb_wr_en, .glb_wr_addr, .glb_wr_data,
    .tx_valid(x_tx_valid), .tx_ready(n_tx_ready && exch_sel), .tx_dest(x_tx_dest),
    .tx_prio(x_tx_prio), .tx_type(x_tx_type), .tx_len(x_tx_len), .tx_data(x_tx_data),
    .rx_valid(n_rx_valid && exch_sel), .rx_ready(x_rx_ready), .rx_pkt(n_rx_pkt),
    .pkts_sent(exch_pkts_sent), .recs_received(exch_recs_received)
  );
endmodule
