// PKTIF: the network layer of a CusComNet node.
//
// PKTIF is both the packet switch of the node and the wrapper the user
// application sees. The user only gives payload, destination node, type and
// priority; PKTIF adds the source address and a packet identifier, and
// delivers packets addressed to this node, with duplicates removed. Packets
// for other nodes ("foreign" packets, also those of other applications) are
// passed on towards their destination, so nodes that are not neighbours can
// talk through intermediate nodes.
//
// Structure, as in the published design: five inputs (the local user and
// the four links), a routing module per input, a round-robin scheduler
// that controls one multiplexer per output, and a queue per output in
// front of the local user (RX) and of each link (TX to the remote node).
// Queues are split by priority (prio_queue). The router and the scheduler
// are separate modules and can be replaced.
//
// Own choices:
//  * Each input holds one packet in a register until the scheduler moves it
//    into the queue of its output; the input takes no new packet meanwhile
//    (the user sees usr_tx_ready low, a link refuses the frame with NAK).
//  * A packet only requests its output when the queue level of its priority
//    has room, so nothing is ever dropped inside the switch.
//  * The identifier is a counter per destination node, so consecutive
//    packets from one source to one destination carry consecutive numbers.
//    A packet whose identifier equals the last one delivered from the same
//    source is a repeat made by the data link after a lost acknowledgement
//    and is discarded.
//
// Timing: a packet entering an input register is routed and scheduled in
// the next cycle and written into its queue on that edge; it can leave the
// queue the cycle after. Reset empties all registers and queues.
module pktif
  import cuscomnet_pkg::*;
#(
  parameter int unsigned QUEUE_DEPTH = 64,
  // packets per priority level (entry l for priority l); QUEUE_DEPTH each unless set
  parameter logic [PRIO_LEVELS-1:0][15:0] LEVEL_DEPTH = {PRIO_LEVELS{16'(QUEUE_DEPTH)}}
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NODE_W-1:0]     node_id,
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
  // links, packets received from the data link layers
  input  logic [NUM_LANES-1:0]  lane_rx_valid,
  output logic [NUM_LANES-1:0]  lane_rx_ready,
  input  packet_t               lane_rx_pkt [NUM_LANES],
  // links, packets to send
  output logic [NUM_LANES-1:0]  lane_tx_valid,
  input  logic [NUM_LANES-1:0]  lane_tx_ready,
  output packet_t               lane_tx_pkt [NUM_LANES],
  // status
  output logic [15:0]           dup_drops,   // repeated packets discarded
  output logic [15:0]           routed_pkts  // foreign packets passed on
);

  localparam int unsigned NP = NUM_PORTS;

  // ---------------- input registers ----------------
  logic [NP-1:0]             in_valid;
  packet_t                   in_pkt   [NP];
  logic [PORT_W-1:0]         in_route [NP];
  logic [NP-1:0]             in_taken;
  logic [NUM_NODES-1:0][ID_W-1:0] next_id;

  // ---------------- output queues ----------------
  logic [NP-1:0]                  q_push, q_valid, q_pop;
  logic [NP-1:0][PRIO_LEVELS-1:0] q_full;
  packet_t                        q_din  [NP];
  packet_t                        q_head [NP];

  logic [NP-1:0][NP-1:0] req, gnt;   // [output][input]

  packet_t usr_pkt;
  always_comb begin
    usr_pkt          = '0;
    usr_pkt.hdr.dest = usr_tx_dest;
    usr_pkt.hdr.src  = node_id;
    usr_pkt.hdr.ptype= usr_tx_type;
    usr_pkt.hdr.prio = usr_tx_prio;
    usr_pkt.hdr.id   = next_id[usr_tx_dest];
    usr_pkt.len      = usr_tx_len;
    usr_pkt.data     = usr_tx_data;
  end

  assign usr_tx_ready  = !in_valid[0];
  assign lane_rx_ready = ~in_valid[NP-1:1];

  // routers
  for (genvar i = 0; i < NP; i++) begin : g_route
    torus_router u_router (
      .local_id(node_id), .dest_id(in_pkt[i].hdr.dest), .out_port(in_route[i])
    );
  end

  // requests: routed output, and room at the packet's priority level
  always_comb begin
    req = '0;
    for (int o = 0; o < NP; o++)
      for (int i = 0; i < NP; i++)
        req[o][i] = in_valid[i] && int'(in_route[i]) == o
                    && !q_full[o][in_pkt[i].hdr.prio];
  end

  rr_scheduler #(.NPORTS(NP)) u_sched (.clk, .rst_n, .req, .gnt);

  // multiplexers in front of the queues
  always_comb begin
    in_taken = '0;
    for (int o = 0; o < NP; o++) begin
      q_push[o] = |gnt[o];
      q_din[o]  = '0;
      for (int i = 0; i < NP; i++) begin
        if (gnt[o][i]) begin
          q_din[o]    = in_pkt[i];
          in_taken[i] = 1'b1;
        end
      end
    end
  end

  for (genvar o = 0; o < NP; o++) begin : g_queue
    prio_queue #(.DEPTH(QUEUE_DEPTH), .LEVELS(PRIO_LEVELS), .LEVEL_DEPTH(LEVEL_DEPTH)) u_queue (
      .clk, .rst_n,
      .push(q_push[o]), .din(q_din[o]), .full(q_full[o]),
      .valid(q_valid[o]), .head(q_head[o]), .pop(q_pop[o])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_valid    <= '0;
      next_id     <= '0;
      routed_pkts <= '0;
      for (int i = 0; i < NP; i++) in_pkt[i] <= '0;
    end else begin
      for (int i = 0; i < NP; i++)
        if (in_taken[i]) in_valid[i] <= 1'b0;
      if (usr_tx_valid && usr_tx_ready) begin
        in_valid[0]          <= 1'b1;
        in_pkt[0]            <= usr_pkt;
        next_id[usr_tx_dest] <= next_id[usr_tx_dest] + 1'b1;
      end
      for (int l = 0; l < NUM_LANES; l++) begin
        if (lane_rx_valid[l] && lane_rx_ready[l]) begin
          in_valid[l+1] <= 1'b1;
          in_pkt[l+1]   <= lane_rx_pkt[l];
        end
      end
      for (int i = 1; i < NP; i++)
        if (in_taken[i] && in_route[i] != PORT_W'(PORT_LOCAL))
          routed_pkts <= routed_pkts + 1'b1;
    end
  end

  // ---------------- link outputs ----------------
  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane_tx
    assign lane_tx_valid[l] = q_valid[l+1];
    assign lane_tx_pkt[l]   = q_head[l+1];
    assign q_pop[l+1]       = q_valid[l+1] && lane_tx_ready[l];
  end

  // ---------------- local delivery with duplicate rejection ----------------
  logic [NUM_NODES-1:0][ID_W-1:0] last_id;
  logic [NUM_NODES-1:0]           seen;
  logic                           is_dup;

  assign is_dup       = seen[q_head[0].hdr.src] && last_id[q_head[0].hdr.src] == q_head[0].hdr.id;
  assign usr_rx_valid = q_valid[0] && !is_dup;
  assign usr_rx_pkt   = q_head[0];
  assign q_pop[0]     = q_valid[0] && (is_dup || usr_rx_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_id   <= '0;
      seen      <= '0;
      dup_drops <= '0;
    end else if (q_valid[0]) begin
      if (is_dup) begin
        dup_drops <= dup_drops + 1'b1;
      end else if (usr_rx_ready) begin
        seen[q_head[0].hdr.src]    <= 1'b1;
        last_id[q_head[0].hdr.src] <= q_head[0].hdr.id;
      end
    end
  end

  // an input is never granted two outputs
  for (genvar i = 0; i < NP; i++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     $onehot0({gnt[4][i], gnt[3][i], gnt[2][i], gnt[1][i], gnt[0][i]}));
  end

endmodule
