// End-to-end testbench: a 16-node cluster wired as the 4x4 2D torus.
//
// Sixteen cuscomnet_node instances, all with their default parameters, are
// joined lane to lane by cable models (lane 0 North meets the northern
// neighbour's lane 3 South, lane 1 East meets the eastern neighbour's lane 2
// West, with wrap-around). One cable delivers its bytes one word-half late,
// so its receiver must realign. The user side of each node is driven by the
// testbench, which knows every packet sent and checks that each arrives
// once, at the right node, with its source, priority, length and payload.
//
// Phases, each counting the mechanism it must make happen:
//  1. latency of a zero-payload packet over 0..4 hops on an idle network;
//     every hop must add the same number of cycles (the per-hop routing
//     latency), and the count is printed;
//  2. all-to-all exchange of full 64-byte packets, as the N-body
//     application does with its partial results (each node sends to the 15
//     others separately); forwarding through intermediate nodes and
//     round-robin contention happen here;
//  3. a damaged data word on one cable: CRC error, NAK, frame repeated;
//  4. a lost ACK: timeout, frame repeated, copy removed at the destination;
//  5. hot spot: fifteen nodes send to node 0 while its user stops reading;
//     node 0's local queue fills, its inputs block, links refuse frames
//     (busy NAK); urgent packets sent afterwards must overtake older ones.
module tb_cuscomnet_node;
  import cuscomnet_pkg::*;
  localparam int N = NUM_NODES;
  localparam int L = NUM_LANES;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------- node ports ----------------
  logic [L-1:0][15:0] gtp_tx_data [N], gtp_rx_data [N];
  logic [L-1:0][1:0]  gtp_tx_charisk [N], gtp_rx_charisk [N];
  logic [N-1:0]       usr_tx_valid = '0, usr_tx_ready;
  logic [NODE_W-1:0]  usr_tx_dest [N];
  logic [PRIO_W-1:0]  usr_tx_prio [N];
  pkt_type_e          usr_tx_type [N];
  logic [LEN_W-1:0]   usr_tx_len [N];
  logic [MAX_WORDS-1:0][WORD_W-1:0] usr_tx_data [N];
  logic [N-1:0]       usr_rx_valid, usr_rx_ready = '1;
  packet_t            usr_rx_pkt [N];
  logic [L-1:0]       link_up [N];
  logic [L-1:0][15:0] crc_errors [N], busy_naks [N], retransmits [N], timeouts [N];
  logic [L-1:0][15:0] kchar_errors [N], realigns [N];
  logic [15:0]        dup_drops [N], routed_pkts [N];

  // cable fault controls, per node and lane of the receiving end
  logic [L-1:0] c_shift [N], c_flip [N], c_drop [N], c_flip_done [N], c_drop_done [N];

  function automatic int neighbour(int n, int lane);
    int c, r;
    c = n % TORUS_COLS; r = n / TORUS_COLS;
    case (lane)
      0: r = (r + TORUS_ROWS - 1) % TORUS_ROWS;
      1: c = (c + 1) % TORUS_COLS;
      2: c = (c + TORUS_COLS - 1) % TORUS_COLS;
      default: r = (r + 1) % TORUS_ROWS;
    endcase
    return r * TORUS_COLS + c;
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    cuscomnet_node u_node (
      .clk, .rst_n, .node_id(NODE_W'(n)),
      .gtp_tx_data(gtp_tx_data[n]), .gtp_tx_charisk(gtp_tx_charisk[n]),
      .gtp_rx_data(gtp_rx_data[n]), .gtp_rx_charisk(gtp_rx_charisk[n]),
      .usr_tx_valid(usr_tx_valid[n]), .usr_tx_ready(usr_tx_ready[n]),
      .usr_tx_dest(usr_tx_dest[n]), .usr_tx_prio(usr_tx_prio[n]),
      .usr_tx_type(usr_tx_type[n]), .usr_tx_len(usr_tx_len[n]),
      .usr_tx_data(usr_tx_data[n]),
      .usr_rx_valid(usr_rx_valid[n]), .usr_rx_ready(usr_rx_ready[n]),
      .usr_rx_pkt(usr_rx_pkt[n]),
      .link_up(link_up[n]), .crc_errors(crc_errors[n]), .busy_naks(busy_naks[n]),
      .retransmits(retransmits[n]), .timeouts(timeouts[n]),
      .kchar_errors(kchar_errors[n]), .realigns(realigns[n]),
      .dup_drops(dup_drops[n]), .routed_pkts(routed_pkts[n])
    );
    for (genvar l = 0; l < L; l++) begin : g_cable
      // node n receives on lane l what its neighbour sends on the opposite lane
      localparam int SRC = (l == 0) ? ((n / 4 + 3) % 4) * 4 + n % 4 :
                           (l == 1) ? (n / 4) * 4 + (n % 4 + 1) % 4 :
                           (l == 2) ? (n / 4) * 4 + (n % 4 + 3) % 4 :
                                      ((n / 4 + 1) % 4) * 4 + n % 4;
      localparam int OPP = 3 - l;
      gtp_link_model #(.DELAY(4)) u_cable (
        .clk, .rst_n,
        .tx_data(gtp_tx_data[SRC][OPP]), .tx_charisk(gtp_tx_charisk[SRC][OPP]),
        .rx_data(gtp_rx_data[n][l]), .rx_charisk(gtp_rx_charisk[n][l]),
        .shift(c_shift[n][l]), .flip_data(c_flip[n][l]), .drop_ack(c_drop[n][l]),
        .flip_done(c_flip_done[n][l]), .drop_done(c_drop_done[n][l])
      );
    end
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- senders ----------------
  // A packet to send is described by its destination, priority and tag; the
  // payload is derived from the tag so the receiver can check it.
  typedef struct {
    int dest;
    int prio;
    int len;
    int tag;
  } job_t;

  job_t   txq [N][$];
  logic [N-1:0] acc;
  longint now;
  longint send_time [int];     // tag -> cycle the node took the packet
  int     tag_src [int], tag_dest [int], tag_prio [int], tag_len [int];
  int     next_tag = 1;

  always @(posedge clk) now = longint'($time / 10);
  always_ff @(posedge clk) acc <= usr_tx_valid & usr_tx_ready;

  function automatic word_t payload(int tag, int i);
    return word_t'(tag * 40503 + i * 7919 + (i << 11));
  endfunction

  task automatic queue_send(int src, int dest, int prio, int len);
    job_t j;
    j.dest = dest; j.prio = prio; j.len = len; j.tag = next_tag++;
    tag_src[j.tag] = src; tag_dest[j.tag] = dest; tag_prio[j.tag] = prio; tag_len[j.tag] = len;
    txq[src].push_back(j);
  endtask

  always @(negedge clk) begin
    for (int n = 0; n < N; n++) begin
      if (usr_tx_valid[n] && acc[n]) begin
        send_time[usr_tx_data[n][0]] = longint'($time / 10) - 1;
        void'(txq[n].pop_front());
        usr_tx_valid[n] = 0;
      end
      if (!usr_tx_valid[n] && txq[n].size() > 0) begin
        job_t j;
        j = txq[n][0];
        usr_tx_dest[n] = NODE_W'(j.dest);
        usr_tx_prio[n] = PRIO_W'(j.prio);
        usr_tx_type[n] = PT_DATA;
        // payload word 0 carries the tag, so every packet has at least one
        // word; zero-length packets are identified by their sender and id
        usr_tx_len[n] = LEN_W'(j.len);
        usr_tx_data[n] = '0;
        usr_tx_data[n][0] = word_t'(j.tag);
        for (int i = 1; i < MAX_WORDS; i++) usr_tx_data[n][i] = payload(j.tag, i);
        usr_tx_valid[n] = 1;
      end
    end
  end

  // ---------------- receivers ----------------
  logic [N-1:0] rx_fire;
  packet_t      rx_seen [N];
  int received = 0, overtakes = 0;
  int delivered [int];          // tag -> times delivered
  longint last_latency;
  int zero_tag [N];             // zero-length packets: tag by (src) for latency

  always_ff @(posedge clk) begin
    rx_fire <= usr_rx_valid & usr_rx_ready;
    for (int n = 0; n < N; n++) rx_seen[n] <= usr_rx_pkt[n];
  end

  // tags of packets still on their way to node 0, for the overtaking count
  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) if (rx_fire[n]) begin
      packet_t p;
      int tag;
      p = rx_seen[n];
      if (p.len == 0) tag = zero_tag[p.hdr.src];
      else tag = int'(p.data[0]);
      checks++;
      if (!tag_dest.exists(tag)) begin
        failures++;
        $display("node %0d: unknown packet tag %0d", n, tag);
      end else begin
        logic ok;
        ok = tag_dest[tag] == n && int'(p.hdr.dest) == n && int'(p.hdr.src) == tag_src[tag]
             && int'(p.hdr.prio) == tag_prio[tag] && int'(p.len) == tag_len[tag];
        for (int i = 1; i < int'(p.len); i++) if (p.data[i] != payload(tag, i)) ok = 0;
        if (delivered.exists(tag)) begin
          ok = 0;
          $display("node %0d: packet %0d delivered twice", n, tag);
        end
        if (!ok) begin
          failures++;
          $display("node %0d: bad packet tag %0d src %0d", n, tag, p.hdr.src);
        end
        delivered[tag] = 1;
        received++;
        last_latency = longint'($time / 10) - 1 - send_time[tag];
        // urgent packet delivered while an older ordinary one to this node waits
        if (p.hdr.prio == 1) begin
          foreach (tag_dest[t])
            if (tag_dest[t] == n && tag_prio[t] == 0 && !delivered.exists(t)
                && send_time.exists(t) && send_time[t] < send_time[tag]) begin
              overtakes++;
              break;
            end
        end
      end
    end
  end

  function automatic int outstanding();
    int k;
    k = 0;
    foreach (tag_dest[t]) if (!delivered.exists(t)) k++;
    return k;
  endfunction

  task automatic wait_quiet(int limit);
    int w;
    w = 0;
    while (outstanding() > 0 && w < limit) begin @(negedge clk); w++; end
    repeat (20) @(negedge clk);
  endtask

  // ---------------- statistics helpers ----------------
  function automatic int sum_lanes(string what);
    int s;
    s = 0;
    for (int n = 0; n < N; n++)
      for (int l = 0; l < L; l++)
        case (what)
          "crc":   s += int'(crc_errors[n][l]);
          "busy":  s += int'(busy_naks[n][l]);
          "retx":  s += int'(retransmits[n][l]);
          "to":    s += int'(timeouts[n][l]);
          "align": s += int'(realigns[n][l]);
          "up":    s += int'(link_up[n][l]);
          default: ;
        endcase
    return s;
  endfunction

  function automatic int sum_node(string what);
    int s;
    s = 0;
    for (int n = 0; n < N; n++)
      s += (what == "dup") ? int'(dup_drops[n]) : int'(routed_pkts[n]);
    return s;
  endfunction

  int qfull_cycles = 0;
  always @(posedge clk) if (rst_n && |g_node[0].u_node.u_pktif.q_full[0]) qfull_cycles++;

  task automatic mech(string name, int count);
    checks++;
    $display("  %-34s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("  mechanism never happened: %s", name);
    end
  endtask

  // ---------------- test sequence ----------------
  initial begin
    longint lat [5];
    int dests [5];
    for (int n = 0; n < N; n++) begin
      c_shift[n] = '0; c_flip[n] = '0; c_drop[n] = '0; zero_tag[n] = 0;
      usr_tx_dest[n] = '0; usr_tx_prio[n] = '0; usr_tx_type[n] = PT_DATA;
      usr_tx_len[n] = '0; usr_tx_data[n] = '0;
    end
    // the cable into node 5, East side, delivers its bytes shifted
    c_shift[5][1] = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (1200) @(negedge clk);   // idle: periodic SYNC brings the links up
    checks++;
    if (sum_lanes("up") != N * L) begin
      failures++;
      $display("only %0d of %0d lanes up", sum_lanes("up"), N * L);
    end

    // ---- 1. zero-payload latency over 0..4 hops from node 0 ----
    dests = '{0, 1, 2, 6, 10};   // 0, 1, 2, 3 and 4 hops
    for (int h = 0; h < 5; h++) begin
      zero_tag[0] = next_tag;
      queue_send(0, dests[h], 0, 0);
      wait_quiet(5000);
      lat[h] = last_latency;
    end
    $display("zero-payload latency by hops: %0d %0d %0d %0d %0d cycles",
             lat[0], lat[1], lat[2], lat[3], lat[4]);
    for (int h = 2; h < 5; h++) begin
      checks++;
      // equal per-hop increments (a periodic SYNC may add a cycle)
      if ((lat[h] - lat[h-1]) - (lat[2] - lat[1]) > 1 || (lat[h] - lat[h-1]) - (lat[2] - lat[1]) < -1) begin
        failures++;
        $display("hop %0d adds %0d cycles, hop 2 added %0d", h, lat[h] - lat[h-1], lat[2] - lat[1]);
      end
    end
    $display("per-hop latency: %0d cycles", lat[2] - lat[1]);

    // ---- 2. all-to-all exchange of full packets ----
    for (int r = 0; r < 2; r++)
      for (int s = 0; s < N; s++)
        for (int d = 0; d < N; d++)
          if (d != s) queue_send(s, d, 0, 32);
    wait_quiet(100000);
    checks++;
    if (outstanding() != 0) begin
      failures++;
      $display("all-to-all: %0d packets missing", outstanding());
    end

    // ---- 3. damaged data word on the cable into node 1 from the West ----
    c_flip[1][2] = 1;
    @(negedge clk) c_flip[1][2] = 0;
    for (int i = 0; i < 4; i++) queue_send(0, 1, 0, 20);
    wait_quiet(20000);

    // ---- 4. lost ACK: node 2 acknowledges over the cable into node 1 (East side) ----
    c_drop[1][1] = 1;
    @(negedge clk) c_drop[1][1] = 0;
    for (int i = 0; i < 4; i++) queue_send(1, 2, 0, 16);
    wait_quiet(20000);
    repeat (400) @(negedge clk);

    // ---- 5. hot spot on node 0 with its user not reading ----
    usr_rx_ready[0] = 0;
    for (int r = 0; r < 7; r++)
      for (int s = 1; s < N; s++) queue_send(s, 0, 0, 32);
    repeat (9000) @(negedge clk);
    for (int s = 1; s < N; s += 3) queue_send(s, 0, 1, 8);
    repeat (3000) @(negedge clk);
    usr_rx_ready[0] = 1;
    wait_quiet(100000);
    checks++;
    if (outstanding() != 0) begin
      failures++;
      $display("%0d packets never arrived", outstanding());
    end

    $display("packets delivered: %0d", received);
    $display("mechanisms:");
    mech("forwarded by intermediate nodes", sum_node("routed"));
    mech("word realignment", sum_lanes("align"));
    mech("CRC error refused", sum_lanes("crc"));
    mech("frames repeated", sum_lanes("retx"));
    mech("acknowledgement timeouts", sum_lanes("to"));
    mech("duplicates removed", sum_node("dup"));
    mech("busy refusals (no room)", sum_lanes("busy"));
    mech("cycles with a full queue at node 0", qfull_cycles);
    mech("urgent packets overtaking", overtakes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
