// Full-size testbench of the cluster node with the N-body result exchange:
// sixteen cuscomnet_fpga instances, every parameter at its default (5120
// particles per node, 81920 in all, 12-word records), wired as the 4x4
// torus with cable models that delay each word by four cycles.
//
// It runs one complete exchange iteration between two phases of ordinary
// user traffic:
//  1. user mode: every node sends one packet to the node diagonally across
//     the torus (4 hops) and one to itself; each must arrive intact;
//  2. exchange mode: all nodes start together; every node must send its
//     5120 local records to each of the 15 others, and every word of the
//     memory of all particles (other than its own share) must be written
//     exactly once with the value the owning node holds; done must pulse
//     once per node;
//  3. back in user mode, the same traffic as phase 1 must work again.
// The counts of the mechanisms involved (mode switches, forwarding through
// intermediate nodes) are printed, and one that
// never happened is a failure. The cycles the iteration took are printed.
module tb_cuscomnet_fpga;
  import cuscomnet_pkg::*;
  localparam int N = NUM_NODES;
  localparam int L = NUM_LANES;
  localparam int PARTS = 5120;    // the default of cuscomnet_fpga
  localparam int RW = 12;
  localparam int LOC_W = $clog2(PARTS * RW), GLB_W = $clog2(N * PARTS * RW);
  localparam int SHARE = PARTS * RW;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [L-1:0][15:0] gtp_tx_data [N], gtp_rx_data [N];
  logic [L-1:0][1:0]  gtp_tx_charisk [N], gtp_rx_charisk [N];
  logic [N-1:0]       usr_tx_valid = '0, usr_tx_ready;
  logic [NODE_W-1:0]  usr_tx_dest [N];
  logic [LEN_W-1:0]   usr_tx_len [N];
  logic [MAX_WORDS-1:0][WORD_W-1:0] usr_tx_data [N];
  logic [N-1:0]       usr_rx_valid;
  packet_t            usr_rx_pkt [N];
  logic               exch_sel = 0;
  logic [N-1:0]       exch_start = '0, exch_busy, exch_done;
  logic [N-1:0]       loc_rd_en, glb_wr_en;
  logic [LOC_W-1:0]   loc_rd_addr [N];
  word_t              loc_rd_data [N];
  logic [GLB_W-1:0]   glb_wr_addr [N];
  word_t              glb_wr_data [N];
  logic [31:0]        pkts_sent [N], recs_received [N];
  logic [L-1:0]       link_up [N];
  logic [L-1:0][15:0] crc_errors [N], busy_naks [N], retransmits [N], timeouts [N];
  logic [L-1:0][15:0] kchar_errors [N], realigns [N];
  logic [15:0]        dup_drops [N], routed_pkts [N];

  // value of word w of the results owned by node n
  function automatic word_t val(int n, int w);
    return word_t'(n * 24593 + w * 17 + (w >> 7));
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    cuscomnet_fpga u_fpga (
      .clk, .rst_n, .node_id(NODE_W'(n)),
      .gtp_tx_data(gtp_tx_data[n]), .gtp_tx_charisk(gtp_tx_charisk[n]),
      .gtp_rx_data(gtp_rx_data[n]), .gtp_rx_charisk(gtp_rx_charisk[n]),
      .usr_tx_valid(usr_tx_valid[n]), .usr_tx_ready(usr_tx_ready[n]),
      .usr_tx_dest(usr_tx_dest[n]), .usr_tx_prio(1'b0), .usr_tx_type(PT_DATA),
      .usr_tx_len(usr_tx_len[n]), .usr_tx_data(usr_tx_data[n]),
      .usr_rx_valid(usr_rx_valid[n]), .usr_rx_ready(1'b1), .usr_rx_pkt(usr_rx_pkt[n]),
      .exch_sel, .exch_start(exch_start[n]), .exch_busy(exch_busy[n]), .exch_done(exch_done[n]),
      .loc_rd_en(loc_rd_en[n]), .loc_rd_addr(loc_rd_addr[n]), .loc_rd_data(loc_rd_data[n]),
      .glb_wr_en(glb_wr_en[n]), .glb_wr_addr(glb_wr_addr[n]), .glb_wr_data(glb_wr_data[n]),
      .exch_pkts_sent(pkts_sent[n]), .exch_recs_received(recs_received[n]),
      .link_up(link_up[n]), .crc_errors(crc_errors[n]), .busy_naks(busy_naks[n]),
      .retransmits(retransmits[n]), .timeouts(timeouts[n]),
      .kchar_errors(kchar_errors[n]), .realigns(realigns[n]),
      .dup_drops(dup_drops[n]), .routed_pkts(routed_pkts[n])
    );
    // local results: one cycle read latency
    always_ff @(posedge clk) if (loc_rd_en[n]) loc_rd_data[n] <= val(n, int'(loc_rd_addr[n]));
    for (genvar l = 0; l < L; l++) begin : g_cable
      localparam int SRC = (l == 0) ? ((n / 4 + 3) % 4) * 4 + n % 4 :
                           (l == 1) ? (n / 4) * 4 + (n % 4 + 1) % 4 :
                           (l == 2) ? (n / 4) * 4 + (n % 4 + 3) % 4 :
                                      ((n / 4 + 1) % 4) * 4 + n % 4;
      localparam int OPP = 3 - l;
      logic fd, dd;
      gtp_link_model #(.DELAY(4)) u_cable (
        .clk, .rst_n,
        .tx_data(gtp_tx_data[SRC][OPP]), .tx_charisk(gtp_tx_charisk[SRC][OPP]),
        .rx_data(gtp_rx_data[n][l]), .rx_charisk(gtp_rx_charisk[n][l]),
        .shift(1'b0), .flip_data(1'b0), .drop_ack(1'b0),
        .flip_done(fd), .drop_done(dd)
      );
    end
  end

  int checks = 0, failures = 0;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- memory of all particles, per node ----------------
  bit  seen [N][N * SHARE];
  int  writes [N];
  int  bad_writes = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) if (glb_wr_en[n]) begin
      int a, owner;
      a = int'(glb_wr_addr[n]);
      owner = a / SHARE;
      if (owner == n || owner >= N || seen[n][a] || glb_wr_data[n] != val(owner, a % SHARE)) begin
        bad_writes++;
        if (bad_writes < 10) $display("node %0d: bad write at %0d data %h", n, a, glb_wr_data[n]);
      end
      if (owner < N) seen[n][a] = 1;
      writes[n]++;
    end
  end

  int dones [N];
  always @(posedge clk) if (rst_n) for (int n = 0; n < N; n++) if (exch_done[n]) dones[n]++;

  // ---------------- user traffic ----------------
  int user_got [N];
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) if (usr_rx_valid[n]) begin
      packet_t p;
      logic ok;
      p = usr_rx_pkt[n];
      ok = int'(p.hdr.dest) == n && p.len == 5;
      for (int i = 0; i < 5; i++) if (p.data[i] != word_t'(p.hdr.src * 256 + i)) ok = 0;
      checks++;
      if (!ok) begin
        failures++;
        $display("node %0d: bad user packet from %0d", n, p.hdr.src);
      end
      user_got[n]++;
    end
  end

  task automatic user_phase();
    int n_before;
    n_before = 0;
    for (int n = 0; n < N; n++) n_before += user_got[n];
    for (int k = 0; k < 2; k++) begin
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        // opposite corner of the torus (2 columns and 2 rows away), then self
        usr_tx_dest[n] = (k == 0) ? NODE_W'(((n / 4 + 2) % 4) * 4 + (n % 4 + 2) % 4) : NODE_W'(n);
        usr_tx_len[n] = 5;
        usr_tx_data[n] = '0;
        for (int i = 0; i < 5; i++) usr_tx_data[n][i] = word_t'(n * 256 + i);
      end
      usr_tx_valid = '1;
      @(negedge clk);
      while (usr_tx_ready != '1) @(negedge clk);
      usr_tx_valid = '0;
    end
    repeat (300) @(negedge clk);
    begin
      int n_after;
      n_after = 0;
      for (int n = 0; n < N; n++) n_after += user_got[n];
      checks++;
      if (n_after - n_before != 2 * N) begin
        failures++;
        $display("user phase: %0d of %0d packets", n_after - n_before, 2 * N);
      end
    end
  endtask

  task automatic mech(string name, longint count);
    checks++;
    $display("  %-34s %0d", name, count);
    if (count == 0) begin
      failures++;
      $display("  mechanism never happened: %s", name);
    end
  endtask

  int mode_switches = 0;
  always @(exch_sel) if (rst_n) mode_switches++;

  initial begin
    longint t0, t1;
    for (int n = 0; n < N; n++) begin
      usr_tx_dest[n] = '0; usr_tx_len[n] = '0; usr_tx_data[n] = '0;
      writes[n] = 0; dones[n] = 0; user_got[n] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (1200) @(negedge clk);

    // 1. ordinary user traffic
    user_phase();

    // 2. one exchange iteration on all nodes
    exch_sel = 1;
    @(negedge clk);
    exch_start = '1;
    @(negedge clk);
    exch_start = '0;
    t0 = longint'($time / 10);
    while (exch_busy != '0) @(negedge clk);
    t1 = longint'($time / 10);
    $display("exchange of %0d particles: %0d cycles", N * PARTS, t1 - t0);
    repeat (10) @(negedge clk);
    for (int n = 0; n < N; n++) begin
      checks++;
      if (dones[n] != 1 || writes[n] != (N - 1) * SHARE || int'(pkts_sent[n]) != (N - 1) * ((PARTS + 1) / 2)) begin
        failures++;
        $display("node %0d: done %0d, %0d words written, %0d packets sent",
                 n, dones[n], writes[n], pkts_sent[n]);
      end
    end
    checks++;
    if (bad_writes != 0) failures++;

    // 3. back to ordinary user traffic
    exch_sel = 0;
    repeat (5) @(negedge clk);
    user_phase();

    $display("mechanisms:");
    begin
      longint routed, sent;
      routed = 0; sent = 0;
      for (int n = 0; n < N; n++) begin
        routed += routed_pkts[n];
        sent += pkts_sent[n];
      end
      mech("mode switches", mode_switches);
      mech("exchange packets sent", sent);
      mech("exchange words recorded", writes.sum());
      mech("forwarded by intermediate nodes", routed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
