// Bandwidth workload between two adjoining nodes.
//
// Two cuscomnet_node instances at their default parameters, node 0 and its
// eastern neighbour node 1, joined by one cable model (4 cycles each way)
// between node 0's East lane and node 1's West lane; the other lanes are
// left idle. Node 0's user sends back-to-back packets to node 1 and the
// testbench measures the user-to-user data rate:
//  * low volume: 32 packets for each payload size 0, 2, 4, 8, 16, 32, 48 and
//    64 bytes (fewer packets than an output queue holds);
//  * high volume: 1000 packets of 64 bytes, far more than the 64-packet
//    queue. The user offers packets faster than the link carries them, so
//    node 0's East queue fills and the user is held back (usr_tx_ready low).
// Every packet must arrive once, in order, with its payload. The rate in
// Mb/s at 100 MHz is printed for each case. Checks: the rate grows with the
// payload size; full packets reach at least 950 Mb/s, near the rate the
// stop-and-wait link gives (38-word frame plus the acknowledgement round
// trip); the East queue of node 0 is full for a while in the high-volume
// run, and the rate there stays within 10 % of the low-volume rate.
module tb_bandwidth;
  import cuscomnet_pkg::*;
  localparam int L = NUM_LANES;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [L-1:0][15:0] tx_data [2], rx_data [2];
  logic [L-1:0][1:0]  tx_k [2], rx_k [2];
  logic               s_valid = 0, s_ready;
  logic [LEN_W-1:0]   s_len = '0;
  logic [MAX_WORDS-1:0][WORD_W-1:0] s_data = '0;
  logic               r_valid, r_ready = 1;
  packet_t            r_pkt;
  logic               x_tx_ready, x_rx_valid;
  packet_t            x_rx_pkt;
  logic [L-1:0]       up [2];
  logic [L-1:0][15:0] crc [2], busy [2], retx [2], tmo [2], kerr [2], realn [2];
  logic [15:0]        dups [2], routed [2];

  cuscomnet_node u_n0 (
    .clk, .rst_n, .node_id(4'd0),
    .gtp_tx_data(tx_data[0]), .gtp_tx_charisk(tx_k[0]), .gtp_rx_data(rx_data[0]), .gtp_rx_charisk(rx_k[0]),
    .usr_tx_valid(s_valid), .usr_tx_ready(s_ready), .usr_tx_dest(4'd1), .usr_tx_prio(1'b0),
    .usr_tx_type(PT_DATA), .usr_tx_len(s_len), .usr_tx_data(s_data),
    .usr_rx_valid(x_rx_valid), .usr_rx_ready(1'b1), .usr_rx_pkt(x_rx_pkt),
    .link_up(up[0]), .crc_errors(crc[0]), .busy_naks(busy[0]), .retransmits(retx[0]),
    .timeouts(tmo[0]), .kchar_errors(kerr[0]), .realigns(realn[0]),
    .dup_drops(dups[0]), .routed_pkts(routed[0])
  );
  cuscomnet_node u_n1 (
    .clk, .rst_n, .node_id(4'd1),
    .gtp_tx_data(tx_data[1]), .gtp_tx_charisk(tx_k[1]), .gtp_rx_data(rx_data[1]), .gtp_rx_charisk(rx_k[1]),
    .usr_tx_valid(1'b0), .usr_tx_ready(x_tx_ready), .usr_tx_dest(4'd0), .usr_tx_prio(1'b0),
    .usr_tx_type(PT_DATA), .usr_tx_len('0), .usr_tx_data('0),
    .usr_rx_valid(r_valid), .usr_rx_ready(r_ready), .usr_rx_pkt(r_pkt),
    .link_up(up[1]), .crc_errors(crc[1]), .busy_naks(busy[1]), .retransmits(retx[1]),
    .timeouts(tmo[1]), .kchar_errors(kerr[1]), .realigns(realn[1]),
    .dup_drops(dups[1]), .routed_pkts(routed[1])
  );

  // node 0 East (lane 1) <-> node 1 West (lane 2); other lanes see IDLE
  logic fd0, dd0, fd1, dd1;
  gtp_link_model #(.DELAY(4)) u_c01 (
    .clk, .rst_n, .tx_data(tx_data[0][1]), .tx_charisk(tx_k[0][1]),
    .rx_data(rx_data[1][2]), .rx_charisk(rx_k[1][2]),
    .shift(1'b0), .flip_data(1'b0), .drop_ack(1'b0), .flip_done(fd0), .drop_done(dd0));
  gtp_link_model #(.DELAY(4)) u_c10 (
    .clk, .rst_n, .tx_data(tx_data[1][2]), .tx_charisk(tx_k[1][2]),
    .rx_data(rx_data[0][1]), .rx_charisk(rx_k[0][1]),
    .shift(1'b0), .flip_data(1'b0), .drop_ack(1'b0), .flip_done(fd1), .drop_done(dd1));
  for (genvar l = 0; l < L; l++) begin : g_idle
    if (l != 1) begin : g0
      assign rx_data[0][l] = W_IDLE;
      assign rx_k[0][l] = 2'b11;
    end
    if (l != 2) begin : g1
      assign rx_data[1][l] = W_IDLE;
      assign rx_k[1][l] = 2'b11;
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

  function automatic word_t pay(int seq, int i);
    return word_t'(seq * 113 + i * 29 + 5);
  endfunction

  // receiver: in order, intact
  int rx_seq = 0, rx_len = 0;
  longint last_rx;
  always @(posedge clk) if (rst_n && r_valid && r_ready) begin
    logic ok;
    ok = int'(r_pkt.len) == rx_len && int'(r_pkt.hdr.src) == 0;
    for (int i = 0; i < rx_len; i++) if (r_pkt.data[i] != pay(rx_seq, i)) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      $display("packet %0d wrong (len %0d)", rx_seq, r_pkt.len);
    end
    rx_seq++;
    last_rx = longint'($time / 10);
  end

  // cycles with node 0's East queue full (ordinary level)
  int full_cycles = 0;
  always @(posedge clk) if (rst_n && u_n0.u_pktif.q_full[PORT_EAST][0]) full_cycles++;

  int tx_seq = 0;
  task automatic run(int words, int count, output real mbps);
    longint t0;
    int first;
    first = tx_seq;
    rx_len = words;
    t0 = longint'($time / 10);
    for (int k = 0; k < count; k++) begin
      @(negedge clk);
      s_len = LEN_W'(words);
      for (int i = 0; i < MAX_WORDS; i++) s_data[i] = pay(tx_seq, i);
      s_valid = 1;
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      tx_seq++;
      #1 s_valid = 0;
    end
    while (rx_seq < tx_seq && longint'($time / 10) - t0 < 300000) @(posedge clk);
    checks++;
    if (rx_seq != tx_seq) begin
      failures++;
      $display("%0d of %0d packets arrived", rx_seq - first, count);
    end
    // bits of payload per microsecond; 100 cycles per microsecond
    mbps = real'(count * words * 16) * 100.0 / real'(last_rx - t0);
  endtask

  initial begin
    int sizes [8];
    real rate [8];
    real hv;
    sizes = '{0, 1, 2, 4, 8, 16, 24, 32};
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (1200) @(negedge clk);
    checks++;
    if (!(up[0][1] && up[1][2])) begin
      failures++;
      $display("link not up");
    end

    $display("payload bytes   Mb/s");
    for (int s = 0; s < 8; s++) begin
      run(sizes[s], 32, rate[s]);
      $display("  %3d          %7.1f", sizes[s] * 2, rate[s]);
      repeat (50) @(negedge clk);
    end
    for (int s = 2; s < 8; s++) begin
      checks++;
      if (rate[s] <= rate[s-1]) begin
        failures++;
        $display("rate does not grow from %0d to %0d bytes", sizes[s-1] * 2, sizes[s] * 2);
      end
    end
    checks++;
    if (rate[7] < 950.0) begin
      failures++;
      $display("full packets below 950 Mb/s");
    end

    run(32, 1000, hv);
    $display("high volume, 1000 x 64 bytes: %7.1f Mb/s, East queue full for %0d cycles",
             hv, full_cycles);
    checks++;
    if (full_cycles == 0) begin
      failures++;
      $display("the queue never filled");
    end
    checks++;
    if (hv < 0.9 * rate[7]) begin
      failures++;
      $display("high-volume rate fell below 90%% of the low-volume rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
