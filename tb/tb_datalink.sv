// Testbench for datalink: two data link layers, A and B, joined by a model
// of a cable (a few cycles of delay each way) that can damage words.
// Traffic runs in both directions at once (full duplex). The testbench
// checks that:
//  * every packet arrives once, intact and in order, when nothing is damaged;
//  * a damaged data word makes the receiver refuse the frame (CRC error),
//    and the sender repeats it;
//  * a lost ACK makes the sender time out and repeat the frame, which then
//    arrives a second time (the copy is expected here; the network layer
//    removes it);
//  * a receiver with no room refuses good frames and they are repeated;
//  * a damaged K flag is counted;
//  * a zero-payload packet takes a fixed number of cycles from hand-over to
//    delivery, and back-to-back full packets reach the expected rate of the
//    stop-and-wait protocol.
module tb_datalink;
  import cuscomnet_pkg::*;
  localparam int DELAY = 3;
  localparam int TIMEOUT = 64;

  logic clk = 0, rst_n = 0;
  logic    a_tx_valid = 0, a_tx_ready, b_tx_valid = 0, b_tx_ready;
  packet_t a_tx_pkt = '0, b_tx_pkt = '0, a_rx_pkt, b_rx_pkt;
  logic    a_rx_valid, b_rx_valid, a_rx_ready = 1, b_rx_ready = 1;
  word_t   a_tw, b_tw, a_rw, b_rw;
  logic    a_tk, b_tk, a_rk, b_rk, a_rkerr, b_rkerr;
  logic        a_up, b_up;
  logic [15:0] a_crc, a_busy, a_retx, a_to, a_kerr;
  logic [15:0] b_crc, b_busy, b_retx, b_to, b_kerr;
  int checks = 0, failures = 0;

  datalink #(.SYNC_PERIOD(100), .ACK_TIMEOUT(TIMEOUT)) u_a (
    .clk, .rst_n, .tx_valid(a_tx_valid), .tx_ready(a_tx_ready), .tx_pkt(a_tx_pkt),
    .rx_valid(a_rx_valid), .rx_ready(a_rx_ready), .rx_pkt(a_rx_pkt),
    .tx_word(a_tw), .tx_k(a_tk), .rx_word(a_rw), .rx_k(a_rk), .rx_kerr(a_rkerr),
    .link_up(a_up), .crc_errors(a_crc), .busy_naks(a_busy), .retransmits(a_retx),
    .timeouts(a_to), .kchar_errors(a_kerr));
  datalink #(.SYNC_PERIOD(100), .ACK_TIMEOUT(TIMEOUT)) u_b (
    .clk, .rst_n, .tx_valid(b_tx_valid), .tx_ready(b_tx_ready), .tx_pkt(b_tx_pkt),
    .rx_valid(b_rx_valid), .rx_ready(b_rx_ready), .rx_pkt(b_rx_pkt),
    .tx_word(b_tw), .tx_k(b_tk), .rx_word(b_rw), .rx_k(b_rk), .rx_kerr(b_rkerr),
    .link_up(b_up), .crc_errors(b_crc), .busy_naks(b_busy), .retransmits(b_retx),
    .timeouts(b_to), .kchar_errors(b_kerr));

  always #5 clk = ~clk;

  // ---------------- cable model ----------------
  word_t ab_w [DELAY], ba_w [DELAY];
  logic  ab_k [DELAY], ba_k [DELAY], ab_e [DELAY];
  logic  hit_data = 0, drop_ack = 0, hit_kflag = 0;   // one-shot damage requests
  always @(posedge clk) begin
    word_t w;
    logic  k, e;
    w = a_tw; k = a_tk; e = 0;
    if (hit_data && !k && ab_w[0] != 0) begin w = w ^ 16'h0100; hit_data <= 0; end
    if (hit_kflag && k) begin e = 1; hit_kflag <= 0; end
    ab_w[0] <= w; ab_k[0] <= k; ab_e[0] <= e;
    w = b_tw; k = b_tk;
    if (drop_ack && k && w == W_ACK) begin w = W_IDLE; drop_ack <= 0; end
    ba_w[0] <= w; ba_k[0] <= k;
    for (int i = 1; i < DELAY; i++) begin
      ab_w[i] <= ab_w[i-1]; ab_k[i] <= ab_k[i-1]; ab_e[i] <= ab_e[i-1];
      ba_w[i] <= ba_w[i-1]; ba_k[i] <= ba_k[i-1];
    end
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) begin
        ab_w[i] <= W_IDLE; ab_k[i] <= 1; ab_e[i] <= 0; ba_w[i] <= W_IDLE; ba_k[i] <= 1;
      end
    end
  end
  assign b_rw = ab_w[DELAY-1];
  assign b_rk = ab_k[DELAY-1];
  assign b_rkerr = ab_e[DELAY-1];
  assign a_rw = ba_w[DELAY-1];
  assign a_rk = ba_k[DELAY-1];
  assign a_rkerr = 1'b0;

  // ---------------- scoreboards ----------------
  packet_t exp_ab [$], exp_ba [$];
  packet_t last_ab;
  int got_ab = 0, got_ba = 0, dup_ab = 0;
  longint cyc = 0;
  longint deliver_cyc;

  always @(posedge clk) cyc = longint'($time / 10);

  function automatic logic same(packet_t x, packet_t y);
    if (x.hdr != y.hdr || x.len != y.len) return 0;
    for (int i = 0; i < int'(x.len); i++) if (x.data[i] != y.data[i]) return 0;
    return 1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (b_rx_valid) begin
      deliver_cyc = longint'($time / 10);
      checks++;
      if (exp_ab.size() > 0 && same(b_rx_pkt, exp_ab[0])) begin
        last_ab = exp_ab.pop_front();
        got_ab++;
      end else if (got_ab > 0 && same(b_rx_pkt, last_ab)) begin
        dup_ab++;
      end else begin
        failures++;
        $display("A->B unexpected packet id %0d", b_rx_pkt.hdr.id);
      end
    end
    if (a_rx_valid) begin
      checks++;
      if (exp_ba.size() > 0 && same(a_rx_pkt, exp_ba[0])) begin
        void'(exp_ba.pop_front());
        got_ba++;
      end else begin
        failures++;
        $display("B->A unexpected packet id %0d", a_rx_pkt.hdr.id);
      end
    end
  end

  function automatic packet_t rand_pkt(int len);
    packet_t p;
    p = '0;
    p.hdr = 16'($urandom);
    p.len = LEN_W'(len);
    for (int i = 0; i < len; i++) p.data[i] = 16'($urandom);
    return p;
  endfunction

  // hand a packet to A: inputs change at the falling edge only
  task automatic send_a(packet_t p);
    @(negedge clk);
    a_tx_pkt = p; a_tx_valid = 1;
    exp_ab.push_back(p);
    while (!a_tx_ready) @(negedge clk);
    @(negedge clk);
    a_tx_valid = 0;
  endtask

  // B keeps sending random packets the whole time (full duplex)
  int b_sent = 0;
  logic b_run = 0;
  logic b_acc = 0;   // B took its packet at the last rising edge
  always_ff @(posedge clk) b_acc <= b_tx_valid && b_tx_ready;
  always @(negedge clk) begin
    packet_t p;
    if (b_tx_valid && !b_acc) begin
      // waiting for the hand-over
    end else begin
      if (b_tx_valid) b_sent++;
      b_tx_valid = 0;
      if (b_run) begin
        p = rand_pkt($urandom % 33);
        b_tx_pkt = p;
        b_tx_valid = 1;
        exp_ba.push_back(p);
      end
    end
  end

  task automatic wait_drained();
    int n;
    n = 0;
    while ((exp_ab.size() > 0 || !a_tx_ready) && n < 5000) begin @(posedge clk); n++; end
    repeat (10) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t0, lat, t_start, t_end;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);

    // 1. latency of a zero-payload packet on an idle link
    a_tx_pkt = rand_pkt(0); a_tx_valid = 1; exp_ab.push_back(a_tx_pkt);
    @(posedge clk); t0 = longint'($time / 10);
    @(negedge clk) a_tx_valid = 0;
    wait_drained();
    lat = deliver_cyc - t0;
    // SYNC, SOF, HDR, EOF, CRC_HI, CRC_LO leave A in consecutive cycles
    // after the hand-over edge; the last one reaches B after DELAY cycles
    checks++;
    if (lat != longint'(6) + longint'(DELAY)) begin
      failures++;
      $display("zero-payload latency %0d cycles, expected %0d", lat, 6 + DELAY);
    end
    $display("zero-payload latency: %0d cycles", lat);
    checks++;
    if (!b_up) failures++;

    // 2. clean traffic both ways; A's rate with full packets
    b_run = 1;
    t_start = longint'($time / 10);
    for (int i = 0; i < 40; i++) send_a(rand_pkt(32));
    wait_drained();
    t_end = longint'($time / 10);
    $display("40 full packets A->B in %0d cycles (%0d per packet)", t_end - t_start, (t_end - t_start) / 40);
    // frame of 38 words plus an acknowledgement round trip of about
    // 2*DELAY + 4 cycles; ACKs slipped in by B's own traffic add a cycle or two
    checks++;
    if ((t_end - t_start) / 40 > 38 + 2 * DELAY + 8) failures++;
    checks++;
    if (got_ab != 41 || a_retx != 0 || b_crc != 0) begin
      failures++;
      $display("clean run: got %0d retx %0d crc %0d", got_ab, a_retx, b_crc);
    end

    // 3. damaged data word -> CRC error -> NAK -> repeat
    hit_data = 1;
    send_a(rand_pkt(10));
    wait_drained();
    checks++;
    if (b_crc != 1 || a_retx != 1 || got_ab != 42) begin
      failures++;
      $display("crc case: crc %0d retx %0d got %0d", b_crc, a_retx, got_ab);
    end

    // 4. lost ACK -> timeout -> repeat -> one copy arrives twice
    drop_ack = 1;
    send_a(rand_pkt(5));
    wait_drained();
    repeat (TIMEOUT + 60) @(posedge clk);
    checks++;
    if (a_to != 1 || dup_ab != 1 || got_ab != 43) begin
      failures++;
      $display("ack loss: timeouts %0d dups %0d got %0d", a_to, dup_ab, got_ab);
    end

    // 5. receiver without room -> busy NAKs -> delivered once room appears
    b_rx_ready = 0;
    send_a(rand_pkt(3));
    repeat (150) @(posedge clk);
    b_rx_ready = 1;
    wait_drained();
    checks++;
    if (b_busy == 0 || got_ab != 44) begin
      failures++;
      $display("busy: naks %0d got %0d", b_busy, got_ab);
    end

    // 6. damaged K flag is counted and recovered from
    hit_kflag = 1;
    for (int i = 0; i < 3; i++) send_a(rand_pkt(8));
    wait_drained();
    repeat (TIMEOUT + 60) @(posedge clk);
    checks++;
    if (b_kerr == 0 || got_ab != 47) begin
      failures++;
      $display("kflag: kerr %0d got %0d", b_kerr, got_ab);
    end

    // stop B and let it drain
    b_run = 0;
    repeat (300) @(posedge clk);
    checks++;
    if (exp_ba.size() != 0 || got_ba < 20) begin
      failures++;
      $display("B->A: got %0d, %0d left", got_ba, exp_ba.size());
    end
    checks++;
    if (exp_ab.size() != 0) failures++;
    $display("A->B %0d, B->A %0d, dups %0d, retx %0d, crc %0d, busy %0d, to %0d",
             got_ab, got_ba, dup_ab, a_retx, b_crc, b_busy, a_to);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
