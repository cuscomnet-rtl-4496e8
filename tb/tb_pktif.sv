// Testbench for pktif, the network layer, as node 5 of the 4x4 torus
// (column 1, row 1) with queues of 4 packets per priority level.
// Random packets enter from the user and from the four links while the link
// outputs and the user take packets at random moments. Every packet must
// leave by the port a separately written shortest-path rule gives, intact,
// with source and identifier filled in for user packets. Directed parts
// check that a repeated packet (same source and identifier) is delivered
// only once, that urgent packets overtake waiting ones, that identifiers
// count per destination, that two inputs contending for one output are both
// served, and that a full queue holds packets back without losing any.
module tb_pktif;
  import cuscomnet_pkg::*;
  localparam logic [NODE_W-1:0] ME = 4'd5;

  logic clk = 0, rst_n = 0;
  logic                  usr_tx_valid = 0, usr_tx_ready;
  logic [NODE_W-1:0]     usr_tx_dest = '0;
  logic [PRIO_W-1:0]     usr_tx_prio = '0;
  pkt_type_e             usr_tx_type = PT_DATA;
  logic [LEN_W-1:0]      usr_tx_len = '0;
  logic [MAX_WORDS-1:0][WORD_W-1:0] usr_tx_data = '0;
  logic                  usr_rx_valid, usr_rx_ready = 1;
  packet_t               usr_rx_pkt;
  logic [NUM_LANES-1:0]  lane_rx_valid = '0, lane_rx_ready;
  packet_t               lane_rx_pkt [NUM_LANES];
  logic [NUM_LANES-1:0]  lane_tx_valid, lane_tx_ready = '1;
  packet_t               lane_tx_pkt [NUM_LANES];
  logic [15:0]           dup_drops, routed_pkts;
  int checks = 0, failures = 0;

  pktif #(.QUEUE_DEPTH(4)) dut (.clk, .rst_n, .node_id(ME), .*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output port of a destination, seen from node 5
  function automatic int exp_port(logic [NODE_W-1:0] d);
    int dcol, drow;
    dcol = (int'(d) % 4 - int'(ME) % 4 + 4) % 4;
    drow = (int'(d) / 4 - int'(ME) / 4 + 4) % 4;
    if (dcol == 1 || dcol == 2) return 2;      // East
    if (dcol == 3) return 3;                   // West
    if (drow == 1 || drow == 2) return 4;      // South
    if (drow == 3) return 1;                   // North
    return 0;
  endfunction

  // ---------------- scoreboard: expected packets per output port ----------------
  packet_t exp_q [5][$];
  int delivered [5];
  int unexpected = 0;

  function automatic logic same(packet_t x, packet_t y);
    if (x.hdr != y.hdr || x.len != y.len) return 0;
    for (int i = 0; i < int'(x.len); i++) if (x.data[i] != y.data[i]) return 0;
    return 1;
  endfunction

  task automatic take(int port, packet_t p);
    int idx;
    idx = -1;
    foreach (exp_q[port][k]) if (idx < 0 && same(exp_q[port][k], p)) idx = k;
    checks++;
    if (idx < 0) begin
      failures++;
      $display("port %0d: unexpected packet dest %0d src %0d id %0d", port, p.hdr.dest, p.hdr.src, p.hdr.id);
    end else begin
      exp_q[port].delete(idx);
      delivered[port]++;
    end
  endtask

  // sample outputs at the rising edge with the values ahead of the edge
  logic [NUM_LANES-1:0] tx_fire;
  logic rx_fire;
  packet_t tx_seen [NUM_LANES];
  packet_t rx_seen;
  always_ff @(posedge clk) begin
    tx_fire <= lane_tx_valid & lane_tx_ready;
    for (int l = 0; l < NUM_LANES; l++) tx_seen[l] <= lane_tx_pkt[l];
    rx_fire <= usr_rx_valid && usr_rx_ready;
    rx_seen <= usr_rx_pkt;
  end
  always @(negedge clk) if (rst_n) begin
    for (int l = 0; l < NUM_LANES; l++) if (tx_fire[l]) take(l + 1, tx_seen[l]);
    if (rx_fire) take(0, rx_seen);
  end

  // ---------------- stimulus helpers ----------------
  int unsigned id_model [NUM_NODES];
  int unsigned in_id [NUM_NODES];

  function automatic packet_t rand_pkt(logic [NODE_W-1:0] src, logic [NODE_W-1:0] dest, int prio);
    packet_t p;
    p = '0;
    p.hdr.dest = dest;
    p.hdr.src = src;
    p.hdr.ptype = PT_DATA;
    p.hdr.prio = PRIO_W'(prio);
    // packets for this node carry consecutive identifiers per source, as
    // the sending nodes would give them
    if (dest == ME) begin
      p.hdr.id = ID_W'(in_id[src]);
      in_id[src]++;
    end else p.hdr.id = ID_W'($urandom);
    p.len = LEN_W'($urandom % 33);
    for (int i = 0; i < int'(p.len); i++) p.data[i] = 16'($urandom);
    return p;
  endfunction

  // user send; waits for acceptance (inputs change at falling edges)
  task automatic user_send(logic [NODE_W-1:0] dest, int prio);
    packet_t p;
    p = rand_pkt(ME, dest, prio);
    p.hdr.id = ID_W'(id_model[dest]);
    id_model[dest]++;
    usr_tx_dest = dest; usr_tx_prio = p.hdr.prio; usr_tx_type = PT_DATA;
    usr_tx_len = p.len; usr_tx_data = p.data; usr_tx_valid = 1;
    exp_q[exp_port(dest)].push_back(p);
    while (!usr_tx_ready) @(negedge clk);
    @(negedge clk);
    usr_tx_valid = 0;
  endtask

  // one-cycle packet offer from a link (the data link only offers when ready)
  task automatic lane_offer(int l, packet_t p, logic expect_delivery = 1);
    while (!lane_rx_ready[l]) @(negedge clk);
    lane_rx_pkt[l] = p; lane_rx_valid[l] = 1;
    if (expect_delivery) exp_q[exp_port(p.hdr.dest)].push_back(p);
    @(negedge clk);
    lane_rx_valid[l] = 0;
  endtask

  // a source other than this node
  function automatic logic [NODE_W-1:0] other();
    return NODE_W'((int'(ME) + 1 + $urandom % (NUM_NODES - 1)) % NUM_NODES);
  endfunction

  function automatic int pending();
    int n;
    n = 0;
    for (int o = 0; o < 5; o++) n += exp_q[o].size();
    return n;
  endfunction

  task automatic drain();
    int n;
    n = 0;
    lane_tx_ready = '1; usr_rx_ready = 1;
    while (pending() > 0 && n < 2000) begin @(negedge clk); n++; end
    repeat (3) @(negedge clk);
  endtask

  // random back-pressure, switched on during the random phase
  logic rand_bp = 0;
  always @(negedge clk) if (rand_bp) begin
    lane_tx_ready = 4'($urandom);
    usr_rx_ready = 1'($urandom);
  end

  initial begin
    for (int n = 0; n < NUM_NODES; n++) begin id_model[n] = 0; in_id[n] = 0; end
    for (int l = 0; l < NUM_LANES; l++) lane_rx_pkt[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 1. every destination from the user, one at a time ----
    for (int d = 0; d < NUM_NODES; d++) user_send(NODE_W'(d), 0);
    drain();
    checks++;
    if (pending() != 0) failures++;

    // ---- 2. identifiers count per destination ----
    for (int i = 0; i < 3; i++) user_send(4'd7, 0);
    user_send(4'd2, 0);
    drain();
    checks++;
    if (id_model[7] != 4 || id_model[2] != 2) failures++;

    // ---- 3. duplicate rejection: the same packet twice from a link ----
    begin
      packet_t p;
      int n_before;
      n_before = int'(dup_drops);
      p = rand_pkt(4'd9, ME, 0);
      lane_offer(3, p, 1);
      lane_offer(3, p, 0);   // repeat: must be dropped
      drain();
      repeat (5) @(negedge clk);
      checks++;
      if (int'(dup_drops) != n_before + 1) begin
        failures++;
        $display("dup_drops %0d", dup_drops);
      end
    end

    // ---- 4. priority: hold the East link, queue low then high ----
    begin
      packet_t lo, hi;
      lane_tx_ready[1] = 0;
      lo = rand_pkt(4'd4, 4'd6, 0);
      hi = rand_pkt(4'd4, 4'd6, 1);
      lane_offer(2, lo);   // arrives from West, goes East
      lane_offer(2, hi);
      repeat (3) @(negedge clk);
      checks++;
      if (!(lane_tx_valid[1] && same(lane_tx_pkt[1], hi))) begin
        failures++;
        $display("urgent packet not at the head of the East queue");
      end
      drain();
    end

    // ---- 5. contention: two links want the local output in one cycle ----
    begin
      packet_t a, b;
      int n_before;
      n_before = delivered[0];
      a = rand_pkt(4'd1, ME, 0);
      b = rand_pkt(4'd13, ME, 0);
      lane_rx_pkt[0] = a; lane_rx_pkt[3] = b;
      lane_rx_valid[0] = 1; lane_rx_valid[3] = 1;
      exp_q[0].push_back(a); exp_q[0].push_back(b);
      @(negedge clk);
      lane_rx_valid = '0;
      drain();
      checks++;
      if (delivered[0] != n_before + 2) failures++;
    end

    // ---- 6. full queue: 12 packets for North with the link stopped ----
    begin
      lane_tx_ready[0] = 0;
      fork
        begin for (int i = 0; i < 6; i++) user_send(4'd1, i % 2); end
        begin for (int i = 0; i < 6; i++) lane_offer(3, rand_pkt(4'd7, 4'd1, i % 2)); end
      join_none
      repeat (60) @(negedge clk);
      checks++;
      // 8 fit in the queue (4 per level); the rest wait in the inputs
      if (!(dut.q_full[1] == 2'b11)) begin
        failures++;
        $display("North queue not full: %b", dut.q_full[1]);
      end
      lane_tx_ready[0] = 1;
      wait fork;
      drain();
      checks++;
      if (pending() != 0) failures++;
    end

    // ---- 7. random traffic from all inputs with random back-pressure ----
    rand_bp = 1;
    fork
      begin for (int i = 0; i < 150; i++) user_send(NODE_W'($urandom), $urandom % 2); end
      begin for (int i = 0; i < 100; i++) lane_offer(0, rand_pkt(other(), NODE_W'($urandom), $urandom % 2)); end
      begin for (int i = 0; i < 100; i++) lane_offer(1, rand_pkt(other(), NODE_W'($urandom), $urandom % 2)); end
      begin for (int i = 0; i < 100; i++) lane_offer(2, rand_pkt(other(), NODE_W'($urandom), $urandom % 2)); end
      begin for (int i = 0; i < 100; i++) lane_offer(3, rand_pkt(other(), NODE_W'($urandom), $urandom % 2)); end
    join
    rand_bp = 0;
    drain();
    checks++;
    if (pending() != 0) begin
      failures++;
      $display("%0d packets never left", pending());
    end
    $display("delivered per port: %0d %0d %0d %0d %0d, routed %0d, dups %0d",
             delivered[0], delivered[1], delivered[2], delivered[3], delivered[4], routed_pkts, dup_drops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
