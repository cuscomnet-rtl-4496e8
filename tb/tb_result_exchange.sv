// Testbench for result_exchange as node 2 of a 4-node cluster, 5 particles
// per node, 12-word records (2 records per packet). The testbench plays the
// network: it takes packets at random moments, checks that every local
// packet goes to each of the 3 other nodes in turn with the right index and
// records, and delivers the packets of the other nodes in a shuffled order.
// Every word written into the memory of all particles is compared with the
// value the sending node holds, every word must be written, and done must
// pulse once per iteration, only after both sending and receiving are
// complete. Two iterations are run, the second with some remote packets
// arriving before start.
module tb_result_exchange;
  import cuscomnet_pkg::*;
  localparam int NODES = 4, PARTS = 5, RW = 12;
  localparam int LOC_W = $clog2(PARTS * RW), GLB_W = $clog2(NODES * PARTS * RW);
  localparam logic [NODE_W-1:0] ME = 4'd2;
  localparam int RPP = (MAX_WORDS - 1) / RW;
  localparam int PKTS = (PARTS + RPP - 1) / RPP;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic loc_rd_en; logic [LOC_W-1:0] loc_rd_addr; word_t loc_rd_data;
  logic glb_wr_en; logic [GLB_W-1:0] glb_wr_addr; word_t glb_wr_data;
  logic tx_valid, tx_ready = 0;
  logic [NODE_W-1:0] tx_dest; logic [PRIO_W-1:0] tx_prio; pkt_type_e tx_type;
  logic [LEN_W-1:0] tx_len; logic [MAX_WORDS-1:0][WORD_W-1:0] tx_data;
  logic rx_valid = 0, rx_ready; packet_t rx_pkt = '0;
  logic [31:0] pkts_sent, recs_received;
  int checks = 0, failures = 0;
  int iter = 0;

  result_exchange #(.NODES(NODES), .PARTS_PER_NODE(PARTS), .REC_WORDS(RW)) dut (.*, .node_id(ME));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // value of word w of the local results of node n in iteration it
  function automatic word_t val(int it, int n, int w);
    return word_t'(it * 4099 + n * 1237 + w * 31 + 7);
  endfunction

  // local result memory: one cycle read latency
  always_ff @(posedge clk) if (loc_rd_en) loc_rd_data <= val(iter, ME, int'(loc_rd_addr));

  // memory of all particles, with a write count per word
  int written [NODES * PARTS * RW];
  always @(posedge clk) if (rst_n && glb_wr_en) begin
    int a, n, w;
    a = int'(glb_wr_addr);
    n = a / (PARTS * RW); w = a % (PARTS * RW);
    checks++;
    if (n == ME || n >= NODES || glb_wr_data != val(iter, n, w)) begin
      failures++;
      $display("bad write addr %0d data %h", a, glb_wr_data);
    end
    written[a]++;
  end

  // network send side: random acceptance, content check
  int sent_count = 0, exp_dest;
  always @(negedge clk) tx_ready = ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n && tx_valid && tx_ready) begin
    int pk, base, nrec;
    pk = (sent_count % (PKTS * (NODES - 1))) / (NODES - 1);
    base = pk * RPP;
    nrec = (PARTS - base < RPP) ? PARTS - base : RPP;
    exp_dest = (ME + 1 + sent_count % (NODES - 1)) % NODES;
    checks++;
    if (int'(tx_dest) != exp_dest || int'(tx_len) != 1 + nrec * RW || int'(tx_data[0]) != base) begin
      failures++;
      $display("packet %0d: dest %0d len %0d base %0d", sent_count, tx_dest, tx_len, tx_data[0]);
    end
    for (int i = 0; i < nrec * RW; i++) if (tx_data[1 + i] != val(iter, ME, base * RW + i)) begin
      failures++;
      $display("packet %0d word %0d wrong", sent_count, i);
      break;
    end
    sent_count++;
  end

  // packets of the other nodes for one iteration, shuffled
  packet_t inq [$];
  task automatic make_remote(int it);
    packet_t p;
    for (int n = 0; n < NODES; n++) if (n != ME)
      for (int k = 0; k < PKTS; k++) begin
        int base, nrec;
        base = k * RPP;
        nrec = (PARTS - base < RPP) ? PARTS - base : RPP;
        p = '0;
        p.hdr.src = NODE_W'(n); p.hdr.dest = ME;
        p.len = LEN_W'(1 + nrec * RW);
        p.data[0] = WORD_W'(base);
        for (int i = 0; i < nrec * RW; i++) p.data[1 + i] = val(it, n, base * RW + i);
        inq.push_back(p);
      end
    inq.shuffle();
  endtask

  task automatic deliver(int count);
    for (int i = 0; i < count && inq.size() > 0; i++) begin
      @(negedge clk);
      while (!rx_ready) @(negedge clk);
      rx_pkt = inq.pop_front(); rx_valid = 1;
      @(negedge clk);
      rx_valid = 0;
      repeat ($urandom % 4) @(negedge clk);
    end
  endtask

  int dones = 0;
  logic sent_all_at_done;
  always @(posedge clk) if (rst_n && done) begin
    dones++;
    checks++;
    if (sent_count != (iter + 1) * PKTS * (NODES - 1) || int'(recs_received) < (NODES - 1) * PARTS) begin
      failures++;
      $display("done too early: sent %0d received %0d", sent_count, recs_received);
    end
  end

  initial begin
    foreach (written[i]) written[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 2; it++) begin
      iter = it;
      make_remote(it);
      if (it == 1) deliver(2);          // early arrivals, before start
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      checks++;
      if (!busy) failures++;
      deliver(1000);
      while (busy) @(negedge clk);
      repeat (5) @(negedge clk);
      checks++;
      if (dones != it + 1) begin
        failures++;
        $display("iteration %0d: %0d done pulses", it, dones);
      end
      foreach (written[i]) begin
        int n;
        n = i / (PARTS * RW);
        checks++;
        if (written[i] != ((n == ME) ? 0 : it + 1)) begin
          failures++;
          $display("word %0d written %0d times", i, written[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
