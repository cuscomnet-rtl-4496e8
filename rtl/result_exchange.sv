// Partial-result exchange for the N-body application over CusComNet.
//
// In the N-body simulation every node computes the new vectors of its own
// share of the particles; before the next iteration every node needs the
// vectors of all particles. The published design replaces the host-side MPI
// exchange by extra circuitry on the FPGA that sends the local partial
// results to all other nodes over the inter-FPGA network and records the
// results arriving from them, without any broadcast: the same local results
// are sent separately to each of the other nodes.
//
// How it works. Sender: on start, the block reads the local results, a
// packet's worth of particle records at a time, from a memory with one
// cycle read latency, and hands that packet to the network once for every
// other node, then moves on to the next records. Payload word 0 carries the
// index of the first record in the packet, the rest are the records.
// Receiver: every packet delivered by the network is unpacked and its
// records are written one word per cycle into the memory of all particles,
// at ((source node * PARTS_PER_NODE) + record index) * REC_WORDS + word.
// The iteration is done when all local packets have been accepted by the
// network and (NODES - 1) * PARTS_PER_NODE records have been recorded; done
// pulses for one cycle and the received count is reduced by that number, so
// records of the next iteration that arrive early are not lost.
//
// Own choices: a record is REC_WORDS 16-bit words (default 12: position and
// velocity, three 32-bit components each), as many whole records as fit in
// one packet behind the index word, priority 0, type data.
//
// Interface: start is a pulse (ignored while busy); loc_rd_* is a read
// port into the local results (data one cycle after loc_rd_en); glb_wr_*
// is a write port into the memory of all particles; tx_* and rx_* connect to
// the user side of cuscomnet_node.
module result_exchange
  import cuscomnet_pkg::*;
#(
  parameter int unsigned NODES          = NUM_NODES,
  parameter int unsigned PARTS_PER_NODE = 5120,   // 81920 particles / 16 nodes
  parameter int unsigned REC_WORDS      = 12,
  localparam int unsigned LOC_W = $clog2(PARTS_PER_NODE * REC_WORDS),
  localparam int unsigned GLB_W = $clog2(NODES * PARTS_PER_NODE * REC_WORDS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NODE_W-1:0]    node_id,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  // local results
  output logic                 loc_rd_en,
  output logic [LOC_W-1:0]     loc_rd_addr,
  input  word_t                loc_rd_data,
  // all particles
  output logic                 glb_wr_en,
  output logic [GLB_W-1:0]     glb_wr_addr,
  output word_t                glb_wr_data,
  // network, send
  output logic                 tx_valid,
  input  logic                 tx_ready,
  output logic [NODE_W-1:0]    tx_dest,
  output logic [PRIO_W-1:0]    tx_prio,
  output pkt_type_e            tx_type,
  output logic [LEN_W-1:0]     tx_len,
  output logic [MAX_WORDS-1:0][WORD_W-1:0] tx_data,
  // network, receive
  input  logic                 rx_valid,
  output logic                 rx_ready,
  input  packet_t              rx_pkt,
  // progress
  output logic [31:0]          pkts_sent,
  output logic [31:0]          recs_received
);

  localparam int unsigned RECS_PER_PKT = (MAX_WORDS - 1) / REC_WORDS;
  localparam int unsigned IDX_W        = $clog2(PARTS_PER_NODE + 1);
  localparam int unsigned W_W          = $clog2(MAX_WORDS + 1);
  localparam int unsigned EXPECTED     = (NODES - 1) * PARTS_PER_NODE;

  // ---------------- sender ----------------
  typedef enum logic [1:0] {S_IDLE, S_FILL, S_SEND, S_NEXT} s_state_e;
  s_state_e           ss;
  logic [IDX_W-1:0]   base;         // first record of the current packet
  logic [IDX_W-1:0]   nrec;         // records in the current packet
  logic [W_W-1:0]     fill_cnt;     // words requested so far
  logic [W_W-1:0]     fill_words;   // words to read for this packet
  logic               rd_pend;      // a read is returning this cycle
  logic [W_W-1:0]     rd_slot;
  logic [NODE_W-1:0]  dest;
  logic [MAX_WORDS-1:0][WORD_W-1:0] pbuf;
  logic               send_done;    // all local packets handed over
  logic               sending;

  always_comb begin
    nrec = ((PARTS_PER_NODE - int'(base)) < RECS_PER_PKT) ? IDX_W'(PARTS_PER_NODE - int'(base))
                                                    : IDX_W'(RECS_PER_PKT);
  end

  assign fill_words  = W_W'(nrec * REC_WORDS);
  assign loc_rd_en   = (ss == S_FILL) && (fill_cnt < fill_words);
  assign loc_rd_addr = LOC_W'(base * REC_WORDS + fill_cnt);

  assign tx_valid = (ss == S_SEND);
  assign tx_dest  = dest;
  assign tx_prio  = '0;
  assign tx_type  = PT_DATA;
  assign tx_len   = LEN_W'(1 + nrec * REC_WORDS);
  always_comb begin
    tx_data    = pbuf;
    tx_data[0] = WORD_W'(base);
  end

  // next destination after d, skipping this node
  function automatic logic [NODE_W-1:0] next_dest(input logic [NODE_W-1:0] d);
    logic [NODE_W-1:0] n;
    n = (int'(d) + 1 >= NODES) ? '0 : d + 1'b1;
    if (n == node_id) n = (int'(n) + 1 >= NODES) ? '0 : n + 1'b1;
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ss        <= S_IDLE;
      base      <= '0;
      fill_cnt  <= '0;
      rd_pend   <= 1'b0;
      rd_slot   <= '0;
      dest      <= '0;
      pbuf      <= '0;
      send_done <= 1'b0;
      sending   <= 1'b0;
      pkts_sent <= '0;
    end else begin
      rd_pend <= loc_rd_en;
      rd_slot <= fill_cnt + 1'b1;        // word 0 of the payload is the index
      if (rd_pend) pbuf[rd_slot[LEN_W-1:0]] <= loc_rd_data;
      unique case (ss)
        S_IDLE: if (start && !busy) begin
                  ss        <= S_FILL;
                  base      <= '0;
                  fill_cnt  <= '0;
                  send_done <= 1'b0;
                  sending   <= 1'b1;
                end
        S_FILL: begin
                  if (fill_cnt < fill_words) fill_cnt <= fill_cnt + 1'b1;
                  else if (!rd_pend) begin
                    ss   <= S_SEND;
                    dest <= next_dest(node_id);
                  end
                end
        S_SEND: if (tx_ready) begin
                  pkts_sent <= pkts_sent + 1'b1;
                  if (next_dest(dest) == next_dest(node_id)) ss <= S_NEXT;
                  else dest <= next_dest(dest);
                end
        S_NEXT: begin
                  if (int'(base) + int'(nrec) >= PARTS_PER_NODE) begin
                    ss        <= S_IDLE;
                    send_done <= 1'b1;
                  end else begin
                    base     <= base + nrec;
                    fill_cnt <= '0;
                    ss       <= S_FILL;
                  end
                end
        default: ss <= S_IDLE;
      endcase
      if (done) begin
        sending   <= 1'b0;
        send_done <= 1'b0;
      end
    end
  end

  // ---------------- receiver ----------------
  packet_t          rbuf;
  logic             unpacking;
  logic [W_W-1:0]   rw;            // next payload word to write (1..len-1)
  logic [GLB_W-1:0] rec_addr;      // global word address of payload word 1
  logic [31:0]      rec_cnt;
  logic [31:0]      word_cnt;      // words of the current record written

  assign rx_ready = !unpacking;
  assign glb_wr_en   = unpacking;
  assign glb_wr_addr = rec_addr + GLB_W'(rw - 1'b1);
  assign glb_wr_data = rbuf.data[rw[LEN_W-1:0]];
  assign recs_received = rec_cnt;

  assign busy = sending;
  assign done = sending && send_done && (rec_cnt >= EXPECTED) && !unpacking;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbuf      <= '0;
      unpacking <= 1'b0;
      rw        <= '0;
      rec_addr  <= '0;
      rec_cnt   <= '0;
      word_cnt  <= '0;
    end else begin
      if (rx_valid && rx_ready) begin
        rbuf      <= rx_pkt;
        unpacking <= rx_pkt.len > 1;
        rw        <= W_W'(1);
        word_cnt  <= '0;
        rec_addr  <= GLB_W'((int'(rx_pkt.hdr.src) * PARTS_PER_NODE + int'(rx_pkt.data[0])) * REC_WORDS);
      end else if (unpacking) begin
        word_cnt <= (word_cnt == REC_WORDS - 1) ? '0 : word_cnt + 1'b1;
        if (rw + 1'b1 == W_W'(rbuf.len)) unpacking <= 1'b0;
        rw <= rw + 1'b1;
      end
      // one more record at the last word of each record; done hands the
      // records of this iteration over
      rec_cnt <= rec_cnt + ((unpacking && word_cnt == REC_WORDS - 1) ? 32'd1 : 32'd0)
                         - (done ? 32'(EXPECTED) : 32'd0);
    end
  end

endmodule
