// Prioritised packet queue of one switch output.
//
// In the published design every queue is made of one separate buffer per
// priority level, with the number of levels and the depth of each buffer
// set at build time; packets are stored and taken out according to their
// priority. With one level the queue is a single large buffer.
//
// How it works: LEVELS packet FIFOs, level l holding LEVEL_DEPTH[l]
// packets (DEPTH for every level unless LEVEL_DEPTH is given). A packet is
// written into the FIFO of its priority field. The head of the queue is the
// head of the non-empty FIFO with the highest priority number (own choice:
// a larger number is more urgent), so urgent packets overtake waiting ones
// and packets of one level stay in order.
//
// Interface: full[l] tells whether a packet of priority l can be written;
// push is ignored for a full level. valid/head show the packet that pop
// removes on the next edge. Reset empties all levels.
module prio_queue
  import cuscomnet_pkg::*;
#(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned LEVELS = PRIO_LEVELS,
  // depth of each level, entry l for priority l; all DEPTH unless set
  parameter logic [LEVELS-1:0][15:0] LEVEL_DEPTH = {LEVELS{16'(DEPTH)}}
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  packet_t           din,
  output logic [LEVELS-1:0] full,
  output logic              valid,
  output packet_t           head,
  input  logic              pop
);

  logic [LEVELS-1:0] l_empty, l_full, l_push, l_pop;
  packet_t           l_head [LEVELS];
  logic [PRIO_W-1:0] sel;

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    assign l_push[l] = push && (int'(din.hdr.prio) == l);
    assign l_pop[l]  = pop && valid && (int'(sel) == l);
    pkt_fifo #(.DEPTH(int'(LEVEL_DEPTH[l]))) u_fifo (
      .clk, .rst_n,
      .push(l_push[l]), .din(din),
      .pop(l_pop[l]), .head(l_head[l]),
      .empty(l_empty[l]), .full(l_full[l])
    );
  end

  assign full  = l_full;
  assign valid = !(&l_empty);

  always_comb begin
    sel = '0;
    for (int l = 0; l < LEVELS; l++)
      if (!l_empty[l]) sel = PRIO_W'(l);
    head = l_head[sel];
  end

endmodule
