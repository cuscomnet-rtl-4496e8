// Synchronous first-in first-out buffer of whole packets.
//
// One entry holds one packet (header, length and the full maximum payload),
// so the buffer depth is counted in packets, as the network's queue size is.
// Used by prio_queue, one per priority level.
//
// How it works: a memory array with a write and a read pointer and an
// occupancy count. The head entry is read combinationally (the array can map
// to distributed RAM with asynchronous read). A push into a full buffer or a
// pop from an empty one is ignored; the assertions flag both as misuse.
//
// Interface: push/pop act on the clock edge and may both happen in one
// cycle. head is valid whenever empty is low. Reset empties the buffer.
module pkt_fifo
  import cuscomnet_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  packet_t din,
  input  logic    pop,
  output packet_t head,
  output logic    empty,
  output logic    full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  packet_t           mem [DEPTH];
  logic [AW-1:0]     wp, rp;
  logic [AW:0]       cnt;
  logic              do_push, do_pop;

  assign empty   = (cnt == 0);
  assign full    = (cnt == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign head    = mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (do_push) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop)  rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));

endmodule
