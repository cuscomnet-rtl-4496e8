// Routing module of the CusComNet packet switch.
//
// Decides, for one waiting packet, which switch output it leaves by: the
// local node (user logic) or one of the four torus links. The published
// router sends packets along the shortest path in the 2D torus, from the
// relative column and row of the local and the destination node; it is a
// separate module so that other topologies can be swapped in.
//
// How it works: node n sits at column n % COLS and row n / COLS (node 0 top
// left, numbered row by row). The column distance is closed first, then the
// row distance (dimension order, an own choice), each in the direction that
// is shorter around its ring. When both directions are equally long
// (half a ring) the packet goes East or South (own choice). North means
// row - 1, East column + 1, both with wrap-around.
//
// Interface: purely combinational; out_port is a switch port number
// (0 local, 1 North, 2 East, 3 West, 4 South) valid in the same cycle as
// local_id and dest_id.
module torus_router
  import cuscomnet_pkg::*;
#(
  parameter int unsigned COLS = TORUS_COLS,
  parameter int unsigned ROWS = TORUS_ROWS
) (
  input  logic [NODE_W-1:0] local_id,
  input  logic [NODE_W-1:0] dest_id,
  output logic [PORT_W-1:0] out_port
);

  int unsigned lc, lr, dc, dr;   // column / row of local and destination
  int unsigned dx, dy;           // forward distances around each ring

  always_comb begin
    lc = int'(local_id) % COLS;
    lr = int'(local_id) / COLS;
    dc = int'(dest_id) % COLS;
    dr = int'(dest_id) / COLS;
    dx = (dc + COLS - lc) % COLS;
    dy = (dr + ROWS - lr) % ROWS;
    if (dx != 0)
      out_port = (2 * dx <= COLS) ? PORT_W'(PORT_EAST) : PORT_W'(PORT_WEST);
    else if (dy != 0)
      out_port = (2 * dy <= ROWS) ? PORT_W'(PORT_SOUTH) : PORT_W'(PORT_NORTH);
    else
      out_port = PORT_W'(PORT_LOCAL);
  end

endmodule
