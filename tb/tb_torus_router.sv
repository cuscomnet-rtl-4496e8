// Testbench for torus_router: for every pair of nodes of the 4x4 torus the
// chosen output is compared with a reference that walks the torus: it must
// be local only for the node itself, and every hop must shorten the
// remaining wrap-around distance, columns first. The walk from every source
// to every destination must arrive within the torus diameter (4 hops).
module tb_torus_router;
  import cuscomnet_pkg::*;
  logic [NODE_W-1:0] local_id, dest_id;
  logic [PORT_W-1:0] out_port;
  int checks = 0, failures = 0;

  torus_router dut (.local_id, .dest_id, .out_port);

  function automatic int ring_dist(int a, int b, int n);
    int d;
    d = (b - a + n) % n;
    return (d <= n - d) ? d : n - d;
  endfunction

  function automatic int neighbour(int node, int port);
    int c, r;
    c = node % 4; r = node / 4;
    case (port)
      1: r = (r + 3) % 4;   // North
      2: c = (c + 1) % 4;   // East
      3: c = (c + 3) % 4;   // West
      4: r = (r + 1) % 4;   // South
      default: ;
    endcase
    return r * 4 + c;
  endfunction

  initial begin
    for (int s = 0; s < 16; s++) begin
      for (int d = 0; d < 16; d++) begin
        int cur, hops, dcol, dcol_next, drow, drow_next;
        cur = s; hops = 0;
        while (cur != d && hops < 8) begin
          local_id = NODE_W'(cur); dest_id = NODE_W'(d);
          #1;
          checks++;
          dcol = ring_dist(cur % 4, d % 4, 4);
          drow = ring_dist(cur / 4, d / 4, 4);
          if (out_port == 0 || out_port > 4) begin
            failures++;
            $display("bad port %0d from %0d to %0d", out_port, cur, d);
            break;
          end
          cur = neighbour(cur, int'(out_port));
          dcol_next = ring_dist(cur % 4, d % 4, 4);
          drow_next = ring_dist(cur / 4, d / 4, 4);
          // columns first, and each step shortens the distance
          if (dcol != 0) begin
            if (!(dcol_next == dcol - 1 && drow_next == drow)) failures++;
          end else begin
            if (!(drow_next == drow - 1 && dcol_next == 0)) failures++;
          end
          hops++;
        end
        local_id = NODE_W'(cur); dest_id = NODE_W'(d);
        #1;
        checks++;
        if (out_port != 0 || hops > 4) begin
          failures++;
          $display("walk %0d -> %0d ended at %0d after %0d hops", s, d, cur, hops);
        end
      end
    end
    // the tie (two columns apart) goes East
    local_id = 0; dest_id = 2; #1; checks++;
    if (out_port != 2) failures++;
    local_id = 0; dest_id = 8; #1; checks++;
    if (out_port != 4) failures++;
    local_id = 5; dest_id = 4; #1; checks++;
    if (out_port != 3) failures++;
    local_id = 5; dest_id = 1; #1; checks++;
    if (out_port != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
