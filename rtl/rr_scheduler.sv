// Round-robin scheduler of the CusComNet packet switch.
//
// The switch has one output queue per output port and NPORTS inputs (the
// local node and the four torus links). Every cycle, for each output, the
// scheduler picks one of the inputs that hold a packet for that output and
// grants it; the packet is written into the output queue in that same cycle,
// so a packet is scheduled in one clock, as the published design states.
// Round-robin order gives routed and locally generated packets an even share
// of each output; it is a separate module so that other policies can replace
// it.
//
// How it works: one rotating-priority arbiter per output. Its pointer moves
// to the input after the last one granted, so the granted input has the
// lowest priority next time. An input requests at most one output (its
// routed port), so it never gets two grants in a cycle.
//
// Interface: req[o][i] is input i asking for output o; gnt[o][i] is
// combinational from req and the registered pointers; pointers advance on
// the clock edge after a grant. Reset clears the pointers to input 0.
module rr_scheduler #(
  parameter int unsigned NPORTS = 5
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [NPORTS-1:0][NPORTS-1:0] req,   // [output][input]
  output logic [NPORTS-1:0][NPORTS-1:0] gnt    // [output][input], one-hot or 0
);

  localparam int unsigned PW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  logic [NPORTS-1:0][PW-1:0] ptr;  // highest-priority input of each output

  always_comb begin
    gnt = '0;
    for (int o = 0; o < NPORTS; o++) begin
      for (int k = NPORTS - 1; k >= 0; k--) begin
        // scan from ptr upwards; the last match in this downward loop is the
        // first input at or after ptr that requests
        int unsigned i;
        i = (int'(ptr[o]) + k) % NPORTS;
        if (req[o][i]) begin
          gnt[o]    = '0;
          gnt[o][i] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0;
    end else begin
      for (int o = 0; o < NPORTS; o++) begin
        for (int i = 0; i < NPORTS; i++) begin
          if (gnt[o][i]) ptr[o] <= PW'((i + 1) % NPORTS);
        end
      end
    end
  end

  // each output grants at most one input, and only a requesting one
  for (genvar o = 0; o < NPORTS; o++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt[o]));
    assert property (@(posedge clk) disable iff (!rst_n) (gnt[o] & ~req[o]) == '0);
  end

endmodule
