// Testbench for prio_queue with two levels of different depths (4 packets
// for ordinary, 2 for urgent packets). A reference model
// keeps one queue per priority level; random pushes (only into levels that
// are not full) and pops are compared on every cycle: head must be the
// oldest packet of the highest non-empty level, full must report exactly
// when a level holds its depth in packets, and urgent packets must overtake.
module tb_prio_queue;
  import cuscomnet_pkg::*;
  localparam int D = 4, D1 = 2;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, valid;
  packet_t din = '0, head;
  logic [PRIO_LEVELS-1:0] full;
  int checks = 0, failures = 0, overtakes = 0;
  packet_t q0 [$], q1 [$];

  prio_queue #(.DEPTH(D), .LEVELS(PRIO_LEVELS), .LEVEL_DEPTH({16'(D1), 16'(D)})) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // compare state
      checks++;
      if (valid !== (q0.size() + q1.size() > 0)) failures++;
      if (full[0] !== (q0.size() == D) || full[1] !== (q1.size() == D1)) begin
        failures++;
        $display("full %b sizes %0d %0d", full, q0.size(), q1.size());
      end
      if (valid) begin
        checks++;
        if (q1.size() > 0) begin
          if (head !== q1[0]) failures++;
        end else if (head !== q0[0]) failures++;
      end
      // next operation
      din = '0;
      din.hdr.prio = PRIO_W'($urandom % 2);
      din.hdr.id = ID_W'($urandom);
      din.len = LEN_W'($urandom % 33);
      din.data[0] = 16'($urandom);
      din.data[31] = 16'($urandom);
      push = ($urandom % 2) && !full[din.hdr.prio];
      pop = valid && ($urandom % ((t / 500) % 2 == 0 ? 3 : 2) == 0);
      #1;
      if (pop) begin
        if (q1.size() > 0) begin
          if (q0.size() > 0) overtakes++;
          void'(q1.pop_front());
        end else void'(q0.pop_front());
      end
      if (push) begin
        if (din.hdr.prio == 1) q1.push_back(din); else q0.push_back(din);
      end
    end
    checks++;
    if (overtakes == 0) failures++;
    $display("overtakes %0d", overtakes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
