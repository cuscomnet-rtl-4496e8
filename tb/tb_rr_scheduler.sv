// Testbench for rr_scheduler: random request patterns (each input asks for
// one output at most). A reference keeps its own round-robin pointer per
// output and predicts the grant in the same cycle; the testbench also checks
// fairness: with all five inputs asking for one output, each is granted once
// in every five cycles.
module tb_rr_scheduler;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  logic [N-1:0][N-1:0] req = '0, gnt;
  int checks = 0, failures = 0;
  int ptr [N];

  rr_scheduler #(.NPORTS(N)) dut (.clk, .rst_n, .req, .gnt);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_cycle();
    logic [N-1:0][N-1:0] exp;
    exp = '0;
    for (int o = 0; o < N; o++) begin
      for (int k = 0; k < N; k++) begin
        int i;
        i = (ptr[o] + k) % N;
        if (req[o][i]) begin
          exp[o][i] = 1'b1;
          break;
        end
      end
    end
    checks++;
    if (gnt !== exp) begin
      failures++;
      $display("grant %h expected %h (req %h)", gnt, exp, req);
    end
    for (int o = 0; o < N; o++)
      for (int i = 0; i < N; i++)
        if (exp[o][i]) ptr[o] = (i + 1) % N;
  endtask

  initial begin
    int cnt [N];
    for (int o = 0; o < N; o++) ptr[o] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      req = '0;
      for (int i = 0; i < N; i++)
        if ($urandom % 3 != 0) req[$urandom % N][i] = 1'b1;
      #1;
      check_cycle();
    end
    // fairness: all inputs on output 2 for 25 cycles
    for (int i = 0; i < N; i++) cnt[i] = 0;
    for (int t = 0; t < 25; t++) begin
      @(negedge clk);
      req = '0;
      req[2] = '1;
      #1;
      check_cycle();
      for (int i = 0; i < N; i++) if (gnt[2][i]) cnt[i]++;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (cnt[i] != 5) failures++;
    end
    @(negedge clk);
    req = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
