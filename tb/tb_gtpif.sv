// Testbench for gtpif. A byte stream of control and data words is produced,
// starting with SYNC words, and presented to the receive side either on the
// word boundary or one byte late (as a transceiver without 2-byte alignment
// may deliver it). After the first SYNC the block must output the original
// words, K flags included, two cycles after they enter (one byte-buffer
// cycle when shifted, plus the register), and report no K errors. The
// transmit side must register word and K flags by one cycle.
module tb_gtpif;
  import cuscomnet_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic [15:0] gtp_tx_data, gtp_rx_data = W_IDLE;
  logic [1:0]  gtp_tx_charisk, gtp_rx_charisk = 2'b11;
  word_t       tx_word = '0, rx_word;
  logic        tx_k = 0, rx_k, rx_kerr, realign;
  int checks = 0, failures = 0, realigns = 0;

  gtpif dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && realign) realigns++;

  // word stream: SYNC twice, then random data or control words
  word_t       sw [300];
  logic        sk [300];
  logic [7:0]  bytes [600];
  logic        bk [600];

  task automatic run(input int shift);
    int n;
    n = 300;
    for (int i = 0; i < n; i++) begin
      if (i < 4)            begin sw[i] = (i < 2) ? W_IDLE : W_SYNC; sk[i] = 1; end
      else if ($urandom % 4 == 0) begin sw[i] = ($urandom % 2) ? W_SOF : W_EOF; sk[i] = 1; end
      else if (i % 50 == 0) begin sw[i] = W_SYNC; sk[i] = 1; end
      else begin sw[i] = 16'($urandom); sk[i] = 0; end
      bytes[2*i] = sw[i][15:8]; bytes[2*i+1] = sw[i][7:0];
      bk[2*i] = sk[i]; bk[2*i+1] = sk[i];
    end
    for (int i = 0; i < n - 1; i++) begin
      @(negedge clk);
      if (shift == 0) begin
        gtp_rx_data = {bytes[2*i], bytes[2*i+1]};
        gtp_rx_charisk = {bk[2*i], bk[2*i+1]};
      end else begin
        // one byte late: the high byte of this word is the previous word's low byte
        gtp_rx_data = {(i == 0) ? K28_5 : bytes[2*i-1], bytes[2*i]};
        gtp_rx_charisk = {(i == 0) ? 1'b1 : bk[2*i-1], bk[2*i]};
      end
      // output reflects input word i-1 (unshifted) or word i-1 (shifted:
      // the shifted word i carries word i-1's low byte and word i's high byte)
      #1;
      if (i >= 4 + 2) begin
        int j;
        j = (shift == 0) ? i - 1 : i - 2;
        checks++;
        if (rx_word !== sw[j] || rx_k !== sk[j] || rx_kerr) begin
          failures++;
          $display("shift %0d word %0d: got %h/%b expected %h/%b", shift, j, rx_word, rx_k, sw[j], sk[j]);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(0);
    checks++;
    if (realigns != 0) failures++;
    run(1);
    run(0);
    checks++;
    if (realigns != 2) begin
      failures++;
      $display("realigns %0d", realigns);
    end
    // transmit side
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      tx_word = 16'($urandom); tx_k = 1'($urandom);
      @(negedge clk);
      checks++;
      if (gtp_tx_data !== tx_word || gtp_tx_charisk !== {2{tx_k}}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
