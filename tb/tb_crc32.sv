// Testbench for crc32: feeds random 16-bit words and compares the register
// with a bit-serial reference (one bit of the message at a time, MSB first,
// same polynomial and all-ones start). Also checks that init restarts the
// value and that the register holds when en is low.
module tb_crc32;
  logic        clk = 0, rst_n = 0, init = 0, en = 0;
  logic [15:0] data = '0;
  logic [31:0] crc;
  int checks = 0, failures = 0;

  crc32 dut (.clk, .rst_n, .init, .en, .data, .crc);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_bit(input logic [31:0] c, input logic b);
    logic fb;
    fb = c[31] ^ b;
    c = c << 1;
    if (fb) c = c ^ 32'h04C11DB7;
    return c;
  endfunction

  logic [31:0] model;

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    if (crc !== 32'hFFFF_FFFF) failures++;
    checks++;
    for (int frame = 0; frame < 20; frame++) begin
      init = 1; @(negedge clk); init = 0;
      model = 32'hFFFF_FFFF;
      for (int w = 0; w < 1 + frame; w++) begin
        data = 16'($urandom);
        en = 1;
        for (int b = 15; b >= 0; b--) model = ref_bit(model, data[b]);
        @(negedge clk);
        en = ($urandom % 4) == 0 ? 0 : 1;
        if (!en) begin
          // hold for one cycle with en low and garbage data
          data = 16'($urandom);
          @(negedge clk);
        end
        en = 0;
        checks++;
        if (crc !== model) begin
          failures++;
          $display("mismatch frame %0d word %0d: %h vs %h", frame, w, crc, model);
        end
      end
    end
    // known value: a single zero word from all ones
    init = 1; @(negedge clk); init = 0;
    data = 16'h0000; en = 1; @(negedge clk); en = 0;
    model = 32'hFFFF_FFFF;
    for (int b = 15; b >= 0; b--) model = ref_bit(model, 1'b0);
    checks++;
    if (crc !== model) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
