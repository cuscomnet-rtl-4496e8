// CRC-32 generator/checker for the CusComNet data link layer.
//
// The data link layer protects every frame with a CRC: the sender appends
// its CRC after the EOF symbol and the receiver compares it with the CRC it
// computes itself over the same words, then acknowledges the frame or asks
// for it again. The published design names a CRC32 block; its polynomial,
// bit order and width per step are not given, so this block uses the common
// CRC-32 polynomial 0x04C11DB7, starts from all ones, shifts the word in most
// significant bit first, and takes one 16-bit link word per clock. No final
// inversion or bit reflection is applied: both ends use the same block, so
// only agreement matters.
//
// Interface: init reloads all ones (and has priority over en); en folds
// data into the register on the clock edge; crc is the registered value, so
// it reflects every word given with en up to the previous edge.
module crc32 #(
  parameter int unsigned          DW   = 16,
  parameter logic [31:0]          POLY = 32'h04C1_1DB7
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,
  input  logic          en,
  input  logic [DW-1:0] data,
  output logic [31:0]   crc
);

  function automatic logic [31:0] step(input logic [31:0] c, input logic [DW-1:0] d);
    logic [31:0] r;
    r = c;
    for (int b = DW - 1; b >= 0; b--) begin
      if (r[31] ^ d[b]) r = (r << 1) ^ POLY;
      else              r = r << 1;
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    crc <= '1;
    else if (init) crc <= '1;
    else if (en)   crc <= step(crc, data);
  end

endmodule
