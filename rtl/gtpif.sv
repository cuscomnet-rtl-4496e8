// GTPIF: interface between one GTP transceiver tile and the data link layer.
//
// The GTP tile does the 8B/10B coding and serialisation and exchanges
// 2-byte words with the fabric: 16 data bits plus one "is K character" flag
// per byte. The tile aligns to the comma at byte level only, so a received
// word can come out shifted by one byte. GTPIF registers both directions and
// restores the 2-byte word boundary; the published design names this block
// only, so what it does here is an own choice of the simplest useful job.
//
// How it works: the data link starts every frame with a SYNC word, comma
// K28.5 in the high byte and K28.1 in the low byte. If K28.1 shows up in the
// high byte of a received word, the stream is one byte late: from then on
// the block outputs {previous low byte, current high byte}. If SYNC shows
// up whole, the offset returns to zero. The word that triggers the change is
// already output in the new alignment. Each change of alignment pulses
// realign. On the link side a word is a control word when both K flags are
// set; a word with exactly one flag set is reported with rx_kerr (a damaged
// or misaligned character).
//
// Timing: one register stage in each direction. Reset clears the offset and
// drives IDLE words towards the tile.
module gtpif
  import cuscomnet_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // GTP tile side
  output logic [15:0] gtp_tx_data,
  output logic [1:0]  gtp_tx_charisk,
  input  logic [15:0] gtp_rx_data,
  input  logic [1:0]  gtp_rx_charisk,
  // data link side
  input  word_t       tx_word,
  input  logic        tx_k,
  output word_t       rx_word,
  output logic        rx_k,
  output logic        rx_kerr,
  output logic        realign
);

  logic       offset_q, offset_d;
  logic [7:0] prev_lo;
  logic       prev_lo_k;
  logic [15:0] al_data;
  logic [1:0]  al_k;

  always_comb begin
    offset_d = offset_q;
    if (gtp_rx_charisk[1] && gtp_rx_data[15:8] == K28_1)
      offset_d = 1'b1;
    else if (gtp_rx_charisk == 2'b11 && gtp_rx_data == W_SYNC)
      offset_d = 1'b0;
    if (offset_d) begin
      al_data = {prev_lo, gtp_rx_data[15:8]};
      al_k    = {prev_lo_k, gtp_rx_charisk[1]};
    end else begin
      al_data = gtp_rx_data;
      al_k    = gtp_rx_charisk;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      offset_q       <= 1'b0;
      prev_lo        <= K28_5;
      prev_lo_k      <= 1'b1;
      rx_word        <= W_IDLE;
      rx_k           <= 1'b1;
      rx_kerr        <= 1'b0;
      realign        <= 1'b0;
      gtp_tx_data    <= W_IDLE;
      gtp_tx_charisk <= 2'b11;
    end else begin
      offset_q       <= offset_d;
      prev_lo        <= gtp_rx_data[7:0];
      prev_lo_k      <= gtp_rx_charisk[0];
      rx_word        <= al_data;
      rx_k           <= &al_k;
      rx_kerr        <= ^al_k;
      realign        <= offset_d != offset_q;
      gtp_tx_data    <= tx_word;
      gtp_tx_charisk <= {2{tx_k}};
    end
  end

endmodule
