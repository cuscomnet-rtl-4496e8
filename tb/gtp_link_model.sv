// Behavioural model of one direction of a node-to-node connection: the
// sending GTP tile, the InfiniBand cable and the receiving GTP tile, seen
// from the fabric side as 2-byte parallel words with per-byte K flags.
// Not synthesizable logic of the network; used by testbenches only.
//
// The words arrive DELAY cycles after they are sent. Faults can be injected:
//  * shift      - the receiver delivers the byte stream one byte late, as a
//                 tile that aligned to the comma on the wrong byte would;
//  * flip_data  - a pulse damages one bit of the next data word (CRC error);
//  * drop_ack   - a pulse turns the next ACK word into IDLE (a lost ACK).
// Each injected damage pulses the matching *_done output.
module gtp_link_model
  import cuscomnet_pkg::*;
#(
  parameter int DELAY = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] tx_data,
  input  logic [1:0]  tx_charisk,
  output logic [15:0] rx_data,
  output logic [1:0]  rx_charisk,
  input  logic        shift,
  input  logic        flip_data,
  input  logic        drop_ack,
  output logic        flip_done,
  output logic        drop_done
);
  logic [15:0] d [DELAY];
  logic [1:0]  k [DELAY];
  logic        flip_arm, drop_arm;

  always_ff @(posedge clk) begin
    logic [15:0] w;
    logic [1:0]  c;
    w = tx_data; c = tx_charisk;
    flip_done <= 0;
    drop_done <= 0;
    if (flip_data) flip_arm <= 1;
    if (drop_ack)  drop_arm <= 1;
    if (flip_arm && c == 2'b00) begin
      w = w ^ 16'h0010; flip_arm <= 0; flip_done <= 1;
    end
    if (drop_arm && c == 2'b11 && w == W_ACK) begin
      w = W_IDLE; drop_arm <= 0; drop_done <= 1;
    end
    d[0] <= w; k[0] <= c;
    for (int i = 1; i < DELAY; i++) begin d[i] <= d[i-1]; k[i] <= k[i-1]; end
    if (!rst_n) begin
      flip_arm <= 0; drop_arm <= 0;
      for (int i = 0; i < DELAY; i++) begin d[i] <= W_IDLE; k[i] <= 2'b11; end
    end
  end

  // one byte late: the older word's low byte, then the next word's high byte
  always_comb begin
    if (shift) begin
      rx_data    = {d[DELAY-1][7:0], d[DELAY-2][15:8]};
      rx_charisk = {k[DELAY-1][0],   k[DELAY-2][1]};
    end else begin
      rx_data    = d[DELAY-1];
      rx_charisk = k[DELAY-1];
    end
  end
endmodule
