// snc_recv_unit: Receiving Unit of the second-network controller.
//
// Collects the serial body of a message frame (header first, most significant bit
// first) in a 32-bit shift register and works at the byte level: every eighth bit it
// writes the completed byte into the Input Message Buffer, at the word and byte lane
// given by how many bits have arrived since the frame began. The main control unit
// decides whether bytes may be stored (store): it lets the unit store the header only
// while the receiver is enabled, and the rest of the message only if the header names
// this node; otherwise the unit keeps shifting (so the header can be checked) but
// writes nothing.
//
// Interface and timing: clear, one cycle before the first body bit, restarts the bit
// count. Each rising edge with shift high takes rx_bit. The IMB write port (rx_we,
// rx_word, rx_lane, rx_byte) is combinational and is high in the cycle of the eighth
// bit of a byte, so the byte lands in the IMB on that same edge. word_sr holds the last
// 32 bits received; after the 32nd body bit it is the header.
module snc_recv_unit
  import fugu_sn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              shift,
  input  logic              rx_bit,
  input  logic              store,
  output logic [WORD_W-1:0] word_sr,
  output logic              rx_we,
  output logic [ADDR_W-1:0] rx_word,
  output logic [1:0]        rx_lane,
  output logic [7:0]        rx_byte
);

  logic [7:0] bcnt;   // body bits received in this frame (8 words x 32 bits)

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      word_sr <= '0;
      bcnt    <= '0;
    end else if (clear) begin
      bcnt    <= '0;
    end else if (shift) begin
      word_sr <= {word_sr[WORD_W-2:0], rx_bit};
      bcnt    <= bcnt + 8'd1;
    end
  end

  assign rx_we   = shift && store && (bcnt[2:0] == 3'd7);
  assign rx_word = bcnt[7:5];
  assign rx_lane = 2'd3 - bcnt[4:3];
  assign rx_byte = {word_sr[6:0], rx_bit};

endmodule
