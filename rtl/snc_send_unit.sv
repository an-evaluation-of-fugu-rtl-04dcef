// snc_send_unit: Sending Unit of the second-network controller.
//
// Turns the message in the Output Message Buffer into a serial bit stream. It always
// starts at word 0, the header, reads the header's length field (number of data words,
// 0..7) and sends that many words after it, each most significant bit first. The
// network in this design is serial, one bit per clock.
//
// Interface and timing: a one-cycle start pulse, while idle, latches the length from
// the header (tx_addr is 0 while idle, so tx_word is the header) and makes the unit
// busy with the header's bit 31 on tx_bit. Each cycle with shift high moves to the
// next bit; tx_last is high while the final bit of the message is on tx_bit, and the
// shift of that bit returns the unit to idle. clear aborts a transmission.
// Bits are taken straight from the OMB word selected by tx_addr; the OMB must not be
// changed while the unit is busy (the description protects it with a software
// semaphore rather than in hardware).
module snc_send_unit
  import fugu_sn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              start,
  input  logic              shift,
  output logic [ADDR_W-1:0] tx_addr,
  input  logic [WORD_W-1:0] tx_word,
  output logic              busy,
  output logic              tx_bit,
  output logic              tx_last,
  output logic [2:0]        tx_len
);

  logic [ADDR_W-1:0] word_idx;
  logic [4:0]        bit_idx;
  header_t           hdr;

  assign hdr     = header_t'(tx_word);
  assign tx_addr = word_idx;
  assign tx_bit  = busy && tx_word[bit_idx];
  assign tx_last = busy && (word_idx == tx_len) && (bit_idx == 5'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      word_idx <= '0;
      bit_idx  <= 5'd31;
      tx_len   <= '0;
    end else if (clear) begin
      busy     <= 1'b0;
      word_idx <= '0;
      bit_idx  <= 5'd31;
    end else if (!busy) begin
      if (start) begin
        busy    <= 1'b1;
        tx_len  <= hdr.len;
        bit_idx <= 5'd31;
      end
    end else if (shift) begin
      if (tx_last) begin
        busy     <= 1'b0;
        word_idx <= '0;
        bit_idx  <= 5'd31;
      end else if (bit_idx == 5'd0) begin
        bit_idx  <= 5'd31;
        word_idx <= word_idx + 1'b1;
      end else begin
        bit_idx  <= bit_idx - 1'b1;
      end
    end
  end

endmodule
