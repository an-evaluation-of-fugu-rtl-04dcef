// snc_data_module: the two message buffers of the second-network controller and the
// routing of reads and writes to them.
//
// Output Message Buffer (OMB), BUF_WORDS x WORD_W: written and read by the processor
// interface (word port), read by the sending unit through a second read port.
// Input Message Buffer (IMB), BUF_WORDS x WORD_W: written by the receiving unit one
// byte at a time (byte lane 3 holds bits 31:24), read by the processor interface.
// Word 0 of the IMB, the header of the received message, is also given out whole so
// the controller can report its vector and control bits in the status register.
//
// Timing: writes take effect on the rising clock edge; all reads are combinational.
// Because the buffers are flip-flop arrays with independent read and write ports, a
// processor read and a receiving-unit write in the same cycle do not collide, so no
// arbitration is needed (the description resolves such clashes with a small state
// machine; with separate ports there is nothing to arbitrate).
// Both buffers reset to zero.
module snc_data_module
  import fugu_sn_pkg::*;
#(
  parameter int unsigned BUF_WORDS_P = BUF_WORDS,
  parameter int unsigned WORD_W_P    = WORD_W,
  localparam int unsigned AW         = $clog2(BUF_WORDS_P)
)(
  input  logic                clk,
  input  logic                rst_n,
  // processor interface port
  input  logic                omb_we,
  input  logic [AW-1:0]       buf_addr,
  input  logic [WORD_W_P-1:0] omb_wdata,
  output logic [WORD_W_P-1:0] omb_rdata,
  output logic [WORD_W_P-1:0] imb_rdata,
  // sending unit port
  input  logic [AW-1:0]       tx_addr,
  output logic [WORD_W_P-1:0] tx_word,
  // receiving unit port
  input  logic                rx_we,
  input  logic [AW-1:0]       rx_word,
  input  logic [$clog2(WORD_W_P/8)-1:0] rx_lane,
  input  logic [7:0]          rx_byte,
  output logic [WORD_W_P-1:0] imb_header
);

  logic [WORD_W_P-1:0] omb [BUF_WORDS_P];
  logic [WORD_W_P-1:0] imb [BUF_WORDS_P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(BUF_WORDS_P); i++) omb[i] <= '0;
    end else if (omb_we) begin
      omb[buf_addr] <= omb_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(BUF_WORDS_P); i++) imb[i] <= '0;
    end else if (rx_we) begin
      imb[rx_word][rx_lane*8 +: 8] <= rx_byte;
    end
  end

  assign omb_rdata  = omb[buf_addr];
  assign imb_rdata  = imb[buf_addr];
  assign tx_word    = omb[tx_addr];
  assign imb_header = imb[0];

endmodule
