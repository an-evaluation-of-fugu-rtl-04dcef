// snc: Second Network Controller of one node.
//
// Connects the five units of the controller: the Processor Interface Unit (colored
// loads/stores, Machine Info Register, Status/Command Register), the Data Module (the
// 8-word Output and Input Message Buffers), the Sending Unit (parallel to serial), the
// Receiving Unit (serial to parallel, byte at a time) and the Main Control Unit (token
// protocol and ring output).
//
// Use: boot software writes the MIR (node ID, machine size) and enables the receiver;
// one node issues the generate-token command once. To send, software writes the header
// (control bits 31:30, data-word count 18:16, vector 14:7, destination 6:0) and up to
// seven data words into the OMB and writes the send command; the controller waits for
// the token, sends the message, and reports ACK or NACK in the status state field and
// by interrupt. On arrival the IMB holds the message, the receiver is disabled and the
// interrupt is raised until software re-enables the receiver.
//
// Timing: ring_in is sampled on the rising edge, ring_out changes on the falling edge;
// the processor interface is synchronous to the rising edge with combinational read data.
module snc
  import fugu_sn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ring_in,
  output logic              ring_out,
  input  logic              cpu_read,
  input  logic              cpu_write_n,
  input  logic [7:0]        cpu_asi,
  input  logic [ADDR_W-1:0] cpu_addr,
  input  logic [WORD_W-1:0] cpu_wdata,
  input  logic              cpu_supervisor,
  output logic [WORD_W-1:0] cpu_rdata,
  output logic              cpu_prot_trap,
  output logic              cpu_irq
);

  logic              omb_we;
  logic [ADDR_W-1:0] buf_addr, tx_addr, rx_word;
  logic [WORD_W-1:0] omb_wdata, omb_rdata, imb_rdata, tx_word, imb_header, ru_word;
  mir_t              mir;
  logic [4:0]        cmd;
  logic              scr_read;
  scr_status_t       status;
  logic              su_clear, su_start, su_shift, su_busy, su_bit, su_last;
  logic [2:0]        su_len;
  logic              ru_clear, ru_shift, ru_store, rx_we;
  logic [1:0]        rx_lane;
  logic [7:0]        rx_byte;

  snc_proc_if u_pif (
    .clk, .rst_n,
    .cpu_read, .cpu_write_n, .cpu_asi, .cpu_addr, .cpu_wdata, .cpu_supervisor,
    .cpu_rdata, .cpu_prot_trap,
    .omb_we, .buf_addr, .omb_wdata, .omb_rdata, .imb_rdata,
    .mir, .cmd, .scr_read, .status
  );

  snc_data_module u_data (
    .clk, .rst_n,
    .omb_we, .buf_addr, .omb_wdata, .omb_rdata, .imb_rdata,
    .tx_addr, .tx_word,
    .rx_we, .rx_word, .rx_lane, .rx_byte, .imb_header
  );

  snc_send_unit u_send (
    .clk, .rst_n,
    .clear(su_clear), .start(su_start), .shift(su_shift),
    .tx_addr, .tx_word,
    .busy(su_busy), .tx_bit(su_bit), .tx_last(su_last), .tx_len(su_len)
  );

  snc_recv_unit u_recv (
    .clk, .rst_n,
    .clear(ru_clear), .shift(ru_shift), .rx_bit(ring_in), .store(ru_store),
    .word_sr(ru_word), .rx_we, .rx_word, .rx_lane, .rx_byte
  );

  snc_main_ctrl u_mcu (
    .clk, .rst_n,
    .ring_in, .ring_out,
    .cmd, .scr_read, .mir, .status, .irq(cpu_irq),
    .omb_hdr(tx_word), .imb_header,
    .su_clear, .su_start, .su_shift, .su_busy, .su_bit, .su_last, .su_len,
    .ru_clear, .ru_shift, .ru_store, .ru_word
  );

endmodule
