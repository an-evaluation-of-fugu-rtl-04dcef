// fugu_sn_pkg: types and constants shared by the second-network controller (SNC).
//
// The second network is a system-only serial token ring. Every node has an SNC with
// an 8-word Output Message Buffer (OMB), an 8-word Input Message Buffer (IMB), a
// Machine Info Register (MIR) and a Status/Command Register (SCR), reached by the
// processor through colored loads and stores with the ASIs below.
//
// From the design description: the ASI numbers, buffer sizes, the header fields
// (control bits 31:30, length 18:16, 8-bit vector, 7-bit destination 6:0), the MIR
// layout and the SCR status/command bit positions.
// This design's own choices: the interrupt vector is taken as bits 14:7 (8 bits between
// the destination and the length fields); the length field counts the data words after
// the header (0..7); the serial frame format on the ring (start bit, type bit, body,
// acknowledgement slot) and the 3-bit state codes reported in the SCR.
package fugu_sn_pkg;

  localparam int unsigned WORD_W    = 32;
  localparam int unsigned BUF_WORDS = 8;
  localparam int unsigned ADDR_W    = 3;   // word index into an 8-word buffer
  localparam int unsigned ID_W      = 7;   // up to 128 nodes

  // Address space identifiers of the second-network resources
  localparam logic [7:0] ASI_OMB = 8'h58;
  localparam logic [7:0] ASI_IMB = 8'h59;
  localparam logic [7:0] ASI_MIR = 8'h5A;
  localparam logic [7:0] ASI_SCR = 8'h5B;

  // Message header (word 0 of a message)
  typedef struct packed {
    logic [1:0]      ctrl;     // 31:30 message type, 0 = vectored
    logic [10:0]     rsvd_hi;  // 29:19
    logic [2:0]      len;      // 18:16 number of data words after the header
    logic            rsvd_15;  // 15
    logic [7:0]      vector;   // 14:7 interrupt vector / 8-bit data
    logic [ID_W-1:0] dest;     // 6:0 destination node
  } header_t;

  // Machine Info Register: xxxxxxxx xxxxxxxx xSSSSSSS xIIIIIII
  typedef struct packed {
    logic            rsvd_15;
    logic [ID_W-1:0] size;     // 14:8 machine size (number of nodes)
    logic            rsvd_7;
    logic [ID_W-1:0] node_id;  // 6:0 this node's ID
  } mir_t;

  // Main FSM state, reported in SCR[2:0]
  typedef enum logic [2:0] {
    ST_IDLE   = 3'd0,  // repeating the ring, no send pending, no result
    ST_WAIT   = 3'd1,  // send commanded, waiting for the token
    ST_SEND   = 3'd2,  // holding the token, shifting the message out
    ST_DRAIN  = 3'd3,  // message sent, waiting for it to come back round with its ACK slot
    ST_REL    = 3'd4,  // releasing (or generating) the token
    ST_ACKED  = 3'd5,  // idle; last message was acknowledged
    ST_NACKED = 3'd6   // idle; last message was refused (NACK)
  } snc_state_e;

  // Status word returned when the SCR is read
  //   bit 16 I   interrupt pending
  //   15:8   Q   interrupt vector of the message in the IMB
  //   7:6    C   control bits of the message in the IMB
  //   5      R   receiver enabled (ready to receive)
  //   4      M   a message for this node is in the IMB
  //   3      W   waiting to send (send not finished)
  //   2:0    S   main FSM state
  typedef struct packed {
    logic [14:0] rsvd;
    logic        irq;
    logic [7:0]  vector;
    logic [1:0]  ctrl;
    logic        rx_ready;
    logic        msg_here;
    logic        waiting;
    snc_state_e  state;
  } scr_status_t;

  // Command bits written to the SCR (one bit per write)
  localparam int unsigned CMD_SEND      = 0;  // T: launch the message in the OMB
  localparam int unsigned CMD_RX_ENABLE = 1;  // E: enable the receiver
  localparam int unsigned CMD_RX_DISABLE= 2;  // D: disable the receiver
  localparam int unsigned CMD_GEN_TOKEN = 3;  // G: put a token on the ring
  localparam int unsigned CMD_RESET     = 4;  // R: reset the controller's network state

  // Serial frame on the ring (idle line is 0):
  //   bit 0            start bit, 1
  //   bit 1            type: 0 = token (frame ends here), 1 = message
  //   bits 2..         header and data words, most significant bit first
  //   last bit         acknowledgement slot: sent as 0, set to 1 by an accepting receiver
  localparam int unsigned HDR_FIRST = 2;
  localparam int unsigned HDR_LAST  = HDR_FIRST + WORD_W - 1;   // 33

  // Bit position of the acknowledgement slot for a message with len data words
  function automatic logic [8:0] ack_pos(input logic [2:0] len);
    return 9'(HDR_FIRST) + 9'(WORD_W) * (9'(len) + 9'd1);
  endfunction

endpackage
