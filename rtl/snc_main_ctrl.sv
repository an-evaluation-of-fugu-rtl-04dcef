// snc_main_ctrl: Main Control Unit of the second-network controller.
//
// The second network is a unidirectional serial token ring, one bit per clock per hop.
// A node repeats what it hears (one cycle of delay) unless it holds the token. This
// unit has the two state machines of the controller:
//
//  * The main FSM (state, plus a tracker of the frame passing through the node) keeps
//    the token protocol, the send and receive bookkeeping and the destination check.
//    A send command moves it to WAIT. When a token frame (start bit 1, type bit 0)
//    arrives in WAIT, the node seizes it: the start bit has already been repeated, so
//    the node drives a 1 in place of the type bit, turning the token into the start of
//    its own message, and follows it with the header and data words from the sending
//    unit and a 0 in the acknowledgement slot. The message travels the whole ring and
//    comes back; the sender swallows it, reads the acknowledgement slot (1 = ACK,
//    0 = NACK) and then always sends a fresh token downstream, so the next node gets a
//    turn. Every other node follows each message frame: the receiving unit shifts it in,
//    and after the 32-bit header the unit compares the destination with the node ID. If
//    it matches and the receiver was enabled when the frame began, the message is kept
//    in the IMB, the node drives 1 into the acknowledgement slot as it passes, disables
//    its own receiver (so the next message cannot overwrite the IMB) and raises the
//    arrival interrupt. A message for a node whose receiver is disabled keeps its 0 and
//    comes back as a NACK.
//  * The output FSM (osel) chooses what the node drives: the repeated input, the type
//    bit, message body, acknowledgement slot, quiet zeros while its message circulates,
//    zeros while it clears the line before generating a token, or a token.
//    The generate-token command is how software starts the ring and recovers it after a
//    token is lost: the node first drops everything reaching it for one ring trip
//    (machine size + 2 cycles), then sends the token, so exactly one token is left.
//
// Timing: ring_in is sampled on the rising edge; ring_out is a register loaded on the
// falling edge from the state reached at the rising edge, so a neighbour has half a
// clock of margin against clock skew, and each hop adds one clock of delay.
// Commands (cmd, one-hot, from the Status/Command Register) are taken on the rising edge.
//
// From the description: token passing with release after every message, the ACK/NACK
// per message at no extra transmission cost, the destination check after the header,
// receiver auto-disable, the rising/falling-edge input/output registers and the status
// fields. Own choices: the frame format (see fugu_sn_pkg), that a send to a destination
// at or above the machine size in the MIR is refused at once with a NACK (a size field
// of 0 stands for the full 128 nodes, which 7 bits cannot hold), that the
// generate-token command is taken only while the node is idle and clears the line first,
// that the receiver starts disabled after reset, that reading the SCR clears the send-
// complete interrupt and enabling the receiver clears the arrival interrupt.
module snc_main_ctrl
  import fugu_sn_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // ring
  input  logic              ring_in,
  output logic              ring_out,
  // processor interface
  input  logic [4:0]        cmd,
  input  logic              scr_read,
  input  mir_t              mir,
  output scr_status_t       status,
  output logic              irq,
  // data module
  input  logic [WORD_W-1:0] omb_hdr,     // OMB word 0 (valid while the sending unit is idle)
  input  logic [WORD_W-1:0] imb_header,  // IMB word 0
  // sending unit
  output logic              su_clear,
  output logic              su_start,
  output logic              su_shift,
  input  logic              su_busy,
  input  logic              su_bit,
  input  logic              su_last,
  input  logic [2:0]        su_len,
  // receiving unit
  output logic              ru_clear,
  output logic              ru_shift,
  output logic              ru_store,
  input  logic [WORD_W-1:0] ru_word
);

  typedef enum logic [2:0] {
    TRK_IDLE, TRK_TYPE, TRK_MSG, TRK_STRIP_WAIT, TRK_STRIP
  } trk_e;

  typedef enum logic [2:0] {
    O_REPEAT, O_TYPE, O_BODY, O_ACK0, O_QUIET, O_TSTART, O_TTYPE, O_CLEAR
  } osel_e;

  snc_state_e state, after_rel;
  trk_e       trk;
  osel_e      osel;
  logic [8:0] cnt;
  logic [2:0] len_q;
  logic       match_q, rx_en_frame;
  logic       rx_enable, msg_here, arr_irq, snd_irq, waiting;
  logic       rep_q, force_q, out_next;

  header_t    ru_hdr, tx_hdr, rx_hdr;
  logic       idle_state, soft_reset;
  logic       len_known_now;
  logic [2:0] len_eff;
  logic       match_eff, at_ack;
  logic       gen_ok;
  logic [8:0] trip;

  assign ru_hdr = header_t'(ru_word);
  assign tx_hdr = header_t'(omb_hdr);
  assign rx_hdr = header_t'(imb_header);

  assign idle_state = (state == ST_IDLE) || (state == ST_ACKED) || (state == ST_NACKED);
  assign soft_reset = cmd[CMD_RESET];

  // Token generation: taken only while no send is in progress. The node then drops
  // everything that reaches it for one ring trip (machine size + 2 cycles, a size field
  // of 0 meaning 128) before it sends the token, so whatever was left on the ring (a
  // second token, the remains of a cut frame) is gone and exactly one token circulates.
  assign trip   = (mir.size == '0) ? 9'd128 : 9'(mir.size);
  assign gen_ok = cmd[CMD_GEN_TOKEN] && !cmd[CMD_SEND] && idle_state;

  // Header decode while a message passes: the header is complete in the receiving unit
  // when the first bit after it (position 34) arrives.
  always_comb begin
    len_known_now = (cnt == 9'(HDR_LAST + 1));
    len_eff       = len_known_now ? ru_hdr.len : len_q;
    match_eff     = len_known_now ? (ru_hdr.dest == mir.node_id) : match_q;
    at_ack        = (trk == TRK_MSG) && (cnt == ack_pos(len_eff));
  end

  // Control of the sending and receiving units
  always_comb begin
    su_clear = soft_reset;
    su_start = !soft_reset && (trk == TRK_TYPE) && !ring_in && (state == ST_WAIT);
    su_shift = (osel == O_BODY);
    ru_clear = soft_reset || ((trk == TRK_TYPE) && ring_in);
    ru_shift = !soft_reset && (trk == TRK_MSG) && !at_ack;
    ru_store = rx_en_frame && rx_enable && ((cnt <= 9'(HDR_LAST)) || match_eff);
  end

  // Main FSM, frame tracker and output FSM (rising edge)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      after_rel   <= ST_IDLE;
      trk         <= TRK_IDLE;
      osel        <= O_REPEAT;
      cnt         <= '0;
      len_q       <= '0;
      match_q     <= 1'b0;
      rx_en_frame <= 1'b0;
      rx_enable   <= 1'b0;
      msg_here    <= 1'b0;
      arr_irq     <= 1'b0;
      snd_irq     <= 1'b0;
      waiting     <= 1'b0;
      rep_q       <= 1'b0;
      force_q     <= 1'b0;
    end else if (soft_reset) begin
      state       <= ST_IDLE;
      after_rel   <= ST_IDLE;
      trk         <= TRK_IDLE;
      osel        <= O_REPEAT;
      cnt         <= '0;
      match_q     <= 1'b0;
      rx_en_frame <= 1'b0;
      rx_enable   <= 1'b0;
      msg_here    <= 1'b0;
      arr_irq     <= 1'b0;
      snd_irq     <= 1'b0;
      waiting     <= 1'b0;
      rep_q       <= 1'b0;
      force_q     <= 1'b0;
    end else begin
      rep_q   <= ring_in;
      force_q <= 1'b0;

      // ---- processor commands ----
      if (cmd[CMD_RX_ENABLE]) begin
        rx_enable <= 1'b1;
        msg_here  <= 1'b0;
        arr_irq   <= 1'b0;
      end
      if (cmd[CMD_RX_DISABLE]) rx_enable <= 1'b0;
      if (scr_read) snd_irq <= 1'b0;
      if (cmd[CMD_SEND] && idle_state) begin
        if (mir.size != '0 && tx_hdr.dest >= mir.size) begin  // size 0 = 128 nodes
          state   <= ST_NACKED;       // no such node: refuse without using the ring
          snd_irq <= 1'b1;
        end else begin
          state   <= ST_WAIT;
          waiting <= 1'b1;
        end
      end else if (gen_ok) begin
        after_rel <= state;
        state     <= ST_REL;
        osel      <= O_CLEAR;
      end

      // ---- frame tracker (idle while the line is being cleared) ----
      if (gen_ok || osel == O_CLEAR) begin
        trk <= TRK_IDLE;
        if (gen_ok)          cnt <= trip + 9'd1;
        else if (cnt != '0) cnt <= cnt - 9'd1;
      end else unique case (trk)
        TRK_IDLE: if (ring_in) trk <= TRK_TYPE;
        TRK_TYPE: begin
          if (!ring_in) begin                       // token
            if (state == ST_WAIT) begin             // seize it
              state <= ST_SEND;
              osel  <= O_TYPE;
              trk   <= TRK_STRIP_WAIT;
            end else begin
              trk <= TRK_IDLE;
            end
          end else begin                            // message
            trk         <= TRK_MSG;
            cnt         <= 9'(HDR_FIRST);
            rx_en_frame <= rx_enable;
          end
        end
        TRK_MSG: begin
          if (len_known_now) begin
            len_q   <= ru_hdr.len;
            match_q <= ru_hdr.dest == mir.node_id;
          end
          if (at_ack) begin
            trk <= TRK_IDLE;
            if (rx_en_frame && rx_enable && match_eff) begin
              force_q   <= 1'b1;                    // ACK in the slot as it passes
              rx_enable <= 1'b0;                    // protect the IMB
              msg_here  <= 1'b1;
              arr_irq   <= 1'b1;
            end
          end else begin
            cnt <= cnt + 9'd1;
          end
        end
        TRK_STRIP_WAIT: if (ring_in) begin          // own message returning
          trk <= TRK_STRIP;
          cnt <= 9'd1;
        end
        TRK_STRIP: begin
          if (cnt == ack_pos(su_len)) begin
            trk       <= TRK_IDLE;
            after_rel <= ring_in ? ST_ACKED : ST_NACKED;
            state     <= ST_REL;
            osel      <= O_TSTART;                  // always release the token
          end else begin
            cnt <= cnt + 9'd1;
          end
        end
        default: trk <= TRK_IDLE;
      endcase

      // ---- output FSM ----
      unique case (osel)
        O_TYPE:   osel <= O_BODY;
        O_BODY:   if (su_last) osel <= O_ACK0;
        O_ACK0: begin
          osel  <= O_QUIET;
          state <= ST_DRAIN;
        end
        O_CLEAR:  if (cnt == '0) osel <= O_TSTART;
        O_TSTART: osel <= O_TTYPE;
        O_TTYPE: begin
          osel  <= O_REPEAT;
          state <= after_rel;
          if (waiting) begin
            waiting <= 1'b0;
            snd_irq <= 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (osel)
      O_REPEAT: out_next = rep_q | force_q;
      O_TYPE:   out_next = 1'b1;
      O_BODY:   out_next = su_bit;
      O_TSTART: out_next = 1'b1;
      default:  out_next = 1'b0;          // O_ACK0, O_QUIET, O_TTYPE, O_CLEAR
    endcase
  end

  // Output register on the falling edge
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) ring_out <= 1'b0;
    else        ring_out <= out_next;
  end

  always_comb begin
    status          = '0;
    status.irq      = irq;
    status.vector   = rx_hdr.vector;
    status.ctrl     = rx_hdr.ctrl;
    status.rx_ready = rx_enable;
    status.msg_here = msg_here;
    status.waiting  = waiting;
    status.state    = state;
  end

  assign irq = arr_irq | snd_irq;

  // Protocol rules
  a_body_has_data: assert property (@(posedge clk) disable iff (!rst_n)
    osel == O_BODY |-> su_busy);
  a_strip_after_send: assert property (@(posedge clk) disable iff (!rst_n)
    trk == TRK_STRIP |-> (osel == O_QUIET || osel == O_BODY || osel == O_ACK0));

endmodule
