// tb_fugu_sn_ring: end-to-end test of the second network at its default size (32 nodes).
//
// Plays the kernel of every node through the processor ports: boots each MIR, enables
// receivers, has node 0 generate the token, then runs the traffic the network exists
// for (short flow-control messages and full 8-word paging blocks) and checks, against
// values computed here:
//   - one-word message delivered, ACKed, receiver auto-disabled, both interrupts;
//   - latency of a one-word message from send command to ACK below 145 cycles, the
//     figure the design targets for a 32-node serial ring;
//   - 8-word message delivered word for word across the ring's wrap-around;
//   - NACK for a disabled receiver, and success when the sender retransmits after
//     the receiver is enabled ("retransmit on failure");
//   - NACK for a second message to a node that has not re-enabled (IMB protected);
//   - immediate NACK for a destination beyond the machine size;
//   - all 32 nodes sending at once: every message ACKed, token released after each
//     message so no node sends twice in one rotation;
//   - protection trap for a user-mode access; network reset command;
//   - recovery: a second token is removed by generating a token, and after a message
//     is cut by resetting every controller one after another, generating a token
//     leaves exactly one token and the message can be sent again;
//   - every seizure that is not cut by a reset ends with the token released.
// Each mechanism is counted and a mechanism that never happened counts as a failure.
module tb_fugu_sn_ring;
  import fugu_sn_pkg::*;

  localparam int N = 32;

  logic clk = 0, rst_n = 0;
  logic [N-1:0]             cpu_read = '0, cpu_write_n = '1, cpu_supervisor = '1;
  logic [N-1:0][7:0]        cpu_asi = '0;
  logic [N-1:0][ADDR_W-1:0] cpu_addr = '0;
  logic [N-1:0][WORD_W-1:0] cpu_wdata = '0;
  logic [N-1:0][WORD_W-1:0] cpu_rdata;
  logic [N-1:0]             cpu_prot_trap, cpu_irq;

  int checks = 0, failures = 0;
  longint cyc = 0;

  // mechanism counters
  int n_token_gen = 0, n_seize = 0, n_release = 0, n_ack = 0, n_nack_ring = 0,
      n_nack_size = 0, n_autodisable = 0, n_multiword = 0, n_retransmit_ok = 0,
      n_prot_trap = 0, n_net_reset = 0, n_irq_arrival = 0, n_irq_send = 0,
      n_recovery = 0, n_tokens_seen = 0;

  fugu_sn_ring dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // token seizures and releases, seen on the ring itself
  scr_status_t st_arr [N];
  for (genvar i = 0; i < N; i++) begin : g_mon
    assign st_arr[i] = dut.g_node[i].u_snc.u_mcu.status;
    snc_state_e prev_state;
    always @(posedge clk) if (rst_n) begin
      if (dut.g_node[i].u_snc.u_mcu.su_start) n_seize++;
      if (st_arr[i].state == ST_REL && prev_state == ST_DRAIN) n_release++;
      prev_state <= st_arr[i].state;
    end
  end

  // tokens passing node 0: a start bit followed by a 0 type bit, seen by its tracker
  always @(posedge clk)
    if (rst_n && dut.g_node[0].u_snc.u_mcu.trk == 3'd1 && !dut.g_node[0].u_snc.ring_in)
      n_tokens_seen++;

  // count the tokens passing node 0 during `trips` ring trips
  task automatic count_tokens(input int trips, output int n);
    int n0;
    n0 = n_tokens_seen;
    repeat (trips * N) @(posedge clk);
    n = n_tokens_seen - n0;
  endtask

  // wait until node n has finished clearing the line and sent its token
  task automatic wait_generated(input int n);
    int k;
    k = 0;
    while (peek(n).state == ST_REL && k < 1000) begin
      @(posedge clk); k++;
    end
    check("token generation finished", 32'(peek(n).state == ST_REL), 0);
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (cycle %0d)", what, got, exp, cyc);
    end
  endtask

  // ---- one processor access on node n, one clock long ----
  task automatic st(input int n, input logic [7:0] asi, input int a, input logic [31:0] d);
    @(negedge clk);
    cpu_write_n[n] = 0; cpu_asi[n] = asi; cpu_addr[n] = 3'(a); cpu_wdata[n] = d;
    @(negedge clk);
    cpu_write_n[n] = 1;
  endtask

  task automatic ld(input int n, input logic [7:0] asi, input int a, output logic [31:0] d);
    @(negedge clk);
    cpu_read[n] = 1; cpu_asi[n] = asi; cpu_addr[n] = 3'(a);
    #1 d = cpu_rdata[n];
    @(negedge clk);
    cpu_read[n] = 0;
  endtask

  function automatic logic [31:0] hdr(input int ctrl, input int len, input int vec, input int dst);
    header_t h;
    h = '0;
    h.ctrl = 2'(ctrl); h.len = 3'(len); h.vector = 8'(vec); h.dest = 7'(dst);
    return 32'(h);
  endfunction

  function automatic scr_status_t peek(input int n);
    return st_arr[n];
  endfunction

  // compose and launch a message; returns the cycle of the send command
  task automatic send(input int n, input logic [31:0] h, input logic [31:0] data [7],
                      output longint t0);
    header_t hh;
    hh = header_t'(h);
    st(n, ASI_OMB, 0, h);
    for (int w = 0; w < int'(hh.len); w++) st(n, ASI_OMB, w + 1, data[w]);
    t0 = cyc;
    st(n, ASI_SCR, 0, 32'(1 << CMD_SEND));
  endtask

  // wait for the send on node n to finish; returns final state
  task automatic wait_done(input int n, input int limit, output snc_state_e s, output longint t1);
    int k;
    k = 0;
    while (peek(n).waiting && k < limit) begin
      @(posedge clk); k++;
    end
    t1 = cyc;
    s = peek(n).state;
    if (k >= limit) begin
      failures++;
      $display("FAIL node %0d send never finished", n);
    end
  endtask

  // record the result of a send
  task automatic account(input snc_state_e s);
    if (s == ST_ACKED) n_ack++;
    else if (s == ST_NACKED) n_nack_ring++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] d [7];
  logic [31:0] r;
  longint t0, t1;
  snc_state_e s;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- boot: MIR, receivers ----
    for (int i = 0; i < N; i++) begin
      st(i, ASI_MIR, 0, 32'((N << 8) | i));
      if (i != 5) st(i, ASI_SCR, 0, 32'(1 << CMD_RX_ENABLE));
    end
    ld(7, ASI_MIR, 0, r);
    check("MIR readback", r, 32'((N << 8) | 7));
    check("node 5 receiver off", 32'(peek(5).rx_ready), 0);
    check("node 6 receiver on", 32'(peek(6).rx_ready), 1);

    // ---- token generation ----
    st(0, ASI_SCR, 0, 32'(1 << CMD_GEN_TOKEN));
    n_token_gen++;
    repeat (3 * N) @(posedge clk);

    // ---- A: one-word flow-control message 3 -> 20 ----
    for (int w = 0; w < 7; w++) d[w] = 0;
    send(3, hdr(1, 0, 8'hC3, 20), d, t0);
    wait_done(3, 2000, s, t1);
    account(s);
    check("A ACK", 32'(s), 32'(ST_ACKED));
    $display("one-word message latency %0d cycles", t1 - t0);
    checks++;
    if (t1 - t0 >= 145) begin
      failures++;
      $display("FAIL latency %0d >= 145", t1 - t0);
    end
    check("A sender irq", 32'(cpu_irq[3]), 1);
    if (cpu_irq[3]) n_irq_send++;
    ld(3, ASI_SCR, 0, r);
    check("A sender status W", 32'(r[3]), 0);
    check("A irq cleared by status read", 32'(cpu_irq[3]), 0);
    check("A dest irq", 32'(cpu_irq[20]), 1);
    if (cpu_irq[20]) n_irq_arrival++;
    ld(20, ASI_IMB, 0, r);
    check("A header in IMB", r, hdr(1, 0, 8'hC3, 20));
    ld(20, ASI_SCR, 0, r);
    check("A status M", 32'(r[4]), 1);
    check("A status R (auto-disabled)", 32'(r[5]), 0);
    check("A status vector", 32'(r[15:8]), 32'hC3);
    check("A status ctrl", 32'(r[7:6]), 1);
    if (r[4] && !r[5]) n_autodisable++;
    check("A bystander untouched", 32'(peek(21).msg_here), 0);

    // ---- D: second message to node 20 before it re-enables -> NACK, IMB kept ----
    send(9, hdr(2, 1, 8'h11, 20), '{32'h1234_5678, 0, 0, 0, 0, 0, 0}, t0);
    wait_done(9, 2000, s, t1);
    account(s);
    check("D NACK (IMB protected)", 32'(s), 32'(ST_NACKED));
    ld(20, ASI_IMB, 0, r);
    check("D IMB kept", r, hdr(1, 0, 8'hC3, 20));

    // ---- B: 8-word paging block 10 -> 2, across the wrap of the ring ----
    for (int w = 0; w < 7; w++) d[w] = $urandom;
    send(10, hdr(0, 7, 8'h5A, 2), d, t0);
    wait_done(10, 4000, s, t1);
    account(s);
    check("B ACK", 32'(s), 32'(ST_ACKED));
    ld(2, ASI_IMB, 0, r);
    check("B header", r, hdr(0, 7, 8'h5A, 2));
    for (int w = 0; w < 7; w++) begin
      ld(2, ASI_IMB, w + 1, r);
      check("B data word", r, d[w]);
    end
    if (s == ST_ACKED) n_multiword++;
    $display("eight-word message latency %0d cycles", t1 - t0);

    // ---- C: disabled receiver -> NACK, then retransmit after enable ----
    send(12, hdr(3, 2, 8'h77, 5), '{32'hAAAA_0001, 32'hAAAA_0002, 0, 0, 0, 0, 0}, t0);
    wait_done(12, 2000, s, t1);
    account(s);
    check("C NACK", 32'(s), 32'(ST_NACKED));
    check("C no message at 5", 32'(peek(5).msg_here), 0);
    st(5, ASI_SCR, 0, 32'(1 << CMD_RX_ENABLE));
    st(12, ASI_SCR, 0, 32'(1 << CMD_SEND));        // OMB still holds the message
    wait_done(12, 2000, s, t1);
    account(s);
    check("C retransmit ACK", 32'(s), 32'(ST_ACKED));
    ld(5, ASI_IMB, 2, r);
    check("C retransmitted data", r, 32'hAAAA_0002);
    if (s == ST_ACKED) n_retransmit_ok++;

    // ---- E: destination beyond the machine size ----
    send(4, hdr(0, 0, 0, N + 3), d, t0);
    repeat (2) @(posedge clk);
    check("E immediate NACK", 32'(peek(4).state), 32'(ST_NACKED));
    check("E not waiting", 32'(peek(4).waiting), 0);
    if (peek(4).state == ST_NACKED) n_nack_size++;

    // ---- F: every node sends to its successor at once ----
    for (int i = 0; i < N; i++) st(i, ASI_SCR, 0, 32'(1 << CMD_RX_ENABLE));
    for (int i = 0; i < N; i++) begin
      st(i, ASI_OMB, 0, hdr(1, 1, i, (i + 1) % N));
      st(i, ASI_OMB, 1, 32'hF00D_0000 | i);
    end
    begin
      int seize0;
      seize0 = n_seize;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        cpu_write_n[i] = 0; cpu_asi[i] = ASI_SCR; cpu_wdata[i] = 32'(1 << CMD_SEND);
      end
      @(negedge clk);
      cpu_write_n = '1;
      for (int i = 0; i < N; i++) begin
        wait_done(i, 20000, s, t1);
        account(s);
        check("F ACK", 32'(s), 32'(ST_ACKED));
      end
      check("F one seizure per node", 32'(n_seize - seize0), N);
      for (int i = 0; i < N; i++) begin
        ld((i + 1) % N, ASI_IMB, 1, r);
        check("F data", r, 32'hF00D_0000 | i);
      end
    end

    // ---- G: user-mode access traps ----
    @(negedge clk);
    cpu_supervisor[8] = 0; cpu_read[8] = 1; cpu_asi[8] = ASI_IMB; #1;
    check("G trap", 32'(cpu_prot_trap[8]), 1);
    if (cpu_prot_trap[8]) n_prot_trap++;
    @(negedge clk);
    cpu_supervisor[8] = 1; cpu_read[8] = 0;

    // ---- H: network reset command on a node ----
    st(15, ASI_SCR, 0, 32'(1 << CMD_RESET));
    check("H state idle", 32'(peek(15).state), 32'(ST_IDLE));
    check("H receiver off", 32'(peek(15).rx_ready), 0);
    check("H irq clear", 32'(cpu_irq[15]), 0);
    if (peek(15).state == ST_IDLE) n_net_reset++;
    // the ring still works afterwards
    st(15, ASI_SCR, 0, 32'(1 << CMD_RX_ENABLE));
    send(16, hdr(0, 0, 8'h42, 15), d, t0);
    wait_done(16, 2000, s, t1);
    account(s);
    check("H ring works after reset", 32'(s), 32'(ST_ACKED));

    // ---- I: recovery by token generation ----
    begin
      int ntok;
      logic [31:0] m [7];
      // I1: a second token: node 9 generates one while the ring already has a token
      count_tokens(10, ntok);
      checks++;
      if (ntok < 9 || ntok > 11) begin
        failures++; $display("FAIL I1 tokens before: %0d in 10 trips", ntok);
      end
      st(9, ASI_SCR, 0, 32'(1 << CMD_GEN_TOKEN));
      n_token_gen++;
      wait_generated(9);
      count_tokens(10, ntok);
      checks++;
      if (ntok < 9 || ntok > 11) begin
        failures++; $display("FAIL I1 tokens after regeneration: %0d in 10 trips", ntok);
      end else n_recovery++;
      // I2: an 8-word message is cut while being sent: every kernel resets its
      // controller, one node after another, then node 5 generates a token
      for (int w = 0; w < 7; w++) m[w] = $urandom;
      send(3, hdr(3, 7, 8'h33, 20), m, t0);
      while (peek(3).state != ST_SEND) @(posedge clk);
      repeat (40) @(posedge clk);
      for (int i = 0; i < N; i++) st((i + 3) % N, ASI_SCR, 0, 32'(1 << CMD_RESET));
      st(5, ASI_SCR, 0, 32'(1 << CMD_GEN_TOKEN));
      n_token_gen++;
      wait_generated(5);
      count_tokens(10, ntok);
      checks++;
      if (ntok < 9 || ntok > 11) begin
        failures++; $display("FAIL I2 tokens after recovery: %0d in 10 trips", ntok);
      end
      for (int i = 0; i < N; i++) st(i, ASI_SCR, 0, 32'(1 << CMD_RX_ENABLE));
      st(3, ASI_SCR, 0, 32'(1 << CMD_SEND));     // the OMB still holds the message
      wait_done(3, 2000, s, t1);
      account(s);
      check("I2 resend after recovery ACKed", 32'(s), 32'(ST_ACKED));
      for (int w = 0; w < 7; w++) begin
        ld(20, ASI_IMB, w + 1, r);
        check("I2 word after recovery", r, m[w]);
      end
      if (s == ST_ACKED && ntok >= 9 && ntok <= 11) n_recovery++;
    end
    // every seizure but the one cut in I2 ended with the token released
    check("token released after every completed send", 32'(n_release), 32'(n_seize - 1));

    $display("mechanisms: token_gen=%0d seize=%0d release=%0d ack=%0d nack_ring=%0d nack_size=%0d",
             n_token_gen, n_seize, n_release, n_ack, n_nack_ring, n_nack_size);
    $display("            autodisable=%0d multiword=%0d retransmit_ok=%0d prot_trap=%0d net_reset=%0d irq_arrival=%0d irq_send=%0d recovery=%0d",
             n_autodisable, n_multiword, n_retransmit_ok, n_prot_trap, n_net_reset,
             n_irq_arrival, n_irq_send, n_recovery);
    if (n_token_gen == 0)     begin failures++; $display("FAIL no token generation"); end
    if (n_seize == 0)         begin failures++; $display("FAIL no token seizure"); end
    if (n_ack == 0)           begin failures++; $display("FAIL no ACK"); end
    if (n_nack_ring == 0)     begin failures++; $display("FAIL no NACK"); end
    if (n_nack_size == 0)     begin failures++; $display("FAIL no size NACK"); end
    if (n_autodisable == 0)   begin failures++; $display("FAIL no auto-disable"); end
    if (n_multiword == 0)     begin failures++; $display("FAIL no 8-word message"); end
    if (n_retransmit_ok == 0) begin failures++; $display("FAIL no retransmission"); end
    if (n_prot_trap == 0)     begin failures++; $display("FAIL no protection trap"); end
    if (n_net_reset == 0)     begin failures++; $display("FAIL no network reset"); end
    if (n_irq_arrival == 0)   begin failures++; $display("FAIL no arrival interrupt"); end
    if (n_irq_send == 0)      begin failures++; $display("FAIL no send interrupt"); end
    if (n_recovery < 2)       begin failures++; $display("FAIL recovery not shown twice"); end
    checks += 13;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
