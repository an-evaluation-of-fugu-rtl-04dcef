// tb_fugu_workloads: the two jobs the second network exists for, run on the default
// 32-node ring, with the kernel of each node played here through its processor port.
//
// 1. Throttling burst. An overflowed receiver (node 0) sends a one-word throttling
//    message to each of the other 31 nodes, one after the other, then a reactivation
//    message to each. The design target is that the burst completes before an
//    overflow buffer of Q_OVF = 100 messages fills at r_fill = r_b - r_h =
//    1/100 - 1/1000 messages per cycle, i.e. N x T_SN <= Q_OVF / r_fill = 11111 cycles,
//    and that one message takes under 145 cycles on a 32-node serial ring. Both are
//    checked, and every node must hold the right message type.
// 2. Overflow page transfer. Node 7 pages out one page of 100 eight-word messages
//    (800 words) to node 22 in second-network messages of one header and seven data
//    words; the header's vector field numbers the block. Node 22's kernel polls, copies
//    each block out of its IMB, spends HANDLER cycles on it (one of the message-handler
//    latencies of the evaluation) and re-enables its receiver; node 7 retransmits every
//    block that comes back NACKed because node 22 had not re-enabled yet. The page is
//    sent twice: once with HANDLER = 0 and once with HANDLER = 320. It must
//    arrive intact; the transfer time is reported next to the first-order model
//    T_page = (P/K) x T_HW + P/B with B = 1 bit per cycle.
module tb_fugu_workloads;
  import fugu_sn_pkg::*;

  localparam int N          = 32;
  localparam int PAGE_WORDS = 800;
  localparam int BLK        = 7;
  localparam int NBLK       = (PAGE_WORDS + BLK - 1) / BLK;   // 115
  localparam int HANDLER    = 320;   // receiving kernel's time per block, cycles

  logic clk = 0, rst_n = 0;
  logic [N-1:0]             cpu_read = '0, cpu_write_n = '1, cpu_supervisor = '1;
  logic [N-1:0][7:0]        cpu_asi = '0;
  logic [N-1:0][ADDR_W-1:0] cpu_addr = '0;
  logic [N-1:0][WORD_W-1:0] cpu_wdata = '0;
  logic [N-1:0][WORD_W-1:0] cpu_rdata;
  logic [N-1:0]             cpu_prot_trap, cpu_irq;

  int checks = 0, failures = 0;
  longint cyc = 0;

  fugu_sn_ring dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (cycle %0d)", what, got, exp, cyc);
    end
  endtask

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

  // launch what is in the OMB and poll the status until the send is over
  task automatic launch(input int n, output scr_status_t s);
    logic [31:0] r;
    int k;
    st(n, ASI_SCR, 0, 32'(1 << CMD_SEND));
    k = 0;
    do begin
      ld(n, ASI_SCR, 0, r);
      k++;
    end while (r[3] && k < 2000);
    s = scr_status_t'(r);
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] page_tx [PAGE_WORDS];
  logic [31:0] page_rx [PAGE_WORDS];
  logic [31:0] r;
  scr_status_t s;
  longint t0, t1, tmax;
  int nacks, got_blocks;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      st(i, ASI_MIR, 0, 32'((N << 8) | i));
      st(i, ASI_SCR, 0, 32'(1 << CMD_RX_ENABLE));
    end
    st(0, ASI_SCR, 0, 32'(1 << CMD_GEN_TOKEN));
    do ld(0, ASI_SCR, 0, r);                  // wait while the line is cleared
    while (r[2:0] == 3'(ST_REL));

    // ---------------- 1. throttling burst ----------------
    for (int phase = 1; phase <= 2; phase++) begin   // 1 = throttle, 2 = reactivate
      longint burst0;
      tmax = 0;
      burst0 = cyc;
      for (int d = 1; d < N; d++) begin
        st(0, ASI_OMB, 0, hdr(phase, 0, 8'h40 + d, d));
        t0 = cyc;
        launch(0, s);
        t1 = cyc;
        check("flow-control ACK", 32'(s.state), 32'(ST_ACKED));
        if (t1 - t0 > tmax) tmax = t1 - t0;
      end
      $display("flow-control phase %0d: %0d messages in %0d cycles, worst %0d cycles each",
               phase, N - 1, cyc - burst0, tmax);
      checks++;
      if (cyc - burst0 > 11111) begin
        failures++;
        $display("FAIL burst exceeds Q_OVF/r_fill = 11111 cycles");
      end
      checks++;
      if (tmax >= 145) begin
        failures++;
        $display("FAIL one message took %0d cycles (>= 145)", tmax);
      end
      for (int d = 1; d < N; d++) begin
        ld(d, ASI_SCR, 0, r);
        check("flow-control type at node", 32'(r[7:6]), 32'(phase));
        check("flow-control vector at node", 32'(r[15:8]), 32'(8'h40 + d));
        st(d, ASI_SCR, 0, 32'(1 << CMD_RX_ENABLE));
      end
    end

    // ---------------- 2. overflow page transfer ----------------
    // first with a receiving kernel that copies each block out at once, then with one
    // that spends HANDLER cycles per block, so blocks come back NACKed and are resent
    for (int pass = 0; pass < 2; pass++) begin
      int handler;
      handler = (pass == 0) ? 0 : HANDLER;
      for (int w = 0; w < PAGE_WORDS; w++) begin
        page_tx[w] = $urandom;
        page_rx[w] = 32'hDEAD_DEAD;
      end
      nacks = 0; got_blocks = 0;
      t0 = cyc;
      fork
        begin : sender
          for (int b = 0; b < NBLK; b++) begin
            int nw;
            nw = (PAGE_WORDS - b * BLK < BLK) ? PAGE_WORDS - b * BLK : BLK;
            st(7, ASI_OMB, 0, hdr(3, nw, b, 22));
            for (int w = 0; w < nw; w++) st(7, ASI_OMB, w + 1, page_tx[b * BLK + w]);
            do begin
              launch(7, s);
              if (s.state == ST_NACKED) nacks++;
            end while (s.state != ST_ACKED);
          end
        end
        begin : receiver
          while (got_blocks < NBLK) begin
            logic [31:0] h;
            header_t hh;
            ld(22, ASI_SCR, 0, r);
            if (r[4]) begin
              ld(22, ASI_IMB, 0, h);
              hh = header_t'(h);
              for (int w = 0; w < int'(hh.len); w++) begin
                ld(22, ASI_IMB, w + 1, r);
                page_rx[int'(hh.vector) * BLK + w] = r;
              end
              repeat (handler) @(posedge clk);          // kernel's handler time
              st(22, ASI_SCR, 0, 32'(1 << CMD_RX_ENABLE));
              got_blocks++;
            end
          end
        end
      join
      t1 = cyc;
      begin
        int bad;
        bad = 0;
        for (int w = 0; w < PAGE_WORDS; w++) if (page_rx[w] !== page_tx[w]) bad++;
        check("page words wrong", 32'(bad), 0);
      end
      check("blocks received", 32'(got_blocks), NBLK);
      $display("page of %0d words, handler %0d cycles: %0d blocks, %0d NACKed and retransmitted, %0d cycles",
               PAGE_WORDS, handler, NBLK, nacks, t1 - t0);
      checks++;
      if (t1 - t0 < PAGE_WORDS * 32) begin
        failures++;
        $display("FAIL page faster than the serial line allows");
      end
      checks++;
      if (pass == 1 && nacks == 0) begin
        failures++;
        $display("FAIL retransmit-on-NACK never exercised");
      end
    end
    $display("first-order model: P/B = %0d cycles of data at 1 bit/cycle plus per-block overhead",
             PAGE_WORDS * 32);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
