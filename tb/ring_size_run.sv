// ring_size_run: test sequence for one second-network ring of N controllers, used by
// tb_fugu_ring_sizes to run the same traffic on rings of different sizes.
//
// When `start` rises, it plays the kernel of every node through the processor ports.
// Every node writes its MIR, with a size field of N mod 128 (0 stands for 128 nodes).
// Every node enables its receiver, and node 0 generates the token. Then:
//   - node 1 sends a one-word message to node N-1. The time from the send command to
//     the ACK must be at least the 35-bit frame plus N hops, and at most that plus one
//     token rotation and a few cycles of command and status latency;
//   - a message to the highest node ID, N-1, is ACKed (at N = 128 this checks that a
//     size field of 0 is read as 128);
//   - a destination at or above N (only when N < 128) is refused at once with a NACK;
//   - every node sends one 3-word message to its downstream neighbour at the same
//     time. All must be ACKed, each receiver must hold the right words, and the token
//     must have been seized exactly N times, so no node sent twice before all had sent.
// `done` rises when the sequence ends; `checks` and `failures` count the results.
// The sizes exercised come from the description: a 4-node prototype ring and 7-bit node
// IDs. The latency bounds follow from this design's own frame format.
// The ring is clocked by `clk` from the parent. Timing follows the controller: inputs
// are driven after the falling edge and held for one clock.
module ring_size_run
  import fugu_sn_pkg::*;
#(
  parameter int N = 4
)(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);

  logic [N-1:0]             cpu_read = '0, cpu_write_n = '1, cpu_supervisor = '1;
  logic [N-1:0][7:0]        cpu_asi = '0;
  logic [N-1:0][ADDR_W-1:0] cpu_addr = '0;
  logic [N-1:0][WORD_W-1:0] cpu_wdata = '0;
  logic [N-1:0][WORD_W-1:0] cpu_rdata;
  logic [N-1:0]             cpu_prot_trap, cpu_irq;

  fugu_sn_ring #(.N_NODES(N)) dut (.*);

  longint cyc = 0;   // cycle counter for reports
  int     n_seize = 0;
  always @(posedge clk) cyc <= cyc + 1;

  scr_status_t st_arr [N];
  for (genvar i = 0; i < N; i++) begin : g_mon
    assign st_arr[i] = dut.g_node[i].u_snc.u_mcu.status;
    always @(posedge clk) if (rst_n && dut.g_node[i].u_snc.u_mcu.su_start) n_seize++;
  end

  initial begin
    checks = 0; failures = 0; done = 0;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL N=%0d %s: got %h expected %h (cycle %0d)", N, what, got, exp, cyc);
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

  function automatic logic [31:0] hdr(input int len, input int vec, input int dst);
    header_t h;
    h = '0;
    h.ctrl = 2'd1; h.len = 3'(len); h.vector = 8'(vec); h.dest = 7'(dst);
    return 32'(h);
  endfunction

  function automatic logic [31:0] word_of(input int src, input int w);
    return 32'hA500_0000 ^ 32'(src << 8) ^ 32'(w);
  endfunction

  // send what is in node n's OMB and wait for the result
  task automatic launch(input int n, output snc_state_e s, output longint lat);
    longint t0;
    int k;
    t0 = cyc;
    st(n, ASI_SCR, 0, 32'(1 << CMD_SEND));
    k = 0;
    while (st_arr[n].waiting && k < N * (N + 300) + 1000) begin
      @(posedge clk); k++;
    end
    s = st_arr[n].state;
    lat = cyc - t0;
  endtask

  logic go_all = 0;
  int   all_done = 0;

  // one process per node for the simultaneous sends
  for (genvar i = 0; i < N; i++) begin : g_kernel
    initial begin
      snc_state_e s;
      longint lat;
      wait (go_all);
      st(i, ASI_OMB, 0, hdr(3, i, (i + 1) % N));
      for (int w = 0; w < 3; w++) st(i, ASI_OMB, w + 1, word_of(i, w));
      launch(i, s, lat);
      check("simultaneous send ACKed", 32'(s), 32'(ST_ACKED));
      all_done++;
    end
  end

  initial begin
    snc_state_e s;
    longint lat;
    logic [31:0] r;
    int seize0;
    header_t h;
    wait (start && rst_n);
    for (int i = 0; i < N; i++) begin
      st(i, ASI_MIR, 0, 32'(((N % 128) << 8) | i));
      st(i, ASI_SCR, 0, 32'(1 << CMD_RX_ENABLE));
    end
    st(0, ASI_SCR, 0, 32'(1 << CMD_GEN_TOKEN));

    // one-word message across the ring
    st(1, ASI_OMB, 0, hdr(0, 'h5A, N - 1));
    launch(1, s, lat);
    check("one-word message ACKed", 32'(s), 32'(ST_ACKED));
    checks++;
    if (lat < 35 + N || lat > 35 + 2 * N + 12) begin
      failures++;
      $display("FAIL N=%0d one-word latency %0d outside [%0d, %0d]", N, lat, 35 + N,
               35 + 2 * N + 12);
    end
    $display("N=%0d: one-word message latency %0d cycles", N, lat);
    ld(N - 1, ASI_SCR, 0, r);
    check("vector at highest node", 32'(r[15:8]), 32'h5A);
    st(N - 1, ASI_SCR, 0, 32'(1 << CMD_RX_ENABLE));

    // destination beyond the machine
    if (N < 128) begin
      st(0, ASI_OMB, 0, hdr(0, 0, N));
      launch(0, s, lat);
      check("destination beyond machine NACKed", 32'(s), 32'(ST_NACKED));
      checks++;
      if (lat > 6) begin
        failures++;
        $display("FAIL N=%0d refusal took %0d cycles", N, lat);
      end
    end

    // every node sends at once
    seize0 = n_seize;
    lat = cyc;
    go_all = 1;
    wait (all_done == N);
    $display("N=%0d: %0d simultaneous 3-word messages in %0d cycles", N, N, cyc - lat);
    check("one token seizure per message", 32'(n_seize - seize0), 32'(N));
    for (int i = 0; i < N; i++) begin
      int src;
      src = (i + N - 1) % N;
      ld(i, ASI_IMB, 0, r);
      h = header_t'(r);
      check("header source", 32'(h.vector), 32'(8'(src)));
      for (int w = 0; w < 3; w++) begin
        ld(i, ASI_IMB, w + 1, r);
        check("data word", r, word_of(src, w));
      end
    end
    done = 1;
  end

endmodule
