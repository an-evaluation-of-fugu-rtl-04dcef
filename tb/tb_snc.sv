// tb_snc: self-checking test of one second-network controller, two of them closed into
// a two-node ring. Node 0 generates the token; the nodes exchange messages of several
// lengths in both directions and the test checks delivery word for word, ACK/NACK in
// the status register, interrupts, receiver auto-disable, the size check, a user-mode
// trap, and that the token keeps circulating (both nodes can send in turn).
module tb_snc;
  import fugu_sn_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [1:0] link;
  logic        rd [2], wn [2], sup [2];
  logic [7:0]  asi [2];
  logic [2:0]  adr [2];
  logic [31:0] wd [2], rdat [2];
  logic        trap [2], irq [2];
  int checks = 0, failures = 0;

  snc u0 (.clk, .rst_n, .ring_in(link[1]), .ring_out(link[0]),
          .cpu_read(rd[0]), .cpu_write_n(wn[0]), .cpu_asi(asi[0]), .cpu_addr(adr[0]),
          .cpu_wdata(wd[0]), .cpu_supervisor(sup[0]), .cpu_rdata(rdat[0]),
          .cpu_prot_trap(trap[0]), .cpu_irq(irq[0]));
  snc u1 (.clk, .rst_n, .ring_in(link[0]), .ring_out(link[1]),
          .cpu_read(rd[1]), .cpu_write_n(wn[1]), .cpu_asi(asi[1]), .cpu_addr(adr[1]),
          .cpu_wdata(wd[1]), .cpu_supervisor(sup[1]), .cpu_rdata(rdat[1]),
          .cpu_prot_trap(trap[1]), .cpu_irq(irq[1]));

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic st(input int n, input logic [7:0] a, input int ad, input logic [31:0] d);
    @(negedge clk);
    wn[n] = 0; asi[n] = a; adr[n] = 3'(ad); wd[n] = d;
    @(negedge clk);
    wn[n] = 1;
  endtask

  task automatic ld(input int n, input logic [7:0] a, input int ad, output logic [31:0] d);
    @(negedge clk);
    rd[n] = 1; asi[n] = a; adr[n] = 3'(ad);
    #1 d = rdat[n];
    @(negedge clk);
    rd[n] = 0;
  endtask

  // poll the status register until W clears; return it
  task automatic poll(input int n, output scr_status_t s);
    logic [31:0] r;
    int k;
    k = 0;
    do begin
      ld(n, ASI_SCR, 0, r);
      k++;
    end while (r[3] && k < 500);
    s = scr_status_t'(r);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] msg [8];
  logic [31:0] r;
  scr_status_t s;

  initial begin
    for (int n = 0; n < 2; n++) begin
      rd[n] = 0; wn[n] = 1; sup[n] = 1; asi[n] = 0; adr[n] = 0; wd[n] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    ld(0, ASI_SCR, 0, r);
    check("reset status", r, 0);
    for (int n = 0; n < 2; n++) begin
      st(n, ASI_MIR, 0, 32'((2 << 8) | n));
      st(n, ASI_SCR, 0, 32'(1 << CMD_RX_ENABLE));
    end
    st(0, ASI_SCR, 0, 32'(1 << CMD_GEN_TOKEN));
    do ld(0, ASI_SCR, 0, r);                  // wait while the line is cleared
    while (r[2:0] == 3'(ST_REL));

    for (int it = 0; it < 8; it++) begin
      int src, dst;
      src = it % 2; dst = 1 - src;
      for (int w = 0; w < 8; w++) msg[w] = $urandom;
      msg[0][18:16] = 3'(it); msg[0][6:0] = 7'(dst); msg[0][15] = 0;
      for (int w = 0; w <= it; w++) st(src, ASI_OMB, w, msg[w]);
      st(src, ASI_SCR, 0, 32'(1 << CMD_SEND));
      poll(src, s);
      check("ACK", 32'(s.state), 32'(ST_ACKED));
      check("dest irq", 32'(irq[dst]), 1);
      ld(dst, ASI_SCR, 0, r);
      check("dest M", 32'(r[4]), 1);
      check("dest R off", 32'(r[5]), 0);
      check("dest vector", 32'(r[15:8]), 32'(msg[0][14:7]));
      for (int w = 0; w <= it; w++) begin
        ld(dst, ASI_IMB, w, r);
        check("IMB word", r, msg[w]);
      end
      // second message while the receiver is still off -> NACK
      if (it == 3) begin
        st(src, ASI_SCR, 0, 32'(1 << CMD_SEND));
        poll(src, s);
        check("NACK when receiver off", 32'(s.state), 32'(ST_NACKED));
      end
      st(dst, ASI_SCR, 0, 32'(1 << CMD_RX_ENABLE));
      check("irq cleared", 32'(irq[dst]), 0);
    end

    // destination outside the machine
    st(1, ASI_OMB, 0, 32'h0000_0009);
    st(1, ASI_SCR, 0, 32'(1 << CMD_SEND));
    ld(1, ASI_SCR, 0, r);
    check("size NACK", 32'(r[2:0]), 32'(ST_NACKED));

    // explicit receiver disable
    st(0, ASI_SCR, 0, 32'(1 << CMD_RX_DISABLE));
    ld(0, ASI_SCR, 0, r);
    check("disable", 32'(r[5]), 0);

    // user-mode store traps
    @(negedge clk); sup[1] = 0; wn[1] = 0; asi[1] = ASI_OMB; #1;
    check("trap", 32'(trap[1]), 1);
    @(negedge clk); sup[1] = 1; wn[1] = 1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
