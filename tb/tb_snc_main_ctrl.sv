// tb_snc_main_ctrl: bit-level test of the main control unit on its own.
// The sending and receiving units are replaced by small models here, and the ring is
// driven bit by bit. For every scenario the expected ring output is computed here and
// compared with what the unit drives, one cycle after each input bit:
//   - a token passing a node with nothing to send is repeated unchanged;
//   - a message for another node is repeated unchanged, its ACK slot stays 0;
//   - a message for this node with the receiver on gets a 1 in its ACK slot, the header
//     and body are offered for storing, the receiver switches off, the interrupt rises;
//   - the next message for this node, receiver off, passes with ACK 0 and is not stored;
//   - after a send command the node seizes a token: it repeats the start bit, turns the
//     type bit to 1, drives the body from the sending unit and a 0 ACK slot, stays quiet
//     until its frame returns, reads the ACK and releases a new token;
//   - a send to a node beyond the machine size is refused at once;
//   - a generate-token command drops whatever arrives for one ring trip, then puts a
//     token on the line and goes back to repeating; it is ignored during a send.
module tb_snc_main_ctrl;
  import fugu_sn_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ring_in = 0, ring_out;
  logic [4:0] cmd = 0;
  logic scr_read = 0;
  mir_t mir;
  scr_status_t status;
  logic irq;
  logic [31:0] omb_hdr = 0, imb_header = 32'h4000_3F85;
  logic su_clear, su_start, su_shift, su_busy, su_bit, su_last;
  logic [2:0] su_len;
  logic ru_clear, ru_shift, ru_store;
  logic [31:0] ru_word;
  int checks = 0, failures = 0;

  snc_main_ctrl dut (.*);

  always #5 clk = ~clk;

  // ---- sending unit model: serialises tx_bits[0 .. tx_n-1] ----
  logic tx_bits [300];
  int tx_n = 0, tx_i = 0;
  logic tx_busy = 0;
  assign su_busy = tx_busy;
  assign su_bit  = tx_busy && tx_bits[tx_i];
  assign su_last = tx_busy && (tx_i == tx_n - 1);
  assign su_len  = 3'((tx_n / 32) - 1);
  always @(posedge clk) begin
    if (su_start) begin tx_busy <= 1; tx_i <= 0; end
    else if (su_shift && tx_busy) begin
      if (tx_i == tx_n - 1) tx_busy <= 0;
      tx_i <= tx_i + 1;
    end
  end

  // ---- receiving unit model: shift register, counts stored bits ----
  logic [31:0] sr = 0;
  int stored = 0, shifted = 0;
  assign ru_word = sr;
  always @(posedge clk) begin
    if (ru_shift) begin
      sr <= {sr[30:0], ring_in};
      shifted <= shifted + 1;
      if (ru_store) stored <= stored + 1;
    end
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // Feed bits in[0..] one per cycle; compare ring_out against exp[] shifted by one.
  task automatic run(input logic in [$], input logic exp [$], input string what);
    int mism;
    mism = 0;
    for (int t = 0; t < in.size(); t++) begin
      @(negedge clk); #1;
      if (t > 0 && ring_out !== exp[t - 1]) begin
        mism++;
        if (mism < 4) $display("  %s: bit %0d out=%0b exp=%0b", what, t - 1, ring_out, exp[t - 1]);
      end
      ring_in = in[t];
    end
    @(negedge clk); #1;
    if (ring_out !== exp[in.size() - 1]) mism++;
    ring_in = 0;
    check(what, 32'(mism), 0);
  endtask

  function automatic void add_word(ref logic q [$], input logic [31:0] w);
    for (int b = 31; b >= 0; b--) q.push_back(w[b]);
  endfunction

  function automatic void zeros(ref logic q [$], input int n);
    repeat (n) q.push_back(1'b0);
  endfunction

  function automatic logic [31:0] hdr(input int len, input int dst);
    return 32'h4000_0000 | 32'(len << 16) | 32'(8'h3C << 7) | 32'(dst);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic in_q [$], exp_q [$];

  initial begin
    mir = '0; mir.node_id = 7'd5; mir.size = 7'd16;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check("reset state", 32'(status.state), 32'(ST_IDLE));
    check("reset receiver off", 32'(status.rx_ready), 0);
    cmd = 5'(1 << CMD_RX_ENABLE); @(negedge clk); cmd = 0;
    check("receiver on", 32'(status.rx_ready), 1);
    check("status vector from IMB header", 32'(status.vector), 32'h7F);

    // 1. token passes unchanged
    in_q = {}; in_q.push_back(1); in_q.push_back(0); zeros(in_q, 6);
    exp_q = in_q;
    run(in_q, exp_q, "token repeated");

    // 2. message for node 9 passes unchanged
    in_q = {}; in_q.push_back(1); in_q.push_back(1);
    add_word(in_q, hdr(1, 9)); add_word(in_q, 32'hCAFE_F00D); in_q.push_back(0); zeros(in_q, 4);
    exp_q = in_q;
    stored = 0; shifted = 0;
    run(in_q, exp_q, "foreign message repeated");
    check("foreign: body shifted", 32'(shifted), 64);
    check("foreign: only header offered for storing", 32'(stored), 32);
    check("foreign: no irq", 32'(irq), 0);

    // 3. message for this node: ACK slot set
    in_q = {}; in_q.push_back(1); in_q.push_back(1);
    add_word(in_q, hdr(2, 5)); add_word(in_q, 32'h1111_2222); add_word(in_q, 32'h3333_4444);
    in_q.push_back(0); zeros(in_q, 4);
    exp_q = in_q; exp_q[2 + 96] = 1;
    stored = 0;
    run(in_q, exp_q, "own message acknowledged");
    check("own: all stored", 32'(stored), 96);
    check("own: irq", 32'(irq), 1);
    check("own: msg here", 32'(status.msg_here), 1);
    check("own: receiver off", 32'(status.rx_ready), 0);

    // 4. next message for this node: receiver off -> ACK stays 0, nothing stored
    in_q = {}; in_q.push_back(1); in_q.push_back(1);
    add_word(in_q, hdr(0, 5)); in_q.push_back(0); zeros(in_q, 3);
    exp_q = in_q;
    stored = 0;
    run(in_q, exp_q, "refused message passes with NACK");
    check("refused: nothing stored", 32'(stored), 0);
    cmd = 5'(1 << CMD_RX_ENABLE); @(negedge clk); cmd = 0;
    check("enable clears irq", 32'(irq), 0);

    // 5. send: seize token, send 2 words, wait for the frame, release token
    tx_n = 64;
    for (int b = 0; b < 64; b++) tx_bits[b] = (b < 32) ? hdr(1, 3)[31 - b] : ((b * 7) % 3 == 0);
    omb_hdr = hdr(1, 3);
    cmd = 5'(1 << CMD_SEND); @(negedge clk); cmd = 0;
    check("send: waiting", 32'(status.waiting), 1);
    check("send: state WAIT", 32'(status.state), 32'(ST_WAIT));
    in_q = {}; in_q.push_back(1); in_q.push_back(0); zeros(in_q, 78);  // token, then quiet
    exp_q = {}; exp_q.push_back(1); exp_q.push_back(1);
    for (int b = 0; b < 64; b++) exp_q.push_back(tx_bits[b]);
    exp_q.push_back(0);                                                   // ACK slot
    // the frame comes back round starting at input bit 80, with ACK = 1
    for (int b = 0; b < 67; b++) in_q.push_back(b == 66 ? 1'b1 : exp_q[b]);
    in_q.push_back(0); in_q.push_back(0); in_q.push_back(0);
    zeros(exp_q, in_q.size() - exp_q.size());
    exp_q[80 + 66] = 1;  // released token: start bit right after the ACK slot
    exp_q[80 + 67] = 0;  // token type bit
    run(in_q, exp_q, "seize, send, strip, release");
    check("send: ACKed", 32'(status.state), 32'(ST_ACKED));
    check("send: not waiting", 32'(status.waiting), 0);
    check("send: irq", 32'(irq), 1);
    scr_read = 1; @(negedge clk); scr_read = 0;
    check("status read clears irq", 32'(irq), 0);

    // 6. destination beyond machine size
    omb_hdr = hdr(0, 20);
    cmd = 5'(1 << CMD_SEND); @(negedge clk); cmd = 0;
    check("size: NACK", 32'(status.state), 32'(ST_NACKED));
    check("size: irq", 32'(irq), 1);

    // 7. generate a token: the line is cleared for one ring trip (size 16 + 2 cycles),
    //    dropping the garbage that arrives meanwhile, then start and type bits go out,
    //    then the node repeats again
    cmd = 5'(1 << CMD_GEN_TOKEN);
    @(negedge clk); #1;
    cmd = 0;
    check("clearing: state REL", 32'(status.state), 32'(ST_REL));
    check("clearing: first bit quiet", 32'(ring_out), 0);
    in_q = {};
    for (int t = 0; t < 16; t++) in_q.push_back(1'((t % 3) != 2));   // remains of frames
    zeros(in_q, 9);
    in_q.push_back(1'b1); in_q.push_back(1'b0);                        // a token, later
    zeros(in_q, 4);
    exp_q = {}; zeros(exp_q, 16);                   // with the bit checked above: 18 quiet
    exp_q.push_back(1'b1); exp_q.push_back(1'b0);                      // generated token
    zeros(exp_q, 7);
    exp_q.push_back(1'b1); exp_q.push_back(1'b0);                      // repeated token
    zeros(exp_q, 4);
    run(in_q, exp_q, "generated token after clearing");
    check("generated: state back", 32'(status.state), 32'(ST_NACKED));

    // 8. generate-token command ignored while a send is pending
    omb_hdr = hdr(0, 3);
    cmd = 5'(1 << CMD_SEND); @(negedge clk);
    cmd = 5'(1 << CMD_GEN_TOKEN); @(negedge clk); #1;
    cmd = 0;
    check("no generation while waiting", 32'(status.state), 32'(ST_WAIT));
    in_q = {}; zeros(in_q, 24);
    exp_q = {}; zeros(exp_q, 24);
    run(in_q, exp_q, "line stays quiet while waiting");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
