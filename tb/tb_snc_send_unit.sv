// tb_snc_send_unit: self-checking test of the sending unit.
// For every length 0..7 it loads a random message into a model OMB, starts the unit,
// shifts every cycle and compares the serial stream with the header and data words
// sent most significant bit first. It checks the number of bits (32 per word), that
// tx_last marks only the final bit, that the unit goes idle after it, and that clear
// aborts a transmission.
module tb_snc_send_unit;
  import fugu_sn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear = 0, start = 0, shift = 0;
  logic [2:0] tx_addr, tx_len;
  logic [31:0] tx_word;
  logic busy, tx_bit, tx_last;
  logic [31:0] omb [8];
  int checks = 0, failures = 0;

  snc_send_unit dut (.*);
  assign tx_word = omb[tx_addr];

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) omb[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int len = 0; len < 8; len++) begin
      int nbits, lasts, mism;
      for (int i = 0; i < 8; i++) omb[i] = $urandom;
      omb[0][18:16] = 3'(len);
      @(negedge clk);
      check("idle addr is header", 32'(tx_addr), 0);
      start = 1;
      @(negedge clk);
      start = 0;
      check("busy after start", 32'(busy), 1);
      check("len latched", 32'(tx_len), len);
      nbits = 0; lasts = 0; mism = 0;
      shift = 1;
      while (busy && nbits < 300) begin
        logic exp;
        exp = omb[nbits / 32][31 - (nbits % 32)];
        if (tx_bit !== exp) mism++;
        if (tx_last) lasts++;
        if (tx_last && nbits != 32 * (len + 1) - 1) mism++;
        nbits++;
        @(negedge clk);
      end
      shift = 0;
      check("bits sent", 32'(nbits), 32 * (len + 1));
      check("bit mismatches", 32'(mism), 0);
      check("one last flag", 32'(lasts), 1);
      check("idle after", 32'(busy), 0);
    end
    // hold without shift: bit stays, then clear aborts
    omb[0] = 32'h8000_0000;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    check("hold bit", 32'(tx_bit), 1);
    clear = 1; @(negedge clk); clear = 0;
    check("clear aborts", 32'(busy), 0);
    check("no bit when idle", 32'(tx_bit), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
