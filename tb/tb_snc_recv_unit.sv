// tb_snc_recv_unit: self-checking test of the receiving unit.
// Shifts random messages of every length into the unit, MSB first, and keeps a model
// IMB updated from the unit's byte-write port. Checks that a byte is written exactly
// every eighth bit at the right word and lane, that the assembled message equals the
// one sent, that the header is in word_sr after 32 bits, and that nothing is written
// while store is low or between bits (shift low).
module tb_snc_recv_unit;
  import fugu_sn_pkg::*;
  logic clk = 0, rst_n = 0;
  logic clear = 0, shift = 0, rx_bit = 0, store = 1;
  logic [31:0] word_sr;
  logic rx_we;
  logic [2:0] rx_word;
  logic [1:0] rx_lane;
  logic [7:0] rx_byte;
  logic [31:0] imb [8], msg [8];
  int writes, checks = 0, failures = 0;

  snc_recv_unit dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rx_we) begin
    imb[rx_word][rx_lane*8 +: 8] <= rx_byte;
    writes <= writes + 1;
  end

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    writes = 0;
    for (int i = 0; i < 8; i++) imb[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 16; pass++) begin
      int words, w0;
      words = (pass % 8) + 1;
      store = (pass != 5);
      for (int i = 0; i < 8; i++) begin
        msg[i] = $urandom;
        imb[i] = 32'hFFFF_FFFF;
      end
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      w0 = writes;
      for (int b = 0; b < 32 * words; b++) begin
        shift = 1; rx_bit = msg[b / 32][31 - (b % 32)]; #1;
        if (b % 8 == 7) check("write on 8th bit", 32'(rx_we), 32'(store));
        else            check("no write between", 32'(rx_we), 0);
        @(negedge clk);
        if (b == 31) check("header in word_sr", word_sr, msg[0]);
        // an idle cycle between bits must change nothing
        if (b % 11 == 3) begin
          shift = 0; #1;
          check("no write when not shifting", 32'(rx_we), 0);
          @(negedge clk);
        end
      end
      shift = 0;
      @(negedge clk);
      if (store) begin
        check("byte writes", 32'(writes - w0), 32'(4 * words));
        for (int i = 0; i < words; i++) check("imb word", imb[i], msg[i]);
        for (int i = words; i < 8; i++) check("imb untouched", imb[i], 32'hFFFF_FFFF);
      end else begin
        check("no writes without store", 32'(writes - w0), 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
