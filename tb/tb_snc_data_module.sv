// tb_snc_data_module: self-checking test of the message buffers.
// Writes random words into the OMB through the processor port and reads them back
// through both the processor and the sending-unit ports; writes random bytes into the
// IMB through the receiving-unit byte port and checks each word, lane by lane, through
// the processor port and the header output. Also checks reset to zero and that the two
// buffers are independent.
module tb_snc_data_module;
  logic clk = 0, rst_n = 0;
  logic omb_we = 0, rx_we = 0;
  logic [2:0] buf_addr = 0, tx_addr = 0, rx_word = 0;
  logic [1:0] rx_lane = 0;
  logic [7:0] rx_byte = 0;
  logic [31:0] omb_wdata = 0, omb_rdata, imb_rdata, tx_word, imb_header;
  logic [31:0] omb_ref [8], imb_ref [8];
  int checks = 0, failures = 0;

  snc_data_module dut (.*);

  always #5 clk = ~clk;

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      buf_addr = 3'(i); tx_addr = 3'(i); #1;
      check("omb reset", omb_rdata, 0);
      check("imb reset", imb_rdata, 0);
    end
    // fill the OMB
    for (int i = 0; i < 8; i++) begin
      omb_ref[i] = $urandom;
      @(negedge clk);
      omb_we = 1; buf_addr = 3'(i); omb_wdata = omb_ref[i];
    end
    @(negedge clk); omb_we = 0;
    // fill the IMB byte by byte in a scrambled order
    for (int i = 0; i < 8; i++) imb_ref[i] = 0;
    for (int k = 0; k < 32; k++) begin
      int w, l;
      w = (k * 5) % 8; l = (k * 3 + k / 8) % 4;
      @(negedge clk);
      rx_we = 1; rx_word = 3'(w); rx_lane = 2'(l); rx_byte = 8'($urandom);
      imb_ref[w][l*8 +: 8] = rx_byte;
    end
    @(negedge clk); rx_we = 0;
    for (int i = 0; i < 8; i++) begin
      buf_addr = 3'(i); tx_addr = 3'(7 - i); #1;
      check("omb proc read", omb_rdata, omb_ref[i]);
      check("omb send read", tx_word, omb_ref[7 - i]);
      check("imb proc read", imb_rdata, imb_ref[i]);
    end
    check("imb header", imb_header, imb_ref[0]);
    // a single-lane write leaves the other lanes alone
    @(negedge clk);
    rx_we = 1; rx_word = 3'd2; rx_lane = 2'd1; rx_byte = 8'h5A;
    @(negedge clk); rx_we = 0;
    imb_ref[2][15:8] = 8'h5A;
    buf_addr = 3'd2; #1;
    check("imb lane write", imb_rdata, imb_ref[2]);
    check("omb untouched", omb_rdata, omb_ref[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
