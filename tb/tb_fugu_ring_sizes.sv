// tb_fugu_ring_sizes: runs the second network at the two other sizes that matter for it.
//
// A 4-node ring is the size of the prototype test system. A 128-node ring is the
// largest that 7-bit node IDs can address. Both are run with ring_size_run, one after
// the other, on a shared clock and reset: one-word latency against the frame-plus-ring
// formula, the highest node ID, the machine-size refusal, and all nodes sending at once
// with one token seizure each. The testbench prints the combined result. A watchdog
// counts a failure if either run does not finish.
module tb_fugu_ring_sizes;

  logic clk = 0, rst_n = 0;
  logic start4 = 0, start128 = 0;
  logic done4, done128;
  int   checks4, failures4, checks128, failures128;

  always #5 clk = ~clk;

  ring_size_run #(.N(4))   u_r4   (.clk, .rst_n, .start(start4),   .done(done4),
                                   .checks(checks4),   .failures(failures4));
  ring_size_run #(.N(128)) u_r128 (.clk, .rst_n, .start(start128), .done(done128),
                                   .checks(checks128), .failures(failures128));

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks128,
             failures4 + failures128 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    start4 = 1;
    wait (done4);
    start128 = 1;
    wait (done128);
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks128,
             failures4 + failures128);
    $finish;
  end

endmodule
