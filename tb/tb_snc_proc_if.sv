// tb_snc_proc_if: self-checking test of the processor interface unit.
// Drives colored loads and stores with each ASI and checks: routing of reads to the
// OMB, IMB, MIR and status inputs; OMB write strobes; MIR storage (16 bits); command
// pulses from SCR writes; the SCR read strobe; that a store to the IMB does nothing;
// that non-supervisor accesses are blocked and trap; and that other ASIs are ignored.
module tb_snc_proc_if;
  import fugu_sn_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cpu_read = 0, cpu_write_n = 1, cpu_supervisor = 1;
  logic [7:0] cpu_asi = 0;
  logic [2:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0, cpu_rdata;
  logic cpu_prot_trap, omb_we, scr_read;
  logic [2:0] buf_addr;
  logic [31:0] omb_wdata, omb_rdata, imb_rdata;
  mir_t mir;
  logic [4:0] cmd;
  scr_status_t status;
  int checks = 0, failures = 0;

  snc_proc_if dut (.*);

  always #5 clk = ~clk;

  // stand-ins for the buffers: data depends on the address
  assign omb_rdata = 32'hA000_0000 | 32'(buf_addr);
  assign imb_rdata = 32'hB000_0000 | 32'(buf_addr);
  assign status    = scr_status_t'(32'h0001_2345);

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic idle();
    cpu_read = 0; cpu_write_n = 1; cpu_wdata = 0;
  endtask

  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("mir after reset", 32'(mir), 0);

    // reads of each resource
    for (int a = 0; a < 8; a++) begin
      cpu_read = 1; cpu_asi = ASI_OMB; cpu_addr = 3'(a); #1;
      check("omb read", cpu_rdata, 32'hA000_0000 | a);
      cpu_asi = ASI_IMB; #1;
      check("imb read", cpu_rdata, 32'hB000_0000 | a);
      check("no trap", 32'(cpu_prot_trap), 0);
    end
    cpu_asi = ASI_SCR; #1;
    check("scr read data", cpu_rdata, 32'h0001_2345);
    check("scr_read strobe", 32'(scr_read), 1);
    cpu_asi = 8'h0B; #1;
    check("foreign asi read", cpu_rdata, 0);
    check("foreign asi no strobe", 32'(scr_read), 0);
    idle(); @(negedge clk);

    // OMB write
    cpu_write_n = 0; cpu_asi = ASI_OMB; cpu_addr = 3'd5; cpu_wdata = 32'hDEAD_BEEF; #1;
    check("omb_we", 32'(omb_we), 1);
    check("omb addr", 32'(buf_addr), 5);
    check("omb wdata", omb_wdata, 32'hDEAD_BEEF);
    cpu_asi = ASI_IMB; #1;
    check("imb store ignored", 32'(omb_we), 0);
    check("imb store no cmd", 32'(cmd), 0);
    idle(); @(negedge clk);

    // MIR write and read back (16 bits)
    cpu_write_n = 0; cpu_asi = ASI_MIR; cpu_wdata = 32'hFFFF_2013;
    @(negedge clk); idle();
    check("mir node id", 32'(mir.node_id), 7'h13);
    check("mir size", 32'(mir.size), 7'h20);
    cpu_read = 1; cpu_asi = ASI_MIR; #1;
    check("mir read", cpu_rdata, 32'h0000_2013);
    idle(); @(negedge clk);

    // command pulses
    for (int b = 0; b < 5; b++) begin
      cpu_write_n = 0; cpu_asi = ASI_SCR; cpu_wdata = 32'(1 << b); #1;
      check("cmd pulse", 32'(cmd), 32'(1 << b));
      @(negedge clk); idle(); #1;
      check("cmd gone", 32'(cmd), 0);
    end

    // user-mode accesses trap and do nothing
    cpu_supervisor = 0;
    cpu_write_n = 0; cpu_asi = ASI_OMB; cpu_wdata = 1; #1;
    check("user omb store traps", 32'(cpu_prot_trap), 1);
    check("user omb store blocked", 32'(omb_we), 0);
    cpu_asi = ASI_SCR; #1;
    check("user cmd blocked", 32'(cmd), 0);
    cpu_asi = ASI_MIR; cpu_wdata = 32'h0000_7F7F;
    @(negedge clk); idle();
    check("user mir store blocked", 32'(mir), 32'h2013);
    cpu_read = 1; cpu_asi = ASI_IMB; #1;
    check("user load traps", 32'(cpu_prot_trap), 1);
    check("user load no data", cpu_rdata, 0);
    cpu_asi = 8'h0A; #1;
    check("user other asi no trap", 32'(cpu_prot_trap), 0);
    idle(); cpu_supervisor = 1; #1;
    check("idle no trap", 32'(cpu_prot_trap), 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
