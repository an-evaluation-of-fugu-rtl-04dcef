// fugu_sn_ring: the Fugu second network, a system-only serial token ring of N_NODES
// second-network controllers.
//
// Node i drives node (i+1) mod N_NODES through a single wire, so a bit takes one clock
// per hop and a message, which always travels the whole ring back to its sender to
// collect its acknowledgement, is busy for N_NODES + (3 + 32 x words) clocks plus the
// wait for the token. The network carries only operating-system traffic (flow-control
// messages and overflow paging) and is deadlock-free by construction: one token, the
// sender releases it after every message, and every message gets an ACK or a NACK so
// software can retransmit.
//
// Each node's processor interface is brought out as arrays indexed by node number:
// Read, active-low Write_Enable, 8-bit ASI, 3-bit word address, 32-bit write and read
// data, the supervisor bit, the protection trap and the interrupt line.
//
// The ring order here is logical (0, 1, ..., N_NODES-1, 0); a folded placement that
// keeps neighbours physically close, as the description suggests to bound clock skew,
// changes only the layout. N_NODES defaults to the 32-node machine the design is sized
// for; the 7-bit node ID allows up to 128.
module fugu_sn_ring
  import fugu_sn_pkg::*;
#(
  parameter int unsigned N_NODES = 32
)(
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N_NODES-1:0]             cpu_read,
  input  logic [N_NODES-1:0]             cpu_write_n,
  input  logic [N_NODES-1:0][7:0]        cpu_asi,
  input  logic [N_NODES-1:0][ADDR_W-1:0] cpu_addr,
  input  logic [N_NODES-1:0][WORD_W-1:0] cpu_wdata,
  input  logic [N_NODES-1:0]             cpu_supervisor,
  output logic [N_NODES-1:0][WORD_W-1:0] cpu_rdata,
  output logic [N_NODES-1:0]             cpu_prot_trap,
  output logic [N_NODES-1:0]             cpu_irq
);

  logic [N_NODES-1:0] link;   // link[i] is the output of node i

  for (genvar i = 0; i < int'(N_NODES); i++) begin : g_node
    snc u_snc (
      .clk, .rst_n,
      .ring_in        (link[(i + int'(N_NODES) - 1) % int'(N_NODES)]),
      .ring_out       (link[i]),
      .cpu_read       (cpu_read[i]),
      .cpu_write_n    (cpu_write_n[i]),
      .cpu_asi        (cpu_asi[i]),
      .cpu_addr       (cpu_addr[i]),
      .cpu_wdata      (cpu_wdata[i]),
      .cpu_supervisor (cpu_supervisor[i]),
      .cpu_rdata      (cpu_rdata[i]),
      .cpu_prot_trap  (cpu_prot_trap[i]),
      .cpu_irq        (cpu_irq[i])
    );
  end

endmodule
