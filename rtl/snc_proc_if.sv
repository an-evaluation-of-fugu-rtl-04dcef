// snc_proc_if: Processor Interface Unit of the second-network controller.
//
// The processor reaches the controller with colored loads and stores: an access is a
// cycle with cpu_read high (load) or cpu_write_n low (store), and the ASI selects the
// resource: 0x58 Output Message Buffer (read/write), 0x59 Input Message Buffer (read
// only), 0x5A Machine Info Register (read/write), 0x5B Status/Command Register (read
// returns status, write issues commands). cpu_addr picks the word of an 8-word buffer.
// The second network is reserved to the kernel: an access to any of these ASIs with
// cpu_supervisor low is suppressed and raises cpu_prot_trap in the same cycle.
//
// Timing: all inputs are sampled on the rising clock edge. Read data is combinational
// from the addressed resource in the cycle cpu_read is high. Command bits written to
// the SCR come out as one-cycle pulses (cmd) in the write cycle; a read of the SCR
// gives a one-cycle scr_read pulse, which clears a pending send-complete interrupt.
//
// Follows the description: the ASIs, the resource sizes and access rights, the active-
// low write enable, the supervisor check and the MIR layout. Own choices: the split of
// the bidirectional data bus into cpu_wdata/cpu_rdata, combinational read data, that a
// store to the read-only IMB is ignored, and that the MIR resets to zero.
module snc_proc_if
  import fugu_sn_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // processor side (Table 5.2 signals)
  input  logic                   cpu_read,
  input  logic                   cpu_write_n,
  input  logic [7:0]             cpu_asi,
  input  logic [ADDR_W-1:0]      cpu_addr,
  input  logic [WORD_W-1:0]      cpu_wdata,
  input  logic                   cpu_supervisor,
  output logic [WORD_W-1:0]      cpu_rdata,
  output logic                   cpu_prot_trap,
  // data module side
  output logic                   omb_we,
  output logic [ADDR_W-1:0]      buf_addr,
  output logic [WORD_W-1:0]      omb_wdata,
  input  logic [WORD_W-1:0]      omb_rdata,
  input  logic [WORD_W-1:0]      imb_rdata,
  // controller side
  output mir_t                   mir,
  output logic [4:0]             cmd,
  output logic                   scr_read,
  input  scr_status_t            status
);

  logic sn_asi, access, allowed, wr, rd;

  always_comb begin
    sn_asi        = (cpu_asi == ASI_OMB) || (cpu_asi == ASI_IMB) ||
                    (cpu_asi == ASI_MIR) || (cpu_asi == ASI_SCR);
    access        = sn_asi && (cpu_read || !cpu_write_n);
    cpu_prot_trap = access && !cpu_supervisor;
    allowed       = access && cpu_supervisor;
    wr            = allowed && !cpu_write_n;
    rd            = allowed && cpu_read;
  end

  assign buf_addr  = cpu_addr;
  assign omb_wdata = cpu_wdata;
  assign omb_we    = wr && (cpu_asi == ASI_OMB);
  assign cmd       = (wr && (cpu_asi == ASI_SCR)) ? cpu_wdata[4:0] : 5'b0;
  assign scr_read  = rd && (cpu_asi == ASI_SCR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        mir <= '0;
    else if (wr && cpu_asi == ASI_MIR) mir <= mir_t'(cpu_wdata[15:0]);
  end

  always_comb begin
    cpu_rdata = '0;
    if (rd) begin
      unique case (cpu_asi)
        ASI_OMB: cpu_rdata = omb_rdata;
        ASI_IMB: cpu_rdata = imb_rdata;
        ASI_MIR: cpu_rdata = {16'b0, mir};
        default: cpu_rdata = status;
      endcase
    end
  end

endmodule
