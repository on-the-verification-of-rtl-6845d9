// spr_file: special purpose registers of the physical machine.
//
// Holds SR, ESR, ECA, EPC, EDPC, Edata, RM, IEEEf, FCC, pto, ptl, EMODE and
// MODE at the addresses of the architecture's register table (00000..01011 and
// 10000; 01100..01111 are unassigned and read as 0). One write port (movi2s)
// and one combinational read port (movs2i). pto, ptl, mode and SR are also
// brought out directly for the MMUs and the cause logic.
// On JISR, in the same clock edge: ESR <= SR, ECA <= masked cause vector,
// EPC/EDPC/Edata <= the values supplied by the core, EMODE <= MODE, SR <= 0
// and MODE <= 0 (system mode). On rfe: SR <= ESR and MODE <= EMODE. JISR takes
// priority over rfe, which takes priority over a movi2s write. Reset clears all
// registers, which leaves the machine in system mode.
// The register set and MODE[0] = 1 meaning user mode follow the document; the
// save/restore rules and priorities are this design's choices, as the
// document refers to other work for them.
module spr_file
  import mmu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        we,         // movi2s write
  input  logic [4:0]  wa,
  input  logic [31:0] wd,
  input  logic [4:0]  ra,         // movs2i read
  output logic [31:0] rd,
  input  logic        jisr,
  input  logic [31:0] mca,
  input  logic [31:0] epc_in,
  input  logic [31:0] edpc_in,
  input  logic [31:0] edata_in,
  input  logic        rfe,
  output logic [31:0] sr,
  output logic [31:0] pto,
  output logic [31:0] ptl,
  output logic        mode        // MODE[0], 1 = user mode
);

  logic [31:0] r_sr, r_esr, r_eca, r_epc, r_edpc, r_edata, r_rm, r_ieeef,
               r_fcc, r_pto, r_ptl, r_emode, r_mode;

  always_ff @(posedge clk) begin
    if (rst) begin
      {r_sr, r_esr, r_eca, r_epc, r_edpc, r_edata, r_rm, r_ieeef,
       r_fcc, r_pto, r_ptl, r_emode, r_mode} <= '0;
    end else if (jisr) begin
      r_esr   <= r_sr;
      r_eca   <= mca;
      r_epc   <= epc_in;
      r_edpc  <= edpc_in;
      r_edata <= edata_in;
      r_emode <= r_mode;
      r_sr    <= '0;
      r_mode  <= '0;
    end else if (rfe) begin
      r_sr    <= r_esr;
      r_mode  <= r_emode;
    end else if (we) begin
      unique case (wa)
        SPR_SR:    r_sr    <= wd;
        SPR_ESR:   r_esr   <= wd;
        SPR_ECA:   r_eca   <= wd;
        SPR_EPC:   r_epc   <= wd;
        SPR_EDPC:  r_edpc  <= wd;
        SPR_EDATA: r_edata <= wd;
        SPR_RM:    r_rm    <= wd;
        SPR_IEEEF: r_ieeef <= wd;
        SPR_FCC:   r_fcc   <= wd;
        SPR_PTO:   r_pto   <= wd;
        SPR_PTL:   r_ptl   <= wd;
        SPR_EMODE: r_emode <= wd;
        SPR_MODE:  r_mode  <= wd;
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (ra)
      SPR_SR:    rd = r_sr;
      SPR_ESR:   rd = r_esr;
      SPR_ECA:   rd = r_eca;
      SPR_EPC:   rd = r_epc;
      SPR_EDPC:  rd = r_edpc;
      SPR_EDATA: rd = r_edata;
      SPR_RM:    rd = r_rm;
      SPR_IEEEF: rd = r_ieeef;
      SPR_FCC:   rd = r_fcc;
      SPR_PTO:   rd = r_pto;
      SPR_PTL:   rd = r_ptl;
      SPR_EMODE: rd = r_emode;
      SPR_MODE:  rd = r_mode;
      default:   rd = '0;
    endcase
  end

  assign sr   = r_sr;
  assign pto  = r_pto;
  assign ptl  = r_ptl;
  assign mode = r_mode[0];

endmodule
