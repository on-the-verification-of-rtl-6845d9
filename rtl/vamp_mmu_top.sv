// vamp_mmu_top: memory management subsystem of a pipelined processor with a
// split first-level cache.
//
// The core talks to the memory system through two ports, one for instruction
// fetch and one for loads and stores. Each port passes through a stabilizer
// (keeps a started access constant) and an MMU (translates in user mode) on
// its way to the instruction cache port (ci_*) and the data cache port (cd_*).
// Both MMUs translate with the same page table origin pto, length ptl and mode,
// taken from the special purpose register file. fetch_ctrl gates the fetch
// request so that no fetch is translated while an instruction that changes
// pto, ptl or mode, or a synchronizing instruction, is in decode or still in
// flight. cause_unit turns external lines and internal events into JISR, which
// saves state in the special purpose registers and switches to system mode.
//
// The core itself (decode, scheduler, register files, write back) is outside
// this module; its signals are ports. A page fault reported by either MMU at
// the end of its access is ORed into the cause vector in that same cycle (bit 3
// for the instruction port, bit 4 for the data port); the core supplies all
// other internal events and the EPC/EDPC/Edata values. That direct wiring is
// this design's choice: in a complete core the fault would travel with its
// instruction to write back. The block structure (two MMUs between core and
// split cache, fetch gating, register set, interrupt logic) follows the
// document. All memory ports use the busy protocol: request held until the
// cycle in which busy is low; read data is valid in that cycle.
module vamp_mmu_top
  import mmu_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  // instruction fetch from the core
  input  logic               if_mr,        // fetch stage read request
  input  logic [MA_W-1:0]    if_addr,      // DPC[31:3]
  input  logic               busy_if_in,   // busy'_IF without MMUs
  output mmu_rsp_t           if_rsp,
  output logic               fetch,
  output logic               busy_if,
  // decode stage and register valid bits
  input  logic               full_id,
  input  logic [31:0]        ir,
  input  logic               pto_v,
  input  logic               ptl_v,
  input  logic               mode_v,
  output logic               ill_id,       // illegal system instruction in ID
  // load / store port from the core
  input  mem_req_t           d_req,
  output mmu_rsp_t           d_rsp,
  // special purpose register access and interrupt inputs from the core
  input  logic               spr_we,
  input  logic [4:0]         spr_wa,
  input  logic [31:0]        spr_wd,
  input  logic [4:0]         spr_ra,
  output logic [31:0]        spr_rd,
  input  logic               rfe_wb,       // rfe completes
  input  logic [31:0]        epc_in,
  input  logic [31:0]        edpc_in,
  input  logic [31:0]        edata_in,
  input  logic [N_INT-1:0]   iev,          // internal events from the core
  input  logic [N_EEV-1:0]   eev,          // external event lines
  output logic               jisr,
  output logic [N_INT-1:0]   mca,
  output logic               mode,
  // split cache ports
  output mem_req_t           ci_req,
  input  mem_rsp_t           ci_rsp,
  output mem_req_t           cd_req,
  input  mem_rsp_t           cd_rsp
);

  logic [31:0]      sr, pto, ptl;
  logic             imr;
  mem_req_t         ic_req, is_req, ds_req;
  mmu_rsp_t         is_rsp, ds_rsp;
  logic [N_INT-1:0] iev_all, ca;

  // special purpose registers
  spr_file u_spr (
    .clk, .rst,
    .we(spr_we), .wa(spr_wa), .wd(spr_wd), .ra(spr_ra), .rd(spr_rd),
    .jisr, .mca, .epc_in, .edpc_in, .edata_in, .rfe(rfe_wb),
    .sr, .pto, .ptl, .mode
  );

  // fetch gating
  fetch_ctrl u_fetch (
    .clk, .rst, .full_id, .ir, .mode_cur(mode),
    .pto_v, .ptl_v, .mode_v, .busy_if_in, .if_mr,
    .i_busy(if_rsp.busy), .fetch, .busy_if, .imr, .ill_id
  );

  // instruction port: read only
  always_comb begin
    ic_req      = '0;
    ic_req.mr   = imr;
    ic_req.addr = if_addr;
  end

  stabilizer u_istab (.clk, .rst, .c_req(ic_req), .c_rsp(if_rsp), .s_req(is_req), .s_rsp(is_rsp));
  mmu        u_immu  (.clk, .rst, .p_req(is_req), .p_rsp(is_rsp), .mode, .pto, .ptl,
                      .m_req(ci_req), .m_rsp(ci_rsp));

  stabilizer u_dstab (.clk, .rst, .c_req(d_req), .c_rsp(d_rsp), .s_req(ds_req), .s_rsp(ds_rsp));
  mmu        u_dmmu  (.clk, .rst, .p_req(ds_req), .p_rsp(ds_rsp), .mode, .pto, .ptl,
                      .m_req(cd_req), .m_rsp(cd_rsp));

  // interrupt causes
  always_comb begin
    iev_all           = iev;
    iev_all[INT_PFF]  = iev[INT_PFF]  | if_rsp.pf;
    iev_all[INT_PFLS] = iev[INT_PFLS] | d_rsp.pf;
  end

  cause_unit u_cause (.eev, .iev(iev_all), .sr, .ca, .mca, .jisr);

  // the instruction port never writes
  a_ci_ro: assert property (@(posedge clk) disable iff (rst) !ci_req.mw);

endmodule
