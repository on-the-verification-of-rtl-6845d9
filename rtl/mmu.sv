// mmu: non-optimized memory management unit for one CPU memory port.
//
// The MMU sits between a CPU port (p_*) and a cache port (m_*); both sides use
// the same busy protocol: a request (mr or mw) is held constant until the
// cycle in which busy is low, which is the last cycle of the access and the
// cycle in which read data is valid.
//
// In system mode (mode = 0) an access goes idle -> read+/write+ -> idle: the
// double-word address is passed on unchanged. In user mode (mode = 1) the
// control automaton walks the one-level page table:
//   idle -> add -> readpte+ -> comppa -> read+/write+ -> idle
//   add     : address register ar <= pto*4K + 4*px (page table entry address);
//             a page index above ptl ends the access with a page fault
//   readpte : read the double word holding the entry into data register dr
//   comppa  : select the entry by ar[2]; invalid entry, or write to a
//             protected page, ends the access with a page fault; otherwise
//             ar <= ppx o bx
//   read / write : the translated access itself
//   excp    : one cycle with busy low and pf high, no memory access done.
// A translated read with zero-wait memory therefore takes five cycles, an
// untranslated one two cycles.
//
// The states of a translated read, the address and data registers and the
// page table format follow the document's MMU construction. The exception
// state, the write path, the untranslated path and the exact end cycle (read
// data passed through combinationally in the cycle the cache drops busy) are
// this design's choices. The MMU relies on the operating
// conditions of the document: the CPU request, mode, pto and ptl, and the page
// table entry in memory stay constant during an access.
module mmu
  import mmu_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  // CPU side
  input  mem_req_t        p_req,
  output mmu_rsp_t        p_rsp,
  // translation registers
  input  logic            mode,    // 1 = user mode, translated
  input  logic [31:0]     pto,     // page table origin (page index)
  input  logic [31:0]     ptl,     // page table length (largest valid px)
  // cache side
  output mem_req_t        m_req,
  input  mem_rsp_t        m_rsp
);

  mmu_state_t      state, state_n;
  logic [VA_W-1:0] ar;             // address register (byte address)
  logic [MD_W-1:0] dr;             // data register
  logic            p_any;
  logic [PX_W-1:0] px;
  logic [8:0]      bx_dw;          // byte index bits 11:3
  logic [VA_W-1:0] ptea;
  logic            ptlexcp;
  pte_t            pte;
  logic            pte_fault;
  logic            m_end;

  assign p_any   = p_req.mr | p_req.mw;
  assign px      = p_req.addr[MA_W-1 -: PX_W];
  assign bx_dw   = p_req.addr[8:0];
  assign ptea    = {pto[PX_W-1:0], {BX_W{1'b0}}} + {10'b0, px, 2'b00};
  assign ptlexcp = {12'b0, px} > ptl;
  assign pte     = ar[2] ? pte_t'(dr[63:32]) : pte_t'(dr[31:0]);
  assign pte_fault = !pte.v || (p_req.mw && pte.p);
  assign m_end   = !m_rsp.busy;

  // next state
  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:    if (p_any) state_n = mode ? S_ADD : (p_req.mw ? S_WRITE : S_READ);
      S_ADD:     state_n = ptlexcp ? S_EXCP : S_READPTE;
      S_READPTE: if (m_end) state_n = S_COMPPA;
      S_COMPPA:  state_n = pte_fault ? S_EXCP : (p_req.mw ? S_WRITE : S_READ);
      S_READ,
      S_WRITE:   if (m_end) state_n = S_IDLE;
      S_EXCP:    state_n = S_IDLE;
      default:   state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      ar    <= '0;
      dr    <= '0;
    end else begin
      state <= state_n;
      unique case (state)
        S_IDLE:    ar <= {p_req.addr, 3'b000};
        S_ADD:     ar <= ptea;
        S_READPTE: if (m_end) dr <= m_rsp.data;
        S_COMPPA:  ar <= {pte.ppx, bx_dw, 3'b000};
        default: ;
      endcase
    end
  end

  // cache side
  always_comb begin
    m_req      = '0;
    m_req.addr = ar[VA_W-1:3];
    m_req.data = p_req.data;
    m_req.mbw  = p_req.mbw;
    m_req.mr   = (state == S_READPTE) || (state == S_READ);
    m_req.mw   = (state == S_WRITE);
  end

  // CPU side
  always_comb begin
    p_rsp.data = m_rsp.data;
    p_rsp.pf   = (state == S_EXCP);
    p_rsp.busy = p_any &&
                 !(((state == S_READ) || (state == S_WRITE)) && m_end) &&
                 (state != S_EXCP);
  end

  // Bus rules: no simultaneous read and write; CPU inputs held during an access
  a_no_rw: assert property (@(posedge clk) disable iff (rst) !(p_req.mr && p_req.mw));
  a_hold:  assert property (@(posedge clk) disable iff (rst)
                            (state != S_IDLE && state_n != S_IDLE) |=> $stable(p_req));

endmodule
