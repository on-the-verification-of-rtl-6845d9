// mmu_pkg: types and constants shared by the memory management subsystem.
//
// Addresses are 32-bit byte addresses split into a 20-bit page index (px) and
// a 12-bit byte index (bx); pages are 4 KB. The memory interface between CPU,
// MMU and caches is eight bytes wide, so it carries 29-bit double-word
// addresses. A page table entry holds the physical page index in bits 31:12,
// the valid bit in bit 11 and the write-protection bit in bit 10. The special
// purpose register addresses follow the register table of the architecture,
// the interrupt numbering follows its interrupt table. The DLX opcode values
// for movs2i, movi2s and rfe are this design's choice (standard DLX encoding).
package mmu_pkg;

  localparam int unsigned VA_W = 32;   // virtual/physical byte address width
  localparam int unsigned PX_W = 20;   // page index width
  localparam int unsigned BX_W = 12;   // byte index width (4 KB pages)
  localparam int unsigned MA_W = 29;   // double-word address on the memory busses
  localparam int unsigned MD_W = 64;   // memory bus data width
  localparam int unsigned MB_W = 8;    // byte write enables

  // Page table entry (32 bits)
  typedef struct packed {
    logic [PX_W-1:0] ppx;   // physical page index
    logic            v;     // valid
    logic            p;     // write protected
    logic [9:0]      rsvd;  // unused
  } pte_t;

  // Request from a master (CPU, stabilizer, MMU) to a memory port
  typedef struct packed {
    logic            mr;    // read request
    logic            mw;    // write request
    logic [MA_W-1:0] addr;  // double-word address
    logic [MD_W-1:0] data;  // write data
    logic [MB_W-1:0] mbw;   // byte write enables
  } mem_req_t;

  // Response of a cache port
  typedef struct packed {
    logic            busy;  // access not yet finished
    logic [MD_W-1:0] data;  // read data, valid in the cycle busy is low
  } mem_rsp_t;

  // Response of an MMU port towards the CPU
  typedef struct packed {
    logic            busy;  // access not yet finished
    logic            pf;    // access ends with a page fault (no memory access done)
    logic [MD_W-1:0] data;  // read data, valid in the end cycle
  } mmu_rsp_t;

  // MMU control automaton
  typedef enum logic [2:0] {
    S_IDLE    = 3'd0,
    S_ADD     = 3'd1,
    S_READPTE = 3'd2,
    S_COMPPA  = 3'd3,
    S_READ    = 3'd4,
    S_WRITE   = 3'd5,
    S_EXCP    = 3'd6
  } mmu_state_t;

  // Special purpose register addresses
  localparam logic [4:0] SPR_SR    = 5'b00000;
  localparam logic [4:0] SPR_ESR   = 5'b00001;
  localparam logic [4:0] SPR_ECA   = 5'b00010;
  localparam logic [4:0] SPR_EPC   = 5'b00011;
  localparam logic [4:0] SPR_EDPC  = 5'b00100;
  localparam logic [4:0] SPR_EDATA = 5'b00101;
  localparam logic [4:0] SPR_RM    = 5'b00110;
  localparam logic [4:0] SPR_IEEEF = 5'b00111;
  localparam logic [4:0] SPR_FCC   = 5'b01000;
  localparam logic [4:0] SPR_PTO   = 5'b01001;
  localparam logic [4:0] SPR_PTL   = 5'b01010;
  localparam logic [4:0] SPR_EMODE = 5'b01011;
  localparam logic [4:0] SPR_MODE  = 5'b10000;

  // Interrupts
  localparam int unsigned N_INT    = 32;
  localparam int unsigned N_EEV    = 19;  // eev[0] = reset, eev[1..18] = io[14..31]
  localparam int unsigned INT_RESET = 0;
  localparam int unsigned INT_ILL   = 1;
  localparam int unsigned INT_MAL   = 2;
  localparam int unsigned INT_PFF   = 3;
  localparam int unsigned INT_PFLS  = 4;
  localparam int unsigned INT_TRAP  = 5;
  localparam int unsigned INT_TIMER = 13;
  localparam int unsigned INT_IO0   = 14;
  // Maskable: xovf, fovf, funf, finx, fdbz, finv (6..11) and the I/O interrupts (14..31)
  localparam logic [N_INT-1:0] MASKABLE = 32'hFFFF_C000 | 32'h0000_0FC0;
  // External: reset (0) and the I/O interrupts (14..31)
  localparam logic [N_INT-1:0] EXTERNAL = 32'hFFFF_C001;

  // DLX encodings of the system instructions
  localparam logic [5:0] OPC_RTYPE  = 6'b000000;
  localparam logic [5:0] OPC_RFE    = 6'b111111;
  localparam logic [5:0] FUN_MOVS2I = 6'b010000;
  localparam logic [5:0] FUN_MOVI2S = 6'b010001;

endpackage
