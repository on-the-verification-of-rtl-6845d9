// sys_decode: decoder for the system instructions in an instruction word.
//
// Purely combinational. Recognises movs2i and movi2s (R-type, special purpose
// register address in bits 10:6) and rfe, and from them derives
//   syncing : the instruction is synchronizing, i.e. movs2i reading IEEEf, or
//             rfe; the pipeline is drained before the next fetch is translated
//   ill     : illegal in user mode: an access to a special purpose register
//             other than RM, IEEEf and FCC, or an rfe.
// In system mode (mode = 0) every special purpose register access and rfe is
// legal. The list of synchronizing instructions and user-visible registers
// follows the document; the opcode values are the standard DLX encoding,
// which the document does not print.
module sys_decode
  import mmu_pkg::*;
(
  input  logic [31:0] ir,       // instruction word
  input  logic        mode,     // 1 = user mode
  output logic        movs2i,
  output logic        movi2s,
  output logic        rfe,
  output logic        syncing,
  output logic        ill
);

  logic [5:0] opc, fun;
  logic [4:0] sa;
  logic       sa_user;          // SA is one of the user-visible registers

  assign opc     = ir[31:26];
  assign fun     = ir[5:0];
  assign sa      = ir[10:6];
  assign movs2i  = (opc == OPC_RTYPE) && (fun == FUN_MOVS2I);
  assign movi2s  = (opc == OPC_RTYPE) && (fun == FUN_MOVI2S);
  assign rfe     = (opc == OPC_RFE);
  assign sa_user = (sa == SPR_RM) || (sa == SPR_IEEEF) || (sa == SPR_FCC);
  assign syncing = (movs2i && (sa == SPR_IEEEF)) || rfe;
  assign ill     = mode && (((movs2i || movi2s) && !sa_user) || rfe);

endmodule
