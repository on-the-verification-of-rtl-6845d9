// cause_unit: interrupt cause, mask and JISR computation.
//
// Combinational. The 32-entry cause vector takes
//   ca[0]      = eev[0]            (reset)
//   ca[j]      = eev[j-13]         for the external I/O interrupts j = 14..31
//   ca[j]      = iev[j]            for the internal events j = 1..13
// and is ANDed with the mask vector (SR[j] for the maskable interrupts 6..11
// and 14..31, 1 for all others) into the masked cause vector mca. JISR, the
// jump to the interrupt service routine, is the OR of all masked cause bits.
// With PF_VISIBLE = 1 (physical machine) the page faults 3 and 4 take part;
// with 0 they are left out as in the virtual machine's definition. All of this
// follows the document's interrupt definition; the bit values of iev at the
// external positions are ignored.
module cause_unit
  import mmu_pkg::*;
#(
  parameter bit PF_VISIBLE = 1'b1
) (
  input  logic [N_EEV-1:0] eev,   // external event lines
  input  logic [N_INT-1:0] iev,   // internal event signals
  input  logic [31:0]      sr,    // status register (mask bits)
  output logic [N_INT-1:0] ca,
  output logic [N_INT-1:0] mca,
  output logic             jisr
);

  logic [N_INT-1:0] mask, sel;

  always_comb begin
    for (int j = 0; j < int'(N_INT); j++) begin
      if (j == 0)                ca[j] = eev[0];
      else if (EXTERNAL[j])      ca[j] = eev[j-13];
      else                       ca[j] = iev[j];
      mask[j] = MASKABLE[j] ? sr[j] : 1'b1;
    end
  end

  assign mca  = ca & mask;
  assign sel  = PF_VISIBLE ? '1 : ~((N_INT'(1) << INT_PFF) | (N_INT'(1) << INT_PFLS));
  assign jisr = |(mca & sel);

endmodule
