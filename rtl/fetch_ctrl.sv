// fetch_ctrl: stall-engine extension that holds back instruction fetch while
// the translation of the next fetch could still change.
//
//   fetch'  = not (full_ID and (syncing(IR) or movi2s(IR) or rfe(IR)))
//   fetch   = pto.v and ptl.v and mode.v and fetch'
//   busy_IF = busy'_IF or not fetch
// The valid bits of pto, ptl and mode come from the register file of the
// out-of-order core and are low while an issued instruction that writes the
// register has not completed. The read request to the instruction MMU is the
// fetch stage's request gated with fetch. Once a fetch has started and is not
// yet finished, fetch is held on (a one-bit register) so that the started
// access is completed even if a synchronizing instruction arrives meanwhile.
// The equations follow the document; the holding register is this design's
// reading of its remark that fetch is latched for an interrupted access.
module fetch_ctrl
  import mmu_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        full_id,      // decode stage holds an instruction
  input  logic [31:0] ir,           // instruction register
  input  logic        mode_cur,     // current mode (for the illegal term)
  input  logic        pto_v,        // valid bits from the register file
  input  logic        ptl_v,
  input  logic        mode_v,
  input  logic        busy_if_in,   // busy'_IF of the core without MMUs
  input  logic        if_mr,        // fetch stage wants to read
  input  logic        i_busy,       // busy from the instruction port
  output logic        fetch,
  output logic        busy_if,
  output logic        imr,          // read request to the instruction MMU
  output logic        ill_id        // illegal system instruction in ID
);

  logic movs2i, movi2s, rfe, syncing;
  logic fetch_p, fetch_c, hold;

  sys_decode u_dec (
    .ir(ir), .mode(mode_cur),
    .movs2i(movs2i), .movi2s(movi2s), .rfe(rfe), .syncing(syncing), .ill(ill_id)
  );

  assign fetch_p = !(full_id && (syncing || movi2s || rfe));
  assign fetch_c = pto_v && ptl_v && mode_v && fetch_p;
  assign fetch   = fetch_c || hold;
  assign busy_if = busy_if_in || !fetch;
  assign imr     = if_mr && fetch;

  always_ff @(posedge clk) begin
    if (rst)               hold <= 1'b0;
    else if (imr && i_busy) hold <= 1'b1;
    else if (!i_busy)       hold <= 1'b0;
  end

  // movs2i is used only through syncing
  logic unused;
  assign unused = movs2i;

endmodule
