// stabilizer: keeps the inputs of a started memory access constant.
//
// The memory protocol requires the master to hold address, data and the
// request lines from the first cycle of an access until the cycle in which
// busy is low. A pipelined CPU may violate that, for instance when an interrupt
// forces new values into PC and DPC while a fetch is still running. The
// stabilizer sits between the CPU (c_*) and the MMU (s_*). When an access
// starts and is not finished in its first cycle, the request is copied into a
// register, and until busy drops the latched copy, not the CPU's current
// request, drives the MMU, so the started access completes as it began.
// If the CPU's request differs from the latched one, the end of the old access
// is hidden from the CPU (busy stays high, pf low): the CPU then sees its own
// new request start in the following cycle. If the CPU withdrew its request,
// the old access is completed and its result dropped.
//
// The document states only what the stabilizer must guarantee; this circuit
// (one request register and a compare) is this design's own construction.
// No added latency: an access that is not interrupted passes straight through.
module stabilizer
  import mmu_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  mem_req_t c_req,   // from the CPU
  output mmu_rsp_t c_rsp,
  output mem_req_t s_req,   // to the MMU
  input  mmu_rsp_t s_rsp
);

  logic     active;         // an access started in an earlier cycle is running
  mem_req_t lreq;           // its latched request
  logic     stale;          // the CPU no longer asks for the running access

  assign s_req = active ? lreq : c_req;
  assign stale = active && (c_req != lreq);

  always_comb begin
    c_rsp      = s_rsp;
    c_rsp.busy = s_rsp.busy || stale;
    c_rsp.pf   = s_rsp.pf && !stale;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      active <= 1'b0;
      lreq   <= '0;
    end else if (!active) begin
      if ((c_req.mr || c_req.mw) && s_rsp.busy) begin
        active <= 1'b1;
        lreq   <= c_req;
      end
    end else if (!s_rsp.busy) begin
      active <= 1'b0;
    end
  end

  // The request seen by the MMU never changes during an access
  a_stable: assert property (@(posedge clk) disable iff (rst)
                             (active && s_rsp.busy) |=> $stable(s_req));

endmodule
