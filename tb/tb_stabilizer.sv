// tb_stabilizer: self-checking testbench for the stabilizer.
//
// A responder in the testbench plays the MMU: each access lasts a random
// 0..4 busy cycles, returns data computed from the address and reports a page
// fault for addresses whose low four bits are zero. Every cycle it checks that
// the request it sees has not changed since the access began. The CPU side
// issues random reads and writes; some are interrupted part way by a new
// request (as when an interrupt forces a new PC) and some are withdrawn. The
// testbench checks that the CPU always receives the response of its own
// current request, that an interrupted access is still completed at the
// responder, and that an uninterrupted access takes exactly busy + 1 cycles.
module tb_stabilizer;
  import mmu_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  mem_req_t c_req, s_req, start_req;
  mmu_rsp_t c_rsp, s_rsp;

  stabilizer dut (.clk, .rst, .c_req, .c_rsp, .s_req, .s_rsp);

  int checks = 0, failures = 0;
  int unsigned cnt = 0, lat = 0, completed = 0;
  logic in_acc = 1'b0;
  int unsigned lat_seen = 0, lat_run = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [63:0] f(input logic [28:0] a);
    return {3'b101, a, ~a[27:0], 4'h5};
  endfunction

  // responder
  always_comb begin
    s_rsp.busy = (s_req.mr || s_req.mw) && (cnt < lat);
    s_rsp.data = f(s_req.addr);
    s_rsp.pf   = (s_req.mr || s_req.mw) && (s_req.addr[3:0] == 4'h0);
  end

  always @(posedge clk) begin
    if (!rst && (s_req.mr || s_req.mw)) begin
      if (in_acc) check(s_req == start_req, "request held during access");
      if (s_rsp.busy) begin
        if (!in_acc) start_req <= s_req;
        in_acc <= 1'b1;
        cnt <= cnt + 1;
      end else begin
        in_acc <= 1'b0;
        cnt <= 0;
        lat <= $urandom_range(4, 0);
        completed <= completed + 1;
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int cyc, c0, kind;
    automatic int n_int = 0, n_wd = 0, n_plain = 0;
    bit busy_prev, switched;
    logic [28:0] a;
    c_req = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      kind = $urandom_range(3, 0);      // 0: interrupted, 1: withdrawn, else plain
      c0 = completed;
      c_req = '0;
      c_req.mr = 1'($urandom_range(1, 0));
      c_req.mw = !c_req.mr;
      c_req.addr = 29'($urandom);
      c_req.data = {$urandom, $urandom};
      c_req.mbw = 8'($urandom);
      cyc = 0; busy_prev = 1'b0; switched = 1'b0;
      forever begin
        if (busy_prev && !switched && kind < 2 && $urandom_range(1, 0) == 1) begin
          switched = 1'b1;
          if (kind == 0) begin
            a = 29'($urandom);
            c_req.addr = a;
            c_req.mr = 1'b1; c_req.mw = 1'b0;
          end else begin
            c_req = '0;
          end
        end
        #4; cyc++;
        if (switched && kind == 1) begin
          // withdrawn: wait until the responder has finished the old access
          @(posedge clk); #1;
          if (completed == c0 + 1) begin
            n_wd++;
            check(1'b1, "withdrawn access completed");
            break;
          end
        end else if (!c_rsp.busy && (c_req.mr || c_req.mw)) begin
          check(c_rsp.data == f(c_req.addr), "response data belongs to current request");
          check(c_rsp.pf == (c_req.addr[3:0] == 4'h0), "page fault flag");
          @(posedge clk); #1;
          if (switched) begin
            n_int++;
            check(completed == c0 + 2, "interrupted access completed before the new one");
          end else begin
            n_plain++;
            check(completed == c0 + 1, "one access completed");
            check(cyc == int'(lat_seen) + 1, $sformatf("no added latency (%0d)", cyc));
          end
          break;
        end else begin
          busy_prev = c_rsp.busy;
          @(posedge clk); #1;
        end
        if (cyc > 100) begin
          check(1'b0, "access does not end");
          break;
        end
      end
      c_req = '0;
      @(posedge clk); #1;
    end
    check(n_int > 100 && n_wd > 100 && n_plain > 100, "all kinds of access seen");
    $display("plain %0d, interrupted %0d, withdrawn %0d", n_plain, n_int, n_wd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // busy cycles of the most recent access, seen from the responder
  always @(posedge clk) begin
    if (s_req.mr || s_req.mw) begin
      if (s_rsp.busy) lat_run <= lat_run + 1;
      else begin lat_seen <= lat_run; lat_run <= 0; end
    end
  end

endmodule
