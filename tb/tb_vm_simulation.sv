// tb_vm_simulation: a physical machine with a simple page fault handler
// emulating a virtual machine, run on the memory management subsystem.
//
// The testbench keeps the virtual machine's memory vm (V pages) as its
// reference. Physical memory has A user pages starting at page ABASE, the page
// table at page 1, and the rest of the virtual memory lives in a swap memory
// held by the testbench (swap page = SBASE + virtual page). A user program is
// played instruction by instruction: a translated fetch at the current
// virtual PC, then, for half the instructions, a translated load or store.
// Every fetched and loaded double word must equal the virtual machine's.
// On a page fault (JISR with ECA[3] for fetch or ECA[4] for load/store) the
// handler runs in system mode: it takes the faulting address from EDPC or
// Edata; if no user page is free it evicts a victim (never the most recently
// loaded page), writes it to swap and clears its valid bit; it swaps the
// missing page in, sets its table entry and returns with rfe; the instruction
// is then restarted. Table entries are written with untranslated stores
// through the data port; page copies to and from swap use the memory back
// door (the swap driver is taken as correct). At the end the simulation
// relation is checked for every virtual address: the word is in physical
// memory if its page is valid and in swap memory otherwise. The test counts
// fetch faults, load/store faults, evictions and the case of a fetch fault
// right after a load/store fault in the same instruction.
module tb_vm_simulation;
  import mmu_pkg::*;

  localparam int unsigned WORDS = 8192;     // 16 physical pages
  localparam int unsigned PW    = 512;      // double words per page
  localparam int V     = 24;                // virtual pages
  localparam int A     = 6;                 // user pages
  localparam int ABASE = 2;
  localparam int SBASE = 3;
  localparam logic [19:0] PTO = 20'd1;
  localparam int NINSTR = 4000;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic            if_mr, busy_if_in, full_id, pto_v, ptl_v, mode_v, spr_we, rfe_wb;
  logic [MA_W-1:0] if_addr;
  logic [31:0]     ir, spr_wd, spr_rd, epc_in, edpc_in, edata_in, iev;
  logic [4:0]      spr_wa, spr_ra;
  logic [N_EEV-1:0] eev;
  mmu_rsp_t        if_rsp, d_rsp;
  mem_req_t        d_req, ci_req, cd_req;
  mem_rsp_t        ci_rsp, cd_rsp;
  logic            fetch, busy_if, ill_id, jisr, mode;
  logic [31:0]     mca;
  logic            bd_we;
  logic [MA_W-1:0] bd_addr;
  logic [MD_W-1:0] bd_data;
  int unsigned     bi, bd, ai, ad;

  vamp_mmu_top dut (
    .clk, .rst, .if_mr, .if_addr, .busy_if_in, .if_rsp, .fetch, .busy_if,
    .full_id, .ir, .pto_v, .ptl_v, .mode_v, .ill_id, .d_req, .d_rsp,
    .spr_we, .spr_wa, .spr_wd, .spr_ra, .spr_rd, .rfe_wb, .epc_in, .edpc_in, .edata_in,
    .iev, .eev, .jisr, .mca, .mode, .ci_req, .ci_rsp, .cd_req, .cd_rsp);

  split_mem_model #(.WORDS(WORDS), .MAXLAT(2)) u_mem (
    .clk, .rst, .ci_req, .ci_rsp, .cd_req, .cd_rsp, .bd_we, .bd_addr, .bd_data,
    .busy_cycles_i(bi), .busy_cycles_d(bd), .accesses_i(ai), .accesses_d(ad));

  int checks = 0, failures = 0;
  logic [63:0] vm [V * PW];                 // virtual machine memory (reference)
  logic [63:0] sm [(SBASE + V) * PW];       // swap memory
  logic [31:0] pt [V];                      // handler's view of the page table
  int          bmap [A];                    // B[u]: virtual page held by user page u
  int          b = -1, mrl = -1;
  int n_pff = 0, n_pfls = 0, n_evict = 0, n_case4 = 0, n_fetch = 0, n_load = 0, n_store = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic spr_write(input logic [4:0] a, input logic [31:0] d);
    spr_we = 1'b1; spr_wa = a; spr_wd = d;
    tick();
    spr_we = 1'b0;
  endtask


  task automatic do_rfe();
    full_id = 1'b1; ir = {OPC_RFE, 26'd0};
    tick();
    rfe_wb = 1'b1;
    tick();
    rfe_wb = 1'b0; full_id = 1'b0; ir = '0;
  endtask

  // one access on a port; returns data and page fault
  task automatic ifetch(input logic [28:0] a, output logic [63:0] rd, output bit pf);
    int cyc = 0;
    if_mr = 1'b1; if_addr = a;
    forever begin
      #3; cyc++;
      if (!if_rsp.busy) begin
        rd = if_rsp.data; pf = if_rsp.pf;
        if (pf) check(jisr, "JISR with fetch fault");
        tick(); if_mr = 1'b0; break;
      end
      tick();
      if (cyc > 200) begin check(1'b0, "fetch hangs"); break; end
    end
  endtask

  task automatic dacc(input bit wr, input logic [28:0] a, input logic [63:0] wd,
                      input logic [7:0] be, output logic [63:0] rd, output bit pf);
    int cyc = 0;
    d_req = '0; d_req.mr = !wr; d_req.mw = wr; d_req.addr = a; d_req.data = wd; d_req.mbw = be;
    forever begin
      #3; cyc++;
      if (!d_rsp.busy) begin
        rd = d_rsp.data; pf = d_rsp.pf;
        if (pf) check(jisr, "JISR with load/store fault");
        tick(); d_req = '0; break;
      end
      tick();
      if (cyc > 200) begin check(1'b0, "data access hangs"); break; end
    end
  endtask

  // untranslated store of one page table entry (system mode)
  task automatic store_pte(input int px, input logic [31:0] e);
    logic [63:0] rd;
    bit pf;
    int unsigned ptea;
    pt[px] = e;
    ptea = int'(PTO) * 4096 + 4 * px;
    dacc(1'b1, 29'(ptea / 8), {e, e}, ptea[2] ? 8'hF0 : 8'h0F, rd, pf);
    check(!pf, "untranslated store");
  endtask

  task automatic copy_to_swap(input int ppx, input int spx);
    for (int i = 0; i < int'(PW); i++) sm[spx * PW + i] = u_mem.mem[ppx * PW + i];
  endtask

  task automatic copy_from_swap(input int ppx, input int spx);
    for (int i = 0; i < int'(PW); i++) begin
      bd_we = 1'b1; bd_addr = MA_W'(ppx * PW + i); bd_data = sm[spx * PW + i];
      tick();
    end
    bd_we = 1'b0;
  endtask

  // the page fault handler
  task automatic handler();
    logic [31:0] eca, xva;
    int xv, u, vp, vv, e;
    #1;
    check(mode == 1'b0, "handler runs in system mode");
    spr_ra = SPR_ECA; #1; eca = spr_rd;
    check(eca[INT_PFF] ^ eca[INT_PFLS], "exactly one page fault cause");
    spr_ra = eca[INT_PFF] ? SPR_EDPC : SPR_EDATA; #1; xva = spr_rd;
    xv = int'(xva[31:12]);
    check(xv < V && !pt[xv][11], "faulting page is a missing virtual page");
    if (b == A - 1) begin
      do u = $urandom_range(A - 1, 0); while (ABASE + u == mrl);
      vp = ABASE + u;
      vv = bmap[u];
      copy_to_swap(vp, SBASE + vv);
      store_pte(vv, {pt[vv][31:12], 1'b0, pt[vv][10:0]});
      n_evict++;
      e = vp;
    end else begin
      b++;
      e = ABASE + b;
    end
    copy_from_swap(e, SBASE + xv);
    store_pte(xv, {20'(e), 1'b1, 1'b0, 10'd0});
    bmap[e - ABASE] = xv;
    mrl = e;
    do_rfe();
    check(mode == 1'b1, "rfe returns to user mode");
  endtask

  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [63:0] rd, wd;
    logic [28:0] pc, a;
    logic [7:0]  be;
    bit pf, wr, had_pfls, done;
    int pcpage;

    {if_mr, busy_if_in, full_id, spr_we, rfe_wb, bd_we} = '0;
    {pto_v, ptl_v, mode_v} = 3'b111;
    if_addr = '0; ir = '0; spr_wd = '0; spr_wa = '0; spr_ra = '0;
    epc_in = '0; edpc_in = '0; edata_in = '0; iev = '0; eev = '0;
    d_req = '0; bd_addr = '0; bd_data = '0;
    for (int i = 0; i < V * int'(PW); i++) vm[i] = {$urandom, $urandom};
    for (int i = 0; i < (SBASE + V) * int'(PW); i++) sm[i] = '0;
    for (int i = 0; i < V * int'(PW); i++) sm[SBASE * PW + i] = vm[i];
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // initialisation: every page invalid, everything in swap (b = -1)
    for (int px = 0; px < V; px++) store_pte(px, '0);
    spr_write(SPR_PTO, {12'd0, PTO});
    spr_write(SPR_PTL, 32'(V - 1));
    spr_write(SPR_EMODE, 32'd1);
    do_rfe();
    check(mode == 1'b1, "user mode entered");

    pc = '0;
    for (int n = 0; n < NINSTR; n++) begin
      // next instruction: mostly sequential, sometimes a jump
      if ($urandom_range(15, 0) == 0) pc = {20'($urandom_range(V - 1, 0)), 9'($urandom)};
      else pc = pc + 1;
      if (pc[28:9] >= 20'(V)) pc = '0;
      wr = 1'($urandom_range(1, 0));
      be = 8'($urandom);
      wd = {$urandom, $urandom};
      a = {20'($urandom_range(V - 1, 0)), 9'($urandom)};
      had_pfls = 1'b0;
      done = 1'b0;
      while (!done) begin
        edpc_in = {pc, 3'b000};
        ifetch(pc, rd, pf);
        if (pf) begin
          n_pff++;
          if (had_pfls) n_case4++;
          handler();
          continue;
        end
        n_fetch++;
        check(rd == vm[int'(pc)], $sformatf("fetch va=%h", pc));
        if (n % 2 == 0) begin
          edata_in = {a, 3'b000};
          dacc(wr, a, wd, be, rd, pf);
          if (pf) begin
            n_pfls++;
            had_pfls = 1'b1;
            handler();
            continue;           // restart the instruction
          end
          if (wr) begin
            for (int k = 0; k < 8; k++) if (be[k]) vm[int'(a)][8*k +: 8] = wd[8*k +: 8];
            n_store++;
          end else begin
            check(rd == vm[int'(a)], $sformatf("load va=%h", a));
            n_load++;
          end
        end
        done = 1'b1;
      end
    end

    // simulation relation for every virtual address
    begin
      automatic int bad = 0;
      for (int px = 0; px < V; px++)
        for (int i = 0; i < int'(PW); i++)
          if (pt[px][11]) begin
            if (u_mem.mem[int'(pt[px][31:12]) * PW + i] != vm[px * PW + i]) bad++;
          end else if (sm[(SBASE + px) * PW + i] != vm[px * PW + i]) bad++;
      check(bad == 0, $sformatf("simulation relation (%0d words differ)", bad));
    end
    check(n_pff > 0 && n_pfls > 0 && n_evict > 0 && n_case4 > 0, "fault cases seen");
    $display("instructions %0d: fetches %0d loads %0d stores %0d", NINSTR, n_fetch, n_load, n_store);
    $display("page faults: fetch %0d load/store %0d, evictions %0d, fetch fault after load/store fault %0d",
             n_pff, n_pfls, n_evict, n_case4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
