// tb_vamp_mmu_top: end-to-end testbench of the memory management subsystem.
//
// The top is connected to the behavioural split cache memory (random 0..3
// busy cycles per access). The testbench plays the core: it writes pto and
// ptl with movi2s, builds a page table in memory, enters user mode with rfe
// and then runs a sequence that exercises every mechanism of the design:
//   - untranslated fetches and loads/stores in system mode
//   - translated fetches, loads and stores in user mode
//   - page faults on fetch and on load/store (invalid entry, table length,
//     write to a protected page), each raising JISR, saving the cause in ECA
//     and the mode in EMODE and switching to system mode
//   - a "handler" that repairs the page table entry with an untranslated
//     store and returns with rfe, after which the access succeeds
//   - fetch held back while a synchronizing instruction, movi2s or rfe is in
//     decode, or while a valid bit of pto/ptl/mode is low
//   - a fetch interrupted part way by a new address (stabilizer)
//   - external interrupts, masked and unmasked by SR
//   - the illegal-instruction term for an SPR access in user mode
// All data is checked against the testbench's own copy of memory and page
// table; the page fault flags and cycle counts against its own translation.
// Each mechanism is counted and a mechanism that never happened is a failure.
// The top runs with all its parameters at their defaults.
module tb_vamp_mmu_top;
  import mmu_pkg::*;

  localparam int unsigned WORDS = 8192;     // 16 pages of physical memory
  localparam int unsigned NPT   = 16;       // page table entries
  localparam logic [19:0] PTO   = 20'd1;    // page table in physical page 1

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  // core-side signals
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
  // memory back door
  logic            bd_we;
  logic [MA_W-1:0] bd_addr;
  logic [MD_W-1:0] bd_data;
  int unsigned     bi, bd, ai, ad;

  vamp_mmu_top dut (
    .clk, .rst, .if_mr, .if_addr, .busy_if_in, .if_rsp, .fetch, .busy_if,
    .full_id, .ir, .pto_v, .ptl_v, .mode_v, .ill_id, .d_req, .d_rsp,
    .spr_we, .spr_wa, .spr_wd, .spr_ra, .spr_rd, .rfe_wb, .epc_in, .edpc_in, .edata_in,
    .iev, .eev, .jisr, .mca, .mode, .ci_req, .ci_rsp, .cd_req, .cd_rsp);

  split_mem_model #(.WORDS(WORDS), .MAXLAT(3)) u_mem (
    .clk, .rst, .ci_req, .ci_rsp, .cd_req, .cd_rsp, .bd_we, .bd_addr, .bd_data,
    .busy_cycles_i(bi), .busy_cycles_d(bd), .accesses_i(ai), .accesses_d(ad));

  int checks = 0, failures = 0;
  logic [63:0] shadow [WORDS];
  logic [31:0] pt [NPT];
  logic [31:0] ptl_val;

  // mechanism counters
  int n_ifetch_sys = 0, n_ifetch_user = 0, n_load_user = 0, n_store_user = 0, n_dacc_sys = 0;
  int n_pff = 0, n_pfls_inv = 0, n_pfls_len = 0, n_pfls_prot = 0, n_repair = 0;
  int n_stall_sync = 0, n_stall_movi2s = 0, n_stall_rfe = 0, n_stall_valid = 0;
  int n_stab = 0, n_ext = 0, n_ext_masked = 0, n_ill = 0, n_rfe = 0;

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

  task automatic bd_write(input int unsigned a, input logic [63:0] d);
    bd_we = 1'b1; bd_addr = MA_W'(a); bd_data = d;
    tick();
    bd_we = 1'b0;
    shadow[int'(a)] = d;
  endtask

  task automatic write_pte(input int px, input logic [31:0] e);
    int unsigned w;
    pt[int'(px)] = e;
    w = (int'(PTO) * 4096 + 4 * (px & ~1)) / 8;
    bd_write(w, {pt[px | 1], pt[px & ~1]});
  endtask

  task automatic spr_write(input logic [4:0] a, input logic [31:0] d);
    spr_we = 1'b1; spr_wa = a; spr_wd = d;
    tick();
    spr_we = 1'b0;
  endtask

  task automatic do_rfe();
    // rfe sits in decode, fetch is held back, then it completes
    full_id = 1'b1; ir = {6'h3f, 26'd0}; if_mr = 1'b1;
    #1;
    check(!fetch && busy_if && !ci_req.mr, "fetch held while rfe in decode");
    tick();
    check(!ci_req.mr, "no fetch started while rfe in decode");
    n_stall_rfe++;
    if_mr = 1'b0;
    rfe_wb = 1'b1;
    tick();
    rfe_wb = 1'b0; full_id = 1'b0; ir = '0;
    n_rfe++;
  endtask

  // reference translation of a double-word virtual address
  function automatic void xlate(input logic [28:0] va, input bit wr, output bit flt,
                                output bit lenflt, output logic [28:0] pa);
    logic [19:0] px;
    px = va[28:9];
    lenflt = {12'b0, px} > ptl_val;
    flt = lenflt;
    pa = '0;
    if (!lenflt) begin
      flt = !pt[int'(px)][11] || (wr && pt[int'(px)][10]);
      pa = {pt[int'(px)][31:12], va[8:0]};
    end
  endfunction

  // instruction fetch; returns data, page fault and whether JISR came with it
  task automatic ifetch(input logic [28:0] a, output logic [63:0] rd, output bit pf,
                        output bit j, output int cyc);
    if_mr = 1'b1; if_addr = a;
    cyc = 0;
    forever begin
      #3; cyc++;
      if (!if_rsp.busy) begin
        rd = if_rsp.data; pf = if_rsp.pf; j = jisr;
        tick();
        if_mr = 1'b0;
        break;
      end
      tick();
      if (cyc > 100) begin check(1'b0, "fetch does not end"); break; end
    end
  endtask

  task automatic dacc(input bit wr, input logic [28:0] a, input logic [63:0] wd,
                      input logic [7:0] be, output logic [63:0] rd, output bit pf,
                      output bit j, output int cyc);
    d_req = '0; d_req.mr = !wr; d_req.mw = wr; d_req.addr = a; d_req.data = wd; d_req.mbw = be;
    cyc = 0;
    forever begin
      #3; cyc++;
      if (!d_rsp.busy) begin
        rd = d_rsp.data; pf = d_rsp.pf; j = jisr;
        tick();
        d_req = '0;
        break;
      end
      tick();
      if (cyc > 100) begin check(1'b0, "data access does not end"); break; end
    end
  endtask

  task automatic enter_user();
    spr_write(SPR_EMODE, 32'd1);
    spr_write(SPR_ESR, 32'h0);
    do_rfe();
    check(mode == 1'b1, "rfe enters user mode");
  endtask

  task automatic check_fault(input int bitno, input string what);
    #1;
    check(mode == 1'b0, {what, ": JISR enters system mode"});
    spr_ra = SPR_ECA; #1;
    check(spr_rd[bitno] == 1'b1, {what, ": cause in ECA"});
    spr_ra = SPR_EMODE; #1;
    check(spr_rd[0] == 1'b1, {what, ": user mode saved in EMODE"});
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [63:0] rd, wd;
    logic [28:0] a, pa;
    logic [7:0]  be;
    bit pf, j, flt, lenflt, wr;
    int cyc, px;

    {if_mr, busy_if_in, full_id, spr_we, rfe_wb, bd_we} = '0;
    {pto_v, ptl_v, mode_v} = 3'b111;
    if_addr = '0; ir = '0; spr_wd = '0; spr_wa = '0; spr_ra = '0;
    epc_in = '0; edpc_in = '0; edata_in = '0; iev = '0; eev = '0;
    d_req = '0; bd_addr = '0; bd_data = '0;
    for (int i = 0; i < int'(WORDS); i++) shadow[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // memory contents: pages 2..15
    for (int i = 1024; i < int'(WORDS); i += 5) bd_write(i, {$urandom, $urandom});
    // page table: px 0..11, ppx 2..13 distinct, valid; px 5 protected; px 7 invalid
    ptl_val = 32'd11;
    for (int p = 0; p < int'(NPT); p++) pt[p] = '0;
    for (int p = 0; p < int'(NPT); p++)
      write_pte(p, {20'(p + 2), 1'(p != 7), 1'(p == 5), 10'd0});
    spr_write(SPR_PTO, {12'd0, PTO});
    spr_write(SPR_PTL, ptl_val);
    check(mode == 1'b0, "reset leaves system mode");

    // system mode: untranslated accesses
    for (int n = 0; n < 50; n++) begin
      a = 29'($urandom_range(WORDS - 1, 1024));
      ifetch(a, rd, pf, j, cyc);
      check(!pf && rd == shadow[int'(a)], "untranslated fetch");
      n_ifetch_sys++;
      a = 29'($urandom_range(WORDS - 1, 1024));
      wr = 1'($urandom_range(1, 0)); wd = {$urandom, $urandom}; be = 8'($urandom);
      dacc(wr, a, wd, be, rd, pf, j, cyc);
      if (wr) for (int b = 0; b < 8; b++) begin if (be[b]) shadow[int'(a)][8*b +: 8] = wd[8*b +: 8]; end
      else check(rd == shadow[int'(a)], "untranslated load");
      check(!pf, "no fault in system mode");
      n_dacc_sys++;
    end

    enter_user();

    // user mode: random translated traffic over valid, non-protected pages
    for (int n = 0; n < 300; n++) begin
      do px = $urandom_range(11, 0); while (px == 7 || px == 5);
      a = {20'(px), 9'($urandom)};
      xlate(a, 1'b0, flt, lenflt, pa);
      ifetch(a, rd, pf, j, cyc);
      check(!pf && !j && rd == shadow[int'(pa)], $sformatf("translated fetch va=%h", a));
      n_ifetch_user++;
      do px = $urandom_range(11, 0); while (px == 7);
      a = {20'(px), 9'($urandom)};
      wr = (px != 5) && ($urandom_range(1, 0) == 1);
      wd = {$urandom, $urandom}; be = 8'($urandom);
      xlate(a, wr, flt, lenflt, pa);
      dacc(wr, a, wd, be, rd, pf, j, cyc);
      check(!pf && !j, "no fault on valid page");
      if (wr) begin
        for (int b = 0; b < 8; b++) if (be[b]) shadow[int'(pa)][8*b +: 8] = wd[8*b +: 8];
        n_store_user++;
      end else begin
        check(rd == shadow[int'(pa)], $sformatf("translated load va=%h", a));
        n_load_user++;
      end
    end

    // page fault on fetch (invalid page 7), handler repairs it, retry succeeds
    for (int n = 0; n < 5; n++) begin
      a = {20'd7, 9'($urandom)};
      edpc_in = {a, 3'b000};
      ifetch(a, rd, pf, j, cyc);
      check(pf && j, "page fault on fetch raises JISR");
      check_fault(INT_PFF, "pff");
      n_pff++;
      // handler: store the repaired entry with an untranslated store
      begin
        logic [31:0] e;
        int unsigned w;
        e = {20'd14, 1'b1, 1'b0, 10'd0};
        w = (int'(PTO) * 4096 + 4 * 6) / 8;
        dacc(1'b1, 29'(w), {e, e}, 8'hF0, rd, pf, j, cyc);
        shadow[w][63:32] = e;
        pt[7] = e;
      end
      do_rfe();
      check(mode == 1'b1, "rfe returns to user mode");
      xlate(a, 1'b0, flt, lenflt, pa);
      ifetch(a, rd, pf, j, cyc);
      check(!pf && rd == shadow[int'(pa)], "fetch succeeds after repair");
      n_repair++;
      // invalidate page 7 again through the back door
      write_pte(7, {20'd9, 1'b0, 1'b0, 10'd0});
    end

    // page faults on load/store: invalid, table length, protection
    for (int n = 0; n < 15; n++) begin
      int kind;
      kind = n % 3;
      if (kind == 0) begin a = {20'd7, 9'($urandom)}; wr = 1'($urandom_range(1, 0)); end
      else if (kind == 1) begin a = {20'($urandom_range(300, 12)), 9'($urandom)}; wr = 1'($urandom_range(1, 0)); end
      else begin a = {20'd5, 9'($urandom)}; wr = 1'b1; end
      edata_in = {a, 3'b000};
      dacc(wr, a, 64'hdead_beef_0bad_f00d, 8'hFF, rd, pf, j, cyc);
      check(pf && j, "page fault on load/store raises JISR");
      check_fault(INT_PFLS, "pfls");
      spr_ra = SPR_EDATA; #1;
      check(spr_rd == {a, 3'b000}, "faulting address in Edata");
      if (kind == 0) n_pfls_inv++; else if (kind == 1) begin n_pfls_len++; check(cyc == 3, "length fault in 3 cycles"); end
      else n_pfls_prot++;
      enter_user();
    end
    // a load from the protected page is allowed
    a = {20'd5, 9'd3};
    xlate(a, 1'b0, flt, lenflt, pa);
    dacc(1'b0, a, '0, '0, rd, pf, j, cyc);
    check(!pf && rd == shadow[int'(pa)], "load from write-protected page");

    // fetch held back by instructions in decode and by valid bits
    for (int n = 0; n < 20; n++) begin
      int kind;
      kind = n % 5;
      if_mr = 1'b1; if_addr = {20'd1, 9'($urandom)};
      full_id = 1'b0;
      unique case (kind)
        0: begin full_id = 1'b1; ir = {6'd0, 15'd0, SPR_IEEEF, FUN_MOVS2I}; end
        1: begin full_id = 1'b1; ir = {6'd0, 15'd0, SPR_PTO, FUN_MOVI2S}; end
        2: pto_v = 1'b0;
        3: ptl_v = 1'b0;
        default: mode_v = 1'b0;
      endcase
      #1;
      for (int c = 0; c < 3; c++) begin
        check(!fetch && busy_if && !ci_req.mr, "fetch held back");
        tick();
      end
      if (kind == 0) n_stall_sync++; else if (kind == 1) n_stall_movi2s++; else n_stall_valid++;
      if (kind == 1) begin
        check(ill_id, "movi2s to pto in user mode is illegal");
        n_ill++;
      end
      // the instruction leaves decode / the register becomes valid: fetch proceeds
      full_id = 1'b0; ir = '0; {pto_v, ptl_v, mode_v} = 3'b111;
      xlate(if_addr, 1'b0, flt, lenflt, pa);
      ifetch(if_addr, rd, pf, j, cyc);
      check(!pf && rd == shadow[int'(pa)], "fetch after stall");
    end

    // fetch interrupted part way: the stabilizer completes the old access
    for (int n = 0; n < 20; n++) begin
      logic [28:0] b;
      a = {20'd2, 9'($urandom)};
      b = {20'd3, 9'($urandom)};
      if_mr = 1'b1; if_addr = a;
      tick(); tick();
      #1;
      check(if_rsp.busy, "translated fetch still running");
      if_addr = b;              // new DPC forced in
      ifetch(b, rd, pf, j, cyc);
      xlate(b, 1'b0, flt, lenflt, pa);
      check(!pf && rd == shadow[int'(pa)], "response belongs to the new fetch address");
      n_stab++;
    end

    // external interrupts: io line 1 (cause 14) is maskable, reset line is not
    spr_write(SPR_SR, 32'h0);
    eev = 19'b10; #1;
    check(!jisr, "masked I/O interrupt ignored");
    n_ext_masked++;
    spr_write(SPR_SR, 32'h0000_4000);
    eev = 19'b10; #1;
    check(jisr && mca[14], "unmasked I/O interrupt raises JISR");
    tick();
    eev = '0; #1;
    check(mode == 1'b0, "I/O interrupt enters system mode");
    spr_ra = SPR_ESR; #1;
    check(spr_rd == 32'h0000_4000, "SR saved in ESR");
    spr_ra = SPR_SR; #1;
    check(spr_rd == 32'h0, "SR cleared on JISR");
    n_ext++;
    // illegal instruction term is not raised in system mode
    full_id = 1'b1; ir = {6'd0, 15'd0, SPR_PTO, FUN_MOVS2I}; #1;
    check(!ill_id, "SPR access legal in system mode");
    full_id = 1'b0; ir = '0;
    tick();

    // final memory compare
    for (int i = 0; i < int'(WORDS); i++)
      if (u_mem.mem[i] != shadow[i]) check(1'b0, $sformatf("memory word %0d", i));
    check(1'b1, "memory compared");

    $display("sys: fetch %0d data %0d | user: fetch %0d load %0d store %0d",
             n_ifetch_sys, n_dacc_sys, n_ifetch_user, n_load_user, n_store_user);
    $display("faults: pff %0d (repaired %0d) pfls invalid %0d length %0d protection %0d",
             n_pff, n_repair, n_pfls_inv, n_pfls_len, n_pfls_prot);
    $display("fetch held: sync %0d movi2s %0d rfe %0d valid %0d | stabilized %0d | ext %0d masked %0d | ill %0d | rfe %0d",
             n_stall_sync, n_stall_movi2s, n_stall_rfe, n_stall_valid, n_stab, n_ext, n_ext_masked, n_ill, n_rfe);
    check(n_ifetch_sys > 0 && n_dacc_sys > 0 && n_ifetch_user > 0 && n_load_user > 0 &&
          n_store_user > 0, "all access kinds happened");
    check(n_pff > 0 && n_repair > 0 && n_pfls_inv > 0 && n_pfls_len > 0 && n_pfls_prot > 0,
          "all page fault kinds happened");
    check(n_stall_sync > 0 && n_stall_movi2s > 0 && n_stall_rfe > 0 && n_stall_valid > 0,
          "all fetch stall reasons happened");
    check(n_stab > 0 && n_ext > 0 && n_ext_masked > 0 && n_ill > 0 && n_rfe > 0,
          "stabilizer, interrupts, illegal term and rfe happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
