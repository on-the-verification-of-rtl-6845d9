// tb_mmu: self-checking testbench for the MMU.
//
// The MMU's cache port is connected to the data port of the behavioural
// memory model (random 0..3 busy cycles per access). The testbench builds a
// page table in memory through the model's back door, keeps its own copy of
// the table and of the memory, and issues random reads and writes in system
// and user mode: valid and invalid entries, write-protected pages, page
// indices beyond the table length. For each access it checks the page fault
// flag, the read data against its own translation of the address, and the
// length of the access in cycles (2 + busy cycles untranslated, 3 for a table
// length fault, 5 + busy cycles for a table walk). At the end the whole memory
// is compared with the copy.
module tb_mmu;
  import mmu_pkg::*;

  localparam int unsigned WORDS = 8192;    // 16 pages of 4 KB
  localparam int unsigned NPT   = 16;      // page table entries kept in the table

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  mem_req_t p_req, m_req, ci_idle;
  mmu_rsp_t p_rsp;
  mem_rsp_t m_rsp, ci_rsp;
  logic        mode;
  logic [31:0] pto, ptl;
  logic            bd_we;
  logic [MA_W-1:0] bd_addr;
  logic [MD_W-1:0] bd_data;
  int unsigned bi, bd, ai, ad;

  mmu dut (.clk, .rst, .p_req, .p_rsp, .mode, .pto, .ptl, .m_req, .m_rsp);

  assign ci_idle = '0;
  split_mem_model #(.WORDS(WORDS), .MAXLAT(3)) u_mem (
    .clk, .rst, .ci_req(ci_idle), .ci_rsp, .cd_req(m_req), .cd_rsp(m_rsp),
    .bd_we, .bd_addr, .bd_data,
    .busy_cycles_i(bi), .busy_cycles_d(bd), .accesses_i(ai), .accesses_d(ad));

  int checks = 0, failures = 0;
  logic [63:0] shadow [WORDS];
  logic [31:0] pt [NPT];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic bd_write(input int unsigned a, input logic [63:0] d);
    @(posedge clk); #1;
    bd_we = 1'b1; bd_addr = MA_W'(a); bd_data = d;
    @(posedge clk); #1;
    bd_we = 1'b0;
    shadow[int'(a)] = d;
  endtask

  // one access through the MMU; returns data, pf and the number of cycles
  task automatic access(input bit wr, input logic [28:0] a, input logic [63:0] wd,
                        input logic [7:0] be, output logic [63:0] rd,
                        output bit pf, output int cyc, output int nbusy);
    int unsigned b0;
    b0 = bd;
    p_req = '0; p_req.mr = !wr; p_req.mw = wr; p_req.addr = a;
    p_req.data = wd; p_req.mbw = be;
    cyc = 0;
    forever begin
      #4; cyc++;
      if (!p_rsp.busy) begin
        rd = p_rsp.data; pf = p_rsp.pf;
        @(posedge clk); #1;
        p_req = '0;
        break;
      end
      @(posedge clk); #1;
      if (cyc > 200) break;
    end
    nbusy = int'(bd - b0);
  endtask

  // reference translation of a double-word virtual address
  function automatic void xlate(input logic [28:0] va, input bit wr, output bit flt,
                                output bit lenflt, output logic [28:0] pa);
    logic [19:0] px;
    logic [31:0] e;
    px = va[28:9];
    lenflt = {12'b0, px} > ptl;
    flt = lenflt;
    pa = '0;
    if (!lenflt) begin
      e = pt[int'(px)];
      flt = !e[11] || (wr && e[10]);
      pa = {e[31:12], va[8:0]};
    end
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [63:0] rd, wd;
    logic [7:0]  be;
    logic [28:0] a, pa;
    bit pf, flt, lenflt, wr;
    int cyc, nb;
    automatic int n_walk = 0, n_sys = 0, n_len = 0, n_inv = 0, n_prot = 0;

    p_req = '0; bd_we = 1'b0; bd_addr = '0; bd_data = '0;
    mode = 1'b0; pto = 32'd1; ptl = 32'd11;
    for (int i = 0; i < int'(WORDS); i++) shadow[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // data pages 2..15 with random contents (sparse: every 7th word)
    for (int i = 1024; i < int'(WORDS); i += 7) bd_write(i, {$urandom, $urandom});

    for (int round = 0; round < 6; round++) begin
      // new page table: ptl varies, entries random
      ptl = 32'($urandom_range(12, 3));
      for (int px = 0; px < int'(NPT); px++) begin
        pt[px] = {20'($urandom_range(15, 2)), 1'($urandom_range(3, 0) != 0),
                  1'($urandom_range(2, 0) == 0), 10'($urandom)};
      end
      for (int k = 0; k < int'(NPT) / 2; k++)
        bd_write(512 + k, {pt[2*k+1], pt[2*k]});

      for (int n = 0; n < 400; n++) begin
        wr = ($urandom_range(2, 0) == 0);
        be = 8'($urandom);
        wd = {$urandom, $urandom};
        if ($urandom_range(3, 0) == 0) begin
          // system mode: untranslated, data pages only
          mode = 1'b0;
          a = 29'($urandom_range(WORDS - 1, 1024));
          access(wr, a, wd, be, rd, pf, cyc, nb);
          n_sys++;
          check(!pf, "no fault in system mode");
          check(cyc == 2 + nb, $sformatf("system mode length %0d busy %0d", cyc, nb));
          if (wr) begin
            for (int b = 0; b < 8; b++) if (be[b]) shadow[int'(a)][8*b +: 8] = wd[8*b +: 8];
          end else check(rd == shadow[int'(a)], "system mode read data");
        end else begin
          mode = 1'b1;
          a = {20'($urandom_range(int'(ptl) + 2, 0)), 9'($urandom)};
          if ($urandom_range(15, 0) == 0) a[28:9] = 20'($urandom);
          xlate(a, wr, flt, lenflt, pa);
          access(wr, a, wd, be, rd, pf, cyc, nb);
          check(pf == flt, $sformatf("page fault flag va=%h", a));
          if (lenflt) begin
            n_len++;
            check(cyc == 3, $sformatf("length fault takes 3 cycles, got %0d", cyc));
          end else begin
            check(cyc == 5 + nb, $sformatf("table walk length %0d busy %0d", cyc, nb));
            if (flt && pt[int'(a[28:9])][11]) n_prot++;
            else if (flt) n_inv++;
            else n_walk++;
            if (!flt) begin
              if (wr) begin
                for (int b = 0; b < 8; b++) if (be[b]) shadow[int'(pa)][8*b +: 8] = wd[8*b +: 8];
              end else check(rd == shadow[int'(pa)], $sformatf("translated read va=%h pa=%h", a, pa));
            end
          end
        end
      end
    end

    repeat (2) @(posedge clk);
    for (int i = 0; i < int'(WORDS); i++)
      if (u_mem.mem[i] != shadow[i]) begin
        check(1'b0, $sformatf("memory word %0d", i));
      end
    check(1'b1, "memory compare done");
    check(n_len > 0 && n_inv > 0 && n_prot > 0 && n_walk > 0 && n_sys > 0, "all access kinds seen");
    $display("accesses: system %0d, translated %0d, length faults %0d, invalid %0d, protection %0d",
             n_sys, n_walk, n_len, n_inv, n_prot);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
