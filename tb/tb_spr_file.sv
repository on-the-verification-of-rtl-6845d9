// tb_spr_file: self-checking testbench for the special purpose registers.
//
// Random movi2s writes to all 32 addresses, reads of all addresses, JISR
// events and rfe, checked every cycle against a register model kept here:
// the assigned addresses store their value, unassigned ones read 0, JISR
// saves SR, the cause vector, EPC/EDPC/Edata and MODE and enters system mode
// with SR cleared, rfe restores SR and MODE.
module tb_spr_file;
  import mmu_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        we, jisr, rfe, mode;
  logic [4:0]  wa, ra;
  logic [31:0] wd, rd, mca, epc_in, edpc_in, edata_in, sr, pto, ptl;
  logic [31:0] model [32];
  int checks = 0, failures = 0, n_jisr = 0, n_rfe = 0;

  spr_file dut (.clk, .rst, .we, .wa, .wd, .ra, .rd, .jisr, .mca, .epc_in, .edpc_in,
                .edata_in, .rfe, .sr, .pto, .ptl, .mode);

  function automatic bit assigned(input int a);
    return a <= 11 || a == 16;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {we, jisr, rfe} = '0;
    {wa, ra, wd, mca, epc_in, edpc_in, edata_in} = '0;
    for (int a = 0; a < 32; a++) model[a] = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      int k;
      k = $urandom_range(19, 0);
      jisr = (k == 0);
      rfe  = (k == 1);
      we   = (k >= 2 && k < 12);
      wa = 5'($urandom); if (k >= 8 && k < 12) wa = 5'($urandom_range(16, 9));
      wd = $urandom;
      ra = 5'($urandom);
      mca = $urandom; epc_in = $urandom; edpc_in = $urandom; edata_in = $urandom;
      #1;
      check(rd == (assigned(int'(ra)) ? model[ra] : 32'h0), $sformatf("read of %0d", ra));
      check(sr == model[0] && pto == model[9] && ptl == model[10] && mode == model[16][0],
            "direct outputs");
      @(posedge clk);
      if (jisr) begin
        n_jisr++;
        model[1] = model[0]; model[2] = mca; model[3] = epc_in; model[4] = edpc_in;
        model[5] = edata_in; model[11] = model[16]; model[0] = '0; model[16] = '0;
      end else if (rfe) begin
        n_rfe++;
        model[0] = model[1]; model[16] = model[11];
      end else if (we && assigned(int'(wa))) model[wa] = wd;
      #1;
    end
    check(n_jisr > 100 && n_rfe > 100, "JISR and rfe exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
