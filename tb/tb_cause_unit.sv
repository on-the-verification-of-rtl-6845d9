// tb_cause_unit: self-checking testbench for the interrupt cause logic.
//
// Applies random and directed external lines, internal events and status
// register values and compares cause vector, masked cause vector and JISR
// with values computed here from the interrupt table: which lines are
// external, which are maskable, and where each external line lands.
module tb_cause_unit;
  import mmu_pkg::*;

  logic [18:0] eev;
  logic [31:0] iev, sr, ca, mca, ca_v, mca_v;
  logic        jisr, jisr_v;
  int checks = 0, failures = 0;

  cause_unit #(.PF_VISIBLE(1'b1)) dut   (.eev, .iev, .sr, .ca, .mca, .jisr);
  cause_unit #(.PF_VISIBLE(1'b0)) dut_v (.eev, .iev, .sr, .ca(ca_v), .mca(mca_v), .jisr(jisr_v));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s eev=%h iev=%h sr=%h", what, eev, iev, sr);
    end
  endtask

  task automatic apply(input logic [18:0] e, input logic [31:0] i, input logic [31:0] s);
    logic [31:0] c, mk;
    bit maskable, jv;
    eev = e; iev = i; sr = s;
    #1;
    for (int j = 0; j < 32; j++) begin
      if (j == 0) c[j] = e[0];
      else if (j >= 14) c[j] = e[j - 13];
      else c[j] = i[j];
      maskable = (j >= 6 && j <= 11) || j >= 14;
      mk[j] = maskable ? s[j] : 1'b1;
    end
    jv = 1'b0;
    for (int j = 0; j < 32; j++) if (j != 3 && j != 4 && c[j] && mk[j]) jv = 1'b1;
    check(ca == c, "cause vector");
    check(mca == (c & mk), "masked cause vector");
    check(jisr == |(c & mk), "JISR");
    check(jisr_v == jv, "JISR without page faults");
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // each single cause, masked and unmasked
    for (int j = 0; j < 32; j++) begin
      logic [18:0] e;
      logic [31:0] i;
      e = '0; i = '0;
      if (j == 0) e[0] = 1'b1;
      else if (j >= 14) e[j - 13] = 1'b1;
      else i[j] = 1'b1;
      apply(e, i, 32'h0);
      apply(e, i, 32'hFFFF_FFFF);
    end
    // internal events at external positions are ignored
    apply('0, 32'hFFFF_C001, 32'hFFFF_FFFF);
    check(jisr == 1'b0, "iev at external positions ignored");
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] i;
      i = (n % 2 != 0) ? ($urandom & $urandom & $urandom) : 32'($urandom_range(1, 0) << $urandom_range(31, 0));
      apply(19'($urandom & $urandom & $urandom), i, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
