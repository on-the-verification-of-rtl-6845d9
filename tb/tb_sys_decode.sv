// tb_sys_decode: self-checking testbench for the system instruction decoder.
//
// Drives directed instruction words (movs2i/movi2s with every special purpose
// register address, rfe, ordinary instructions) and random words in both
// modes, and compares every output with an expectation computed here from
// the instruction fields.
module tb_sys_decode;
  import mmu_pkg::*;

  logic [31:0] ir;
  logic        mode, movs2i, movi2s, rfe, syncing, ill;
  int checks = 0, failures = 0;

  sys_decode dut (.ir, .mode, .movs2i, .movi2s, .rfe, .syncing, .ill);

  task automatic apply(input logic [31:0] w, input logic m);
    bit e_s2i, e_i2s, e_rfe, e_sync, e_ill, user_ok;
    ir = w; mode = m;
    #1;
    e_s2i = (w[31:26] == 6'd0) && (w[5:0] == 6'h10);
    e_i2s = (w[31:26] == 6'd0) && (w[5:0] == 6'h11);
    e_rfe = (w[31:26] == 6'h3f);
    user_ok = (w[10:6] == 5'd6) || (w[10:6] == 5'd7) || (w[10:6] == 5'd8);
    e_sync = (e_s2i && w[10:6] == 5'd7) || e_rfe;
    e_ill = m && (e_rfe || ((e_s2i || e_i2s) && !user_ok));
    checks++;
    if ({movs2i, movi2s, rfe, syncing, ill} !== {e_s2i, e_i2s, e_rfe, e_sync, e_ill}) begin
      failures++;
      if (failures < 20)
        $display("FAIL ir=%h mode=%b got %b%b%b%b%b", w, m, movs2i, movi2s, rfe, syncing, ill);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int sa = 0; sa < 32; sa++) begin
        apply({6'd0, 15'($urandom), 5'(sa), 6'h10}, 1'(m));   // movs2i
        apply({6'd0, 15'($urandom), 5'(sa), 6'h11}, 1'(m));   // movi2s
      end
      apply({6'h3f, 26'($urandom)}, 1'(m));                   // rfe
      apply({6'h23, 26'($urandom)}, 1'(m));                   // lw
      apply({6'd0, 20'($urandom), 6'h20}, 1'(m));             // add
    end
    for (int n = 0; n < 20000; n++) begin
      logic [31:0] w;
      w = $urandom;
      if (n % 3 == 0) w[31:26] = 6'd0;
      if (n % 5 == 0) w[5:0] = 6'h10 | 6'($urandom_range(1, 0));
      apply(w, 1'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
