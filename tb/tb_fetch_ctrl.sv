// tb_fetch_ctrl: self-checking testbench for the fetch gating.
//
// Every cycle the decode stage contents (ordinary instructions, movi2s, rfe,
// movs2i from IEEEf or from another register), the valid bits of pto, ptl and
// mode and busy'_IF are drawn at random. A responder in the testbench answers
// instruction reads after 0..3 busy cycles, and the fetch stage holds its
// request until its access ends. The testbench checks fetch, busy_IF and the
// gated read request against the equations, with its own record of whether a
// fetch access is running, and that a running fetch is never cut off. It
// counts how often each reason blocked a fetch and how often a running access
// kept fetch on.
module tb_fetch_ctrl;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        full_id, mode_cur, pto_v, ptl_v, mode_v, busy_if_in, if_mr, i_busy;
  logic [31:0] ir;
  logic        fetch, busy_if, imr, ill_id;
  int checks = 0, failures = 0;
  int unsigned cnt = 0, lat = 0;
  logic running = 1'b0;
  int n_sync = 0, n_movi2s = 0, n_rfe = 0, n_valid = 0, n_hold = 0, n_fetch = 0;

  fetch_ctrl dut (.clk, .rst, .full_id, .ir, .mode_cur, .pto_v, .ptl_v, .mode_v,
                  .busy_if_in, .if_mr, .i_busy, .fetch, .busy_if, .imr, .ill_id);

  assign i_busy = imr && (cnt < lat);

  always @(posedge clk) begin
    if (!rst && imr) begin
      if (i_busy) begin cnt <= cnt + 1; running <= 1'b1; end
      else begin cnt <= 0; lat <= $urandom_range(3, 0); running <= 1'b0; n_fetch++; end
    end
  end

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
    bit is_sync, is_i2s, is_rfe, f_exp;
    int k;
    {full_id, mode_cur, pto_v, ptl_v, mode_v, busy_if_in, if_mr} = '0;
    ir = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 40000; n++) begin
      full_id = 1'($urandom_range(1, 0));
      k = $urandom_range(4, 0);
      case (k)
        0: ir = {6'd0, 15'($urandom), 5'd7, 6'h10};           // movs2i IEEEf
        1: ir = {6'd0, 15'($urandom), 5'($urandom), 6'h11};   // movi2s
        2: ir = {6'h3f, 26'($urandom)};                       // rfe
        3: ir = {6'd0, 15'($urandom), 5'd9, 6'h10};           // movs2i pto
        default: ir = {6'h23, 26'($urandom)};                 // lw
      endcase
      mode_cur = 1'($urandom_range(1, 0));
      pto_v = $urandom_range(7, 0) != 0;
      ptl_v = $urandom_range(7, 0) != 0;
      mode_v = $urandom_range(7, 0) != 0;
      busy_if_in = $urandom_range(3, 0) == 0;
      if (!running) if_mr = $urandom_range(2, 0) != 0;
      #1;
      is_sync = (ir[31:26] == 0 && ir[5:0] == 6'h10 && ir[10:6] == 5'd7);
      is_i2s  = (ir[31:26] == 0 && ir[5:0] == 6'h11);
      is_rfe  = (ir[31:26] == 6'h3f);
      f_exp = pto_v && ptl_v && mode_v && !(full_id && (is_sync || is_i2s || is_rfe));
      if (!f_exp && !running) begin
        if (!(pto_v && ptl_v && mode_v)) n_valid++;
        else if (is_sync) n_sync++;
        else if (is_i2s) n_movi2s++;
        else n_rfe++;
      end
      if (!f_exp && running) n_hold++;
      check(fetch == (f_exp || running), "fetch");
      check(busy_if == (busy_if_in || !fetch), "busy_IF");
      check(imr == (if_mr && fetch), "gated read request");
      if (running) check(imr, "running fetch not cut off");
      @(posedge clk);
    end
    check(n_sync > 0 && n_movi2s > 0 && n_rfe > 0 && n_valid > 0 && n_hold > 0,
          "every blocking reason and the hold seen");
    $display("blocked: sync %0d movi2s %0d rfe %0d valid %0d; held %0d; fetches %0d",
             n_sync, n_movi2s, n_rfe, n_valid, n_hold, n_fetch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
