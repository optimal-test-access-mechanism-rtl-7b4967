// tb_rail_ctrl: three cores with random scan lengths and pattern counts. The
// expected cycle-by-cycle sequence (per core: shift si; per pattern capture,
// then shift max(si,so), or so after the last pattern) and the wrapper modes
// are built independently and compared; the test time must be the sum of
// (1+max(si,so))*p + min(si,so). Several random runs.
module tb_rail_ctrl;
  import tam_pkg::*;

  localparam int NC = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [CNT_W-1:0] si [NC], so [NC], npat [NC];
  wrap_mode_e mode [NC];
  logic shift_en, capture_en, busy, done;
  logic [1:0] core;
  logic [CNT_W-1:0] pat;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rail_ctrl #(.NCORE(NC)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int ev [$];   // 0 shift, 1 capture
  int ec [$];   // core under test

  task automatic run_one();
    int t;
    ev.delete();
    ec.delete();
    t = 0;
    for (int k = 0; k < NC; k++) begin
      int a, b, p, mx, mn;
      a = 1 + $urandom % 6;
      b = 1 + $urandom % 6;
      p = 1 + $urandom % 4;
      si[k] = a;
      so[k] = b;
      npat[k] = p;
      mx = (a > b) ? a : b;
      mn = (a < b) ? a : b;
      t += (1 + mx) * p + mn;
      for (int c = 0; c < a; c++) begin ev.push_back(0); ec.push_back(k); end
      for (int q = 1; q <= p; q++) begin
        ev.push_back(1); ec.push_back(k);
        for (int c = 0; c < ((q == p) ? b : mx); c++) begin ev.push_back(0); ec.push_back(k); end
      end
    end
    check(ev.size() == t, "reference matches the test-time formula");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    foreach (ev[i]) begin
      check(shift_en == (ev[i] == 0) && capture_en == (ev[i] == 1), "shift/capture sequence");
      for (int m = 0; m < NC; m++)
        check(mode[m] == ((m == ec[i]) ? WM_INTEST : WM_BYPASS), "wrapper modes");
      @(negedge clk);
    end
    check(done && !busy, "done after the rail test time");
    for (int m = 0; m < NC; m++) check(mode[m] == WM_NORMAL, "normal mode when idle");
  endtask

  initial begin
    for (int k = 0; k < NC; k++) begin si[k] = 1; so[k] = 1; npat[k] = 1; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done, "reset state");
    for (int r = 0; r < 6; r++) run_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
