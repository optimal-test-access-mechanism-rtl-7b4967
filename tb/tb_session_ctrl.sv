// tb_session_ctrl: three sessions with random pattern counts and chain
// cycles. The expected cycle-by-cycle sequence (shift cc[0]; per pattern of
// session i: capture, shift cc[i]) is built independently and compared with
// shift_en, capture_en and the control signals; the total must equal
// sum npat[i]*(cc[i]+1) + cc[0]. Run several times, including a restart.
module tb_session_ctrl;
  import tam_pkg::*;

  localparam int NS = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [CNT_W-1:0] npat [NS];
  logic [CNT_W-1:0] cc [NS];
  logic shift_en, capture_en, busy, done;
  logic [NS-2:0] ctrl;
  logic [1:0] sess;
  logic [CNT_W-1:0] pat;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  session_ctrl #(.N_SESS(NS)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // expected event per cycle: 0 shift, 1 capture; and control state
  int ev [$];
  int ct [$];

  task automatic run_one();
    int tau;
    ev.delete();
    ct.delete();
    for (int i = 0; i < NS; i++) begin
      npat[i] = 1 + $urandom % 5;
      cc[i]   = 1 + $urandom % 6;
    end
    for (int c = 0; c < int'(cc[0]); c++) begin ev.push_back(0); ct.push_back(0); end
    for (int i = 0; i < NS; i++)
      for (int p = 0; p < int'(npat[i]); p++) begin
        ev.push_back(1); ct.push_back((1 << i) - 1);
        for (int c = 0; c < int'(cc[i]); c++) begin ev.push_back(0); ct.push_back((1 << i) - 1); end
      end
    tau = 0;
    for (int i = 0; i < NS; i++) tau += int'(npat[i]) * (int'(cc[i]) + 1);
    tau += int'(cc[0]);
    check(ev.size() == tau, "reference length");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    foreach (ev[k]) begin
      check(shift_en == (ev[k] == 0) && capture_en == (ev[k] == 1), "shift/capture sequence");
      check(int'(ctrl) == ct[k], "control signals");
      check(busy && !done, "busy");
      @(negedge clk);
    end
    check(done && !busy, "done after tau cycles");
    check(ctrl == '1, "all control signals active at the end");
    repeat (3) @(negedge clk);
    check(done && !shift_en && !capture_en, "idle after done");
  endtask

  initial begin
    for (int i = 0; i < NS; i++) begin npat[i] = 1; cc[i] = 1; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && ctrl == '0, "reset state");
    for (int t = 0; t < 6; t++) run_one();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
