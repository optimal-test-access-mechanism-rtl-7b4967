// tb_rmsc_tam: end-to-end test of the reconfigurable multiple scan chains at
// their default (two-core example) configuration.
//
// Core A has 30 patterns and core B 100, so session 1 has 30 patterns and
// session 2 has 70. rmsc_tester plays the tester and the core logic and
// checks every response bit, the shift/capture sequence, the chain cycles
// (12, then 7) and the moment Ctrl_1 goes active. The testbench checks that
// done rises after 30*(12+1) + 70*(7+1) + 12 = 962 cycles.
module tb_rmsc_tam;
  import tam_pkg::*;

  localparam int NREG = 25;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [CNT_W-1:0] npat [2];
  logic [1:0] si, so;
  logic [NREG-1:0] cap_d, reg_q;
  logic shift_en, capture_en;
  logic [0:0] ctrl;
  logic [0:0] sess;
  logic [CNT_W-1:0] pat;
  logic busy, done;

  always #5 clk = ~clk;

  rmsc_tam dut (
    .clk(clk), .rst_n(rst_n), .start(start), .npat(npat), .si(si), .so(so),
    .cap_d(cap_d), .reg_q(reg_q), .shift_en(shift_en), .capture_en(capture_en),
    .ctrl(ctrl), .sess(sess), .pat(pat), .busy(busy), .done(done)
  );

  int t_checks, t_fail, t_cycles, t_byp, t_cap, t_bits;
  logic t_fin;
  rmsc_tester #(.NPAT_A(30), .NPAT_B(70)) u_tester (
    .clk, .start, .si, .so, .reg_q, .cap_d, .shift_en, .capture_en, .ctrl, .sess,
    .checks(t_checks), .failures(t_fail), .cycles(t_cycles), .n_bypass(t_byp),
    .n_capture(t_cap), .n_resp_bits(t_bits), .finished(t_fin)
  );

  int checks = 0, failures = 0, cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    npat[0] = 30;
    npat[1] = 70;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !done && ctrl == 1'b0, "idle after reset");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    #1;
    check(cyc == 962, "total test cycles");
    check(!busy && ctrl == 1'b1, "Ctrl_1 stays active at the end");
    check(t_fin && t_byp == 1 && t_cap == 100 && t_bits > 0, "mechanisms exercised");
    $display("tb_rmsc_tam: %0d cycles, %0d captures, %0d response bits, %0d bypass switch",
             cyc, t_cap, t_bits, t_byp);
    checks += t_checks;
    failures += t_fail;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
