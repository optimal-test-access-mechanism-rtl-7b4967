// tb_soc_tam_top: whole-design test at the default sizes (no parameter is
// changed). Both test access mechanisms run at the same time:
//  - the reconfigurable multiple scan chains apply the two-core example
//    (30 and 100 patterns) through rmsc_tester, which must take 962 cycles
//    and switch Ctrl_1 once;
//  - the TestRail TAM tests its four cores through one rail_tester per rail;
//    each rail's time and the chip's time (the longer rail) are checked.
// Before and after the test the TestRail wrappers must be in normal mode
// with the functional paths connected. The mechanisms the design has are
// counted and each must have happened: the pipelined capture, the bypass of
// a finished core by its control signal, the wrapper internal-test and
// bypass modes, parallel rails and the normal mode.
module tb_soc_tam_top;
  import tam_pkg::*;

  localparam size_tab_t NPat0 = size_tab_t'({16'd6, 16'd5});
  localparam size_tab_t NPat1 = size_tab_t'({16'd9, 16'd4});

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic rmsc_start = 1'b0, tr_start = 1'b0;
  logic [CNT_W-1:0] rmsc_npat [2];
  logic [1:0] rmsc_si, rmsc_so;
  logic [24:0] rmsc_cap_d, rmsc_reg_q;
  logic rmsc_shift_en, rmsc_capture_en, rmsc_busy, rmsc_done;
  logic [0:0] rmsc_ctrl;
  logic rmsc_sess;
  logic [CNT_W-1:0] rmsc_pat;
  logic [CNT_W-1:0] tr_npat [4];
  logic [15:0] tr_si, tr_so;
  logic [30:0] tr_pi = '0, tr_core_in;
  logic [26:0] tr_po, tr_core_out;
  logic [101:0] tr_ff_q, tr_ff_d;
  wrap_mode_e tr_mode [4];
  logic [1:0] tr_shift_en, tr_capture_en, tr_rail_busy, tr_rail_done;
  logic [CNT_W-1:0] tr_rail_pat [2];
  logic tr_done;

  always #5 clk = ~clk;

  soc_tam_top dut (.*);

  // reconfigurable multiple scan chains: tester and core model
  int rc, rf, rcy, rbyp, rcap, rbits;
  logic rfin;
  rmsc_tester #(.NPAT_A(30), .NPAT_B(70)) u_rt (
    .clk, .start(rmsc_start), .si(rmsc_si), .so(rmsc_so), .reg_q(rmsc_reg_q),
    .cap_d(rmsc_cap_d), .shift_en(rmsc_shift_en), .capture_en(rmsc_capture_en),
    .ctrl(rmsc_ctrl), .sess(rmsc_sess), .checks(rc), .failures(rf), .cycles(rcy),
    .n_bypass(rbyp), .n_capture(rcap), .n_resp_bits(rbits), .finished(rfin)
  );

  // TestRail TAM: one tester and core model per rail
  wrap_mode_e mode0 [2], mode1 [2];
  assign mode0[0] = tr_mode[0];
  assign mode0[1] = tr_mode[1];
  assign mode1[0] = tr_mode[2];
  assign mode1[1] = tr_mode[3];
  logic [19:0] ci0;
  logic [15:0] co0;
  logic [10:0] ci1;
  logic [10:0] co1;
  logic [59:0] fq0, fd0;
  logic [41:0] fq1, fd1;
  assign ci0 = tr_core_in[19:0];
  assign ci1 = tr_core_in[30:20];
  assign fq0 = tr_ff_q[59:0];
  assign fq1 = tr_ff_q[101:60];
  logic [26:0] model_out;
  assign model_out = {co1, co0};
  logic [101:0] model_ff;
  assign model_ff = {fd1, fd0};
  // in normal mode the core outputs are driven by the testbench directly
  logic normal_drive = 1'b1;
  logic [26:0] normal_out = '0;
  assign tr_core_out = normal_drive ? normal_out : model_out;
  assign tr_ff_d = model_ff;

  int c0, f0, cy0, e0, b0, c1, f1, cy1, e1, b1;
  logic fin0, fin1;

  rail_tester #(.W(10), .NCORE(2),
    .N_IN(size_tab_t'({16'd12, 16'd8})), .N_FF(size_tab_t'({16'd20, 16'd40})),
    .N_OUT(size_tab_t'({16'd10, 16'd6})), .NPAT(NPat0), .SEED(7)) u_t0 (
    .clk, .start(tr_start), .rsi(tr_si[9:0]), .rso(tr_so[9:0]),
    .core_in(ci0), .core_out(co0), .ff_q(fq0), .ff_d(fd0),
    .mode(mode0), .shift_en(tr_shift_en[0]), .capture_en(tr_capture_en[0]),
    .checks(c0), .failures(f0), .cycles(cy0), .expected_cycles(e0), .n_bypass_cycles(b0),
    .finished(fin0)
  );

  rail_tester #(.W(6), .NCORE(2),
    .N_IN(size_tab_t'({16'd6, 16'd5})), .N_FF(size_tab_t'({16'd12, 16'd30})),
    .N_OUT(size_tab_t'({16'd7, 16'd4})), .NPAT(NPat1), .SEED(11)) u_t1 (
    .clk, .start(tr_start), .rsi(tr_si[15:10]), .rso(tr_so[15:10]),
    .core_in(ci1), .core_out(co1), .ff_q(fq1), .ff_d(fd1),
    .mode(mode1), .shift_en(tr_shift_en[1]), .capture_en(tr_capture_en[1]),
    .checks(c1), .failures(f1), .cycles(cy1), .expected_cycles(e1), .n_bypass_cycles(b1),
    .finished(fin1)
  );

  int checks = 0, failures = 0;
  int n_normal = 0, n_parallel = 0, n_intest = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic normal_mode_check();
    for (int i = 0; i < 4; i++) begin
      tr_pi = 31'($urandom);
      normal_out = 27'($urandom);
      #1;
      check(tr_mode[0] == WM_NORMAL && tr_mode[3] == WM_NORMAL, "wrappers in normal mode");
      check(tr_core_in == tr_pi && tr_po == tr_core_out, "functional paths in normal mode");
      n_normal++;
      @(negedge clk);
    end
  endtask

  int rmsc_cyc = -1, tr_cyc = -1, rail_at [2] = '{-1, -1};

  initial begin
    rmsc_npat[0] = 30;
    rmsc_npat[1] = 70;
    for (int k = 0; k < 2; k++) begin
      tr_npat[k]     = CNT_W'(NPat0[k]);
      tr_npat[2 + k] = CNT_W'(NPat1[k]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    normal_mode_check();
    normal_drive = 1'b0;
    rmsc_start = 1'b1;
    tr_start = 1'b1;
    @(negedge clk);
    rmsc_start = 1'b0;
    tr_start = 1'b0;
    for (int cyc = 1; cyc <= 1200 && !(rmsc_done && tr_done); cyc++) begin
      @(negedge clk);
      if (rmsc_done && rmsc_cyc < 0) rmsc_cyc = cyc;
      if (tr_done && tr_cyc < 0) tr_cyc = cyc;
      for (int r = 0; r < 2; r++) if (tr_rail_done[r] && rail_at[r] < 0) rail_at[r] = cyc;
      if (tr_rail_busy == 2'b11) n_parallel++;
      if (tr_mode[0] == WM_INTEST || tr_mode[2] == WM_INTEST) n_intest++;
    end
    #1;
    check(rmsc_cyc == 962, "RMSC test time 962 cycles");
    check(rail_at[0] == e0 && rail_at[1] == e1, "TestRail rail times");
    check(tr_cyc == ((e0 > e1) ? e0 : e1), "TestRail chip time is the longest rail");
    check(rfin && fin0 && fin1, "testers finished");
    normal_drive = 1'b1;
    normal_mode_check();
    $display("tb_soc_tam_top: RMSC %0d cycles (%0d captures, %0d response bits, %0d control switch)",
             rmsc_cyc, rcap, rbits, rbyp);
    $display("tb_soc_tam_top: TestRail rails %0d and %0d cycles, chip %0d", rail_at[0], rail_at[1], tr_cyc);
    $display("tb_soc_tam_top: mechanisms: pipelined capture %0d, core bypass by control %0d, wrapper intest %0d, wrapper bypass %0d, parallel rails %0d, normal mode %0d",
             rcap, rbyp, n_intest, b0 + b1, n_parallel, n_normal);
    check(rcap > 0, "pipelined capture happened");
    check(rbyp > 0, "control-signal bypass happened");
    check(n_intest > 0, "wrapper internal test happened");
    check(b0 > 0 && b1 > 0, "wrapper bypass happened");
    check(n_parallel > 0, "rails ran in parallel");
    check(n_normal > 0, "normal mode happened");
    checks += rc + c0 + c1;
    failures += rf + f0 + f1;
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
