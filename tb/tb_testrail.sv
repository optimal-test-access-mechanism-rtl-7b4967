// tb_testrail: one TestRail at its default size (10 bits, two cores) tested
// end to end by rail_tester. Checks every response bit, the wrapper modes,
// that done rises exactly when the rail's time, the sum over its cores of
// (1+max(si,so))*p + min(si,so), has elapsed, and that the wrappers return to
// functional mode afterwards.
module tb_testrail;
  import tam_pkg::*;

  localparam size_tab_t NPat = size_tab_t'({16'd6, 16'd5});

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [CNT_W-1:0] npat [2];
  logic [9:0] rsi, rso;
  logic [19:0] pi = '0, core_in;
  logic [15:0] po, core_out;
  logic [59:0] ff_q, ff_d;
  wrap_mode_e mode [2];
  logic shift_en, capture_en, busy, done;
  logic [0:0] core;
  logic [CNT_W-1:0] pat;

  always #5 clk = ~clk;

  testrail dut (.*);

  int t_checks, t_fail, t_cycles, t_expect, t_byp;
  logic t_fin;
  rail_tester #(.NPAT(NPat)) u_tester (
    .clk, .start, .rsi, .rso, .core_in, .core_out, .ff_q, .ff_d, .mode,
    .shift_en, .capture_en, .checks(t_checks), .failures(t_fail),
    .cycles(t_cycles), .expected_cycles(t_expect), .n_bypass_cycles(t_byp),
    .finished(t_fin)
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
    npat[0] = CNT_W'(NPat[0]);
    npat[1] = CNT_W'(NPat[1]);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    pi = 20'($urandom);
    #1;
    check(mode[0] == WM_NORMAL && mode[1] == WM_NORMAL, "normal mode when idle");
    check(core_in == pi && po == core_out, "functional path in normal mode");
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    #1;
    check(cyc == t_expect, "done after the rail test time");
    check(t_fin, "tester finished");
    check(t_byp > 0, "bypass mode used");
    check(mode[0] == WM_NORMAL && mode[1] == WM_NORMAL, "normal mode after test");
    $display("tb_testrail: %0d cycles (expected %0d)", cyc, t_expect);
    checks += t_checks;
    failures += t_fail;
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
