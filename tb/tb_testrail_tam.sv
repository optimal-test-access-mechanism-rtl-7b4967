// tb_testrail_tam: the default TestRail TAM (16 pins: a 10-bit rail with
// two cores and a 6-bit rail with two cores) tested end to end, one
// rail_tester per rail running in parallel. Checks every response bit, each
// rail's test time, that rail_done rises per rail and done when the longer
// rail ends, i.e. the chip's test time is the maximum of the rails' times.
module tb_testrail_tam;
  import tam_pkg::*;

  localparam size_tab_t NPat0 = size_tab_t'({16'd6, 16'd5});
  localparam size_tab_t NPat1 = size_tab_t'({16'd9, 16'd4});

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [CNT_W-1:0] npat [4];
  logic [15:0] rail_si, rail_so;
  logic [30:0] pi = '0, core_in;
  logic [26:0] po, core_out;
  logic [101:0] ff_q, ff_d;
  wrap_mode_e mode [4];
  logic [1:0] shift_en, capture_en, rail_busy, rail_done;
  logic [CNT_W-1:0] rail_pat [2];
  logic done;

  always #5 clk = ~clk;

  testrail_tam dut (.*);

  wrap_mode_e mode0 [2], mode1 [2];
  assign mode0[0] = mode[0];
  assign mode0[1] = mode[1];
  assign mode1[0] = mode[2];
  assign mode1[1] = mode[3];

  int c0, f0, cy0, e0, b0, c1, f1, cy1, e1, b1;
  logic fin0, fin1;

  rail_tester #(.W(10), .NCORE(2),
    .N_IN(size_tab_t'({16'd12, 16'd8})), .N_FF(size_tab_t'({16'd20, 16'd40})),
    .N_OUT(size_tab_t'({16'd10, 16'd6})), .NPAT(NPat0), .SEED(3)) u_t0 (
    .clk, .start, .rsi(rail_si[9:0]), .rso(rail_so[9:0]),
    .core_in(core_in[19:0]), .core_out(core_out[15:0]), .ff_q(ff_q[59:0]), .ff_d(ff_d[59:0]),
    .mode(mode0), .shift_en(shift_en[0]), .capture_en(capture_en[0]),
    .checks(c0), .failures(f0), .cycles(cy0), .expected_cycles(e0), .n_bypass_cycles(b0),
    .finished(fin0)
  );

  rail_tester #(.W(6), .NCORE(2),
    .N_IN(size_tab_t'({16'd6, 16'd5})), .N_FF(size_tab_t'({16'd12, 16'd30})),
    .N_OUT(size_tab_t'({16'd7, 16'd4})), .NPAT(NPat1), .SEED(5)) u_t1 (
    .clk, .start, .rsi(rail_si[15:10]), .rso(rail_so[15:10]),
    .core_in(core_in[30:20]), .core_out(core_out[26:16]), .ff_q(ff_q[101:60]), .ff_d(ff_d[101:60]),
    .mode(mode1), .shift_en(shift_en[1]), .capture_en(capture_en[1]),
    .checks(c1), .failures(f1), .cycles(cy1), .expected_cycles(e1), .n_bypass_cycles(b1),
    .finished(fin1)
  );

  int checks = 0, failures = 0, cyc = 0;
  int done_at [2] = '{-1, -1};

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    npat[0] = CNT_W'(NPat0[0]);
    npat[1] = CNT_W'(NPat0[1]);
    npat[2] = CNT_W'(NPat1[0]);
    npat[3] = CNT_W'(NPat1[1]);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(negedge clk);
      cyc++;
      for (int r = 0; r < 2; r++) if (rail_done[r] && done_at[r] < 0) done_at[r] = cyc;
    end
    #1;
    check(done_at[0] == e0, "rail 0 test time");
    check(done_at[1] == e1, "rail 1 test time");
    check(cyc == ((e0 > e1) ? e0 : e1), "chip test time is the longest rail");
    check(fin0 && fin1, "testers finished");
    check(b0 > 0 && b1 > 0, "bypass used on both rails");
    $display("tb_testrail_tam: rail times %0d and %0d, chip %0d", done_at[0], done_at[1], cyc);
    checks += c0 + c1;
    failures += f0 + f1;
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
