// tb_core_wrapper: a 3-bit wrapper around a core with 4 inputs, 7 scan
// flip-flops and 5 outputs. Checks the functional path in normal mode, the
// layout of the three wrapper chains in internal-test mode (stimulus shifted
// in must appear on core_in and ff_q, captured responses must come out in the
// expected order), and the combinational bypass with all cells holding.
module tb_core_wrapper;
  import tam_pkg::*;

  localparam int W = 3, NI = 4, NF = 7, NO = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  wrap_mode_e mode = WM_NORMAL;
  logic shift_en = 1'b0, capture_en = 1'b0;
  logic [W-1:0] wsi = '0, wso;
  logic [NI-1:0] pi = '0, core_in;
  logic [NO-1:0] po, core_out = '0;
  logic [NF-1:0] ff_q, ff_d = '0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  core_wrapper #(.W(W), .N_IN(NI), .N_FF(NF), .N_OUT(NO)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int kd [W][$];   // 0 input, 1 flip-flop, 2 output
  int ix [W][$];

  logic [NI-1:0] t_in;
  logic [NF-1:0] t_ff, prev_d, saved_ff;
  logic [NO-1:0] r_out;
  logic [NF-1:0] r_ff;

  initial begin
    for (int i = 0; i < NI; i++) begin kd[i % W].push_back(0); ix[i % W].push_back(i); end
    for (int f = 0; f < NF; f++) begin kd[f % W].push_back(1); ix[f % W].push_back(f); end
    for (int o = 0; o < NO; o++) begin kd[o % W].push_back(2); ix[o % W].push_back(o); end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // normal mode
    for (int i = 0; i < 10; i++) begin
      pi = NI'($urandom);
      core_out = NO'($urandom);
      wsi = W'($urandom);
      ff_d = NF'($urandom);
      prev_d = ff_d;
      #1;
      check(core_in == pi && po == core_out && wso == wsi, "normal mode paths");
      @(negedge clk);
      check(ff_q == prev_d, "flip-flops run functionally");
    end
    // internal test: load stimulus
    mode = WM_INTEST;
    t_in = NI'($urandom);
    t_ff = NF'($urandom);
    shift_en = 1'b1;
    for (int c = 0; c < 7; c++) begin
      for (int j = 0; j < W; j++) begin
        int p;
        p = 6 - c;
        wsi[j] = 1'($urandom);
        if (p < kd[j].size()) begin
          if (kd[j][p] == 0) wsi[j] = t_in[ix[j][p]];
          if (kd[j][p] == 1) wsi[j] = t_ff[ix[j][p]];
        end
      end
      @(negedge clk);
    end
    shift_en = 1'b0;
    check(core_in == t_in, "stimulus on core inputs");
    check(ff_q == t_ff, "stimulus in scan flip-flops");
    // capture
    r_out = NO'($urandom);
    r_ff = NF'($urandom);
    core_out = r_out;
    ff_d = r_ff;
    capture_en = 1'b1;
    @(negedge clk);
    capture_en = 1'b0;
    check(core_in == t_in, "drivers hold during capture");
    check(po == r_out, "po shows output cells in test mode");
    // unload
    shift_en = 1'b1;
    for (int c = 0; c < 7; c++) begin
      for (int j = 0; j < W; j++) begin
        int p;
        p = kd[j].size() - 1 - c;
        if (p >= 0 && kd[j][p] == 1) check(wso[j] == r_ff[ix[j][p]], "unload flip-flop");
        if (p >= 0 && kd[j][p] == 2) check(wso[j] == r_out[ix[j][p]], "unload output cell");
      end
      @(negedge clk);
    end
    // bypass
    mode = WM_BYPASS;
    saved_ff = ff_q;
    for (int i = 0; i < 10; i++) begin
      wsi = W'($urandom);
      shift_en = 1'($urandom);
      capture_en = 1'($urandom);
      ff_d = NF'($urandom);
      #1;
      check(wso == wsi, "bypass path");
      @(negedge clk);
      check(ff_q == saved_ff, "cells hold in bypass");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
