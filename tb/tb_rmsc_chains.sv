// tb_rmsc_chains: the default two-chain example with the control signal
// driven directly. With Ctrl_1 low the chains are 14 and 11 registers long,
// with it high 7 and 7; a captured response must leave each chain in the
// register order of the example; registers of the bypassed core hold.
module tb_rmsc_chains;
  import tam_pkg::*;

  localparam int NREG = 25;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic shift_en = 1'b0, capture_en = 1'b0;
  logic [0:0] ctrl = 1'b0;
  logic [1:0] si = '0, so;
  logic [NREG-1:0] cap_d = '0, reg_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rmsc_chains dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  int order [2][2][$];
  bit is_in [NREG];

  // shift n cycles, checking that each chain delays its input by its length
  task automatic delay_test(int cfg);
    logic h [2][$];
    shift_en = 1'b1;
    for (int i = 0; i < 40; i++) begin
      for (int ch = 0; ch < 2; ch++) begin
        si[ch] = 1'($urandom);
        h[ch].push_back(si[ch]);
      end
      @(negedge clk);
      for (int ch = 0; ch < 2; ch++)
        if (h[ch].size() >= order[cfg][ch].size())
          check(so[ch] == h[ch][h[ch].size() - order[cfg][ch].size()], "chain length");
    end
    shift_en = 1'b0;
  endtask

  // capture random responses and unload them
  task automatic capture_test(int cfg);
    logic [NREG-1:0] resp;
    resp = NREG'($urandom);
    cap_d = resp;
    capture_en = 1'b1;
    @(negedge clk);
    capture_en = 1'b0;
    cap_d = '0;
    shift_en = 1'b1;
    for (int c = 0; c < 14; c++) begin
      for (int ch = 0; ch < 2; ch++) begin
        int p = order[cfg][ch].size() - 1 - c;
        if (p >= 0 && !is_in[order[cfg][ch][p]])
          check(so[ch] == resp[order[cfg][ch][p]], "captured response order");
      end
      @(negedge clk);
    end
    shift_en = 1'b0;
  endtask

  logic [NREG-1:0] a_mask = 25'h0F0007F;
  logic [NREG-1:0] a_saved;

  initial begin
    for (int r = 0; r <= 13; r++)  order[0][0].push_back(r);
    for (int r = 14; r <= 24; r++) order[0][1].push_back(r);
    for (int r = 7; r <= 13; r++)  order[1][0].push_back(r);
    for (int r = 14; r <= 19; r++) order[1][1].push_back(r);
    order[1][1].push_back(24);
    foreach (is_in[r]) is_in[r] = (r <= 2) || (r >= 14 && r <= 16);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    delay_test(0);
    capture_test(0);
    a_saved = reg_q & a_mask;
    ctrl = 1'b1;
    delay_test(1);
    capture_test(1);
    check((reg_q & a_mask) == a_saved, "bypassed registers hold");
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
