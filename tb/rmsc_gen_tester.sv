// rmsc_gen_tester: behavioural tester and core model for any configuration
// of the reconfigurable multiple scan chains (test bench only).
//
// It derives the register order of every chain in every session from the
// segment tables (a segment is out of the chains in session s when its
// control signal Ctrl_i has i <= s, sessions counted from 0), models the core logic as a parity of a
// hashed subset of the driving registers of the same core (SEG_CORE), and
// after start follows the schedule with the chain cycles EXP_CC it is given:
// shift EXP_CC[0]; per pattern of session s capture, then shift EXP_CC[s].
// It checks shift_en/capture_en and the control signals every cycle, loads
// random stimulus into every driving register in the chains and checks
// every response bit leaving them. The expected chain cycles come from the
// testbench, worked out by hand, so a wrong depth in the design shows up as
// a cycle mismatch or as lost data.
module rmsc_gen_tester
  import tam_pkg::*;
#(
  parameter int N_CH   = 2,
  parameter int N_SESS = 2,
  parameter int N_SEG  = 1,
  parameter int N_REG  = 1,
  parameter size_tab_t SEG_CHAIN = '0,
  parameter size_tab_t SEG_LEN   = size_tab_t'(1),
  parameter size_tab_t SEG_CTRL  = '0,
  parameter size_tab_t SEG_CORE  = '0,
  parameter cell_kind_e [N_REG-1:0] REG_KIND = {N_REG{CELL_INT}},
  parameter size_tab_t NPAT   = size_tab_t'({16'd1, 16'd1}),
  parameter size_tab_t EXP_CC = size_tab_t'({16'd1, 16'd1}),
  localparam int N_CTRL = (N_SESS > 1) ? N_SESS - 1 : 1
) (
  input  logic              clk,
  input  logic              start,
  output logic [N_CH-1:0]   si,
  input  logic [N_CH-1:0]   so,
  input  logic [N_REG-1:0]  reg_q,
  output logic [N_REG-1:0]  cap_d,
  input  logic              shift_en,
  input  logic              capture_en,
  input  logic [N_CTRL-1:0] ctrl,
  output int                checks,
  output int                failures,
  output int                cycles,
  output int                n_resp_bits,
  output logic              finished
);

  int reg_core [N_REG];
  int reg_seg  [N_REG];
  int order [N_SESS][N_CH][$];

  initial begin
    automatic int r = 0;
    for (int k = 0; k < N_SEG; k++)
      for (int m = 0; m < int'(SEG_LEN[k]); m++) begin
        reg_core[r] = int'(SEG_CORE[k]);
        reg_seg[r] = k;
        r++;
      end
    for (int s = 0; s < N_SESS; s++) begin
      r = 0;
      for (int k = 0; k < N_SEG; k++)
        for (int m = 0; m < int'(SEG_LEN[k]); m++) begin
          if (!(SEG_CTRL[k] != 0 && int'(SEG_CTRL[k]) <= s)) order[s][int'(SEG_CHAIN[k])].push_back(r);
          r++;
        end
    end
  end

  function automatic logic resp(int r, logic [N_REG-1:0] v);
    logic acc = r[0];
    for (int b = 0; b < N_REG; b++) begin
      int unsigned h = (r * 7919 + b * 104729 + 17) * 32'h9E3779B9;
      if (reg_core[b] == reg_core[r] && REG_KIND[b] != CELL_OUT && h[19]) acc ^= v[b];
    end
    return acc;
  endfunction

  always_comb begin
    for (int r = 0; r < N_REG; r++) cap_d[r] = resp(r, reg_q);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL rmsc_gen_tester %s at cycle %0d", what, cycles);
    end
  endtask

  logic [N_REG-1:0] stim, expect_q;

  task automatic shift_phase(int cfg, int cc, bit chk);
    logic [N_REG-1:0] fresh = stim;
    foreach (order[cfg][ch])
      foreach (order[cfg][ch][p])
        if (REG_KIND[order[cfg][ch][p]] != CELL_OUT) fresh[order[cfg][ch][p]] = 1'($urandom);
    for (int c = 0; c < cc; c++) begin
      check(shift_en && !capture_en, "shift_en");
      for (int ch = 0; ch < N_CH; ch++) begin
        int len = order[cfg][ch].size();
        int pin = cc - 1 - c;
        int pout = len - 1 - c;
        si[ch] = (pin < len) ? fresh[order[cfg][ch][pin]] : 1'($urandom);
        if (chk && pout >= 0 && REG_KIND[order[cfg][ch][pout]] != CELL_IN) begin
          check(so[ch] == expect_q[order[cfg][ch][pout]], "response bit");
          n_resp_bits++;
        end
      end
      @(negedge clk);
      cycles++;
    end
    stim = fresh;
  endtask

  initial begin
    checks = 0;
    failures = 0;
    cycles = 0;
    n_resp_bits = 0;
    finished = 1'b0;
    si = '0;
    stim = '0;
    expect_q = '0;
    @(posedge clk iff start);
    @(negedge clk);
    shift_phase(0, int'(EXP_CC[0]), 1'b0);
    for (int s = 0; s < N_SESS; s++)
      for (int p = 0; p < int'(NPAT[s]); p++) begin
        check(capture_en && !shift_en, "capture_en");
        if (N_SESS > 1) check(int'(ctrl) == (1 << s) - 1, "control signals");
        for (int r = 0; r < N_REG; r++) expect_q[r] = resp(r, stim);
        @(negedge clk);
        cycles++;
        shift_phase(s, int'(EXP_CC[s]), 1'b1);
      end
    finished = 1'b1;
  end

endmodule
