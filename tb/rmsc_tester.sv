// rmsc_tester: behavioural tester and core model for the default
// reconfigurable multiple scan chains (test bench only, not synthesizable).
//
// It keeps its own list of the register order of both chains before and
// after core A is bypassed (chain 1: registers 0-13, then 7-13; chain 2:
// registers 14-24, then 14-19 and 24), models the core logic as a parity of
// a hashed subset of each core's driving registers, and, once it has seen
// start at a rising edge, follows the schedule: shift 12 cycles; then
// NPAT_A patterns of capture plus 12 shifts and NPAT_B patterns of capture
// plus 7 shifts. Every cycle it checks shift_en/capture_en, the session and
// Ctrl_1, drives fresh stimulus into every driving register and checks
// every response bit leaving the chains. At the end it checks the total,
// NPAT_A*13 + NPAT_B*8 + 12 cycles, and that core A's registers held while
// bypassed; finished then goes high.
module rmsc_tester
  import tam_pkg::*;
#(
  parameter int NPAT_A = 30,
  parameter int NPAT_B = 70,
  localparam int NREG = 25
) (
  input  logic            clk,
  input  logic            start,
  output logic [1:0]      si,
  input  logic [1:0]      so,
  input  logic [NREG-1:0] reg_q,
  output logic [NREG-1:0] cap_d,
  input  logic            shift_en,
  input  logic            capture_en,
  input  logic [0:0]      ctrl,
  input  logic [0:0]      sess,
  output int              checks,
  output int              failures,
  output int              cycles,
  output int              n_bypass,
  output int              n_capture,
  output int              n_resp_bits,
  output logic            finished
);


  // Register kinds and owners, by register number (figure of the example).
  cell_kind_e kind [NREG];
  logic [NREG-1:0] core_a;           // 1: register of core A
  localparam logic [NREG-1:0] ADrv = 25'h000007F;          // regs 0..6
  localparam logic [NREG-1:0] BDrv = 25'h00FCF80;          // regs 7..11, 14..19

  int order [2][2][$];               // [config][chain] register order SI->SO

  initial begin
    for (int r = 0; r < NREG; r++) kind[r] = CELL_INT;
    foreach (kind[r]) begin
      if (r <= 2 || (r >= 14 && r <= 16)) kind[r] = CELL_IN;
      if (r == 12 || r == 13 || r >= 20)  kind[r] = CELL_OUT;
    end
    core_a = '0;
    for (int r = 0; r <= 6; r++)   core_a[r] = 1'b1;
    for (int r = 20; r <= 23; r++) core_a[r] = 1'b1;
    for (int r = 0; r <= 13; r++)  order[0][0].push_back(r);
    for (int r = 14; r <= 24; r++) order[0][1].push_back(r);
    for (int r = 7; r <= 13; r++)  order[1][0].push_back(r);
    for (int r = 14; r <= 19; r++) order[1][1].push_back(r);
    order[1][1].push_back(24);
  end

  // Core logic model: each capturing register sees a parity of some of the
  // driving registers of its own core.
  function automatic logic resp(int r, logic [NREG-1:0] v);
    logic [NREG-1:0] m = core_a[r] ? ADrv : BDrv;
    logic [NREG-1:0] h = NREG'(32'h9E3779B9 * (r + 1));
    return (^(v & m & h)) ^ r[0];
  endfunction

  always_comb begin
    for (int r = 0; r < NREG; r++) cap_d[r] = resp(r, reg_q);
  end

  logic [NREG-1:0] stim;     // stimulus loaded in the driving registers
  logic [NREG-1:0] expect_q; // responses expected after a capture

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  // One shift phase of cc cycles in configuration cfg: loads fresh stimulus
  // and, if chk, checks the responses leaving the chains.
  task automatic shift_phase(int cfg, int cc, bit chk);
    logic [NREG-1:0] fresh = stim;
    foreach (order[cfg][ch])
      foreach (order[cfg][ch][p])
        if (drives(kind[order[cfg][ch][p]])) fresh[order[cfg][ch][p]] = 1'($urandom);
    for (int c = 0; c < cc; c++) begin
      check(shift_en && !capture_en, "shift_en");
      for (int ch = 0; ch < 2; ch++) begin
        int len = order[cfg][ch].size();
        int pin = cc - 1 - c;
        int pout = len - 1 - c;
        si[ch] = (pin < len) ? fresh[order[cfg][ch][pin]] : 1'($urandom);
        if (chk && pout >= 0 && captures(kind[order[cfg][ch][pout]])) begin
          check(so[ch] == expect_q[order[cfg][ch][pout]], "response bit");
          n_resp_bits++;
        end
      end
      @(negedge clk);
      cycles++;
    end
    stim = fresh;
  endtask

  logic [NREG-1:0] a_frozen;

  initial begin
    checks = 0;
    failures = 0;
    cycles = 0;
    n_bypass = 0;
    n_capture = 0;
    n_resp_bits = 0;
    finished = 1'b0;
    si = '0;
    stim = '0;
    expect_q = '0;
    @(posedge clk iff start);
    @(negedge clk);
    shift_phase(0, 12, 1'b0);
    for (int p = 1; p <= NPAT_A + NPAT_B; p++) begin
      int s;
      s = (p <= NPAT_A) ? 0 : 1;
      check(capture_en && !shift_en, "capture_en");
      check(ctrl[0] == (s == 1), "Ctrl_1 timing");
      check(sess == 1'(s), "session number");
      if (p == NPAT_A + 1) begin
        n_bypass++;
        a_frozen = reg_q & core_a;
      end
      for (int r = 0; r < NREG; r++) expect_q[r] = resp(r, stim);
      n_capture++;
      @(negedge clk);
      cycles++;
      shift_phase(s, s == 0 ? 12 : 7, 1'b1);
    end
    check(cycles == NPAT_A * 13 + NPAT_B * 8 + 12, "total test cycles");
    check((reg_q & core_a) == a_frozen, "bypassed core A registers hold");
    finished = 1'b1;
  end

endmodule
