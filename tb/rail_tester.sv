// rail_tester: behavioural tester and core model for one TestRail (test
// bench only, not synthesizable).
//
// Core model: every output terminal and every scan flip-flop of core k
// computes a parity of a hashed subset of that core's inputs and flip-flops.
//
// Tester: after start is seen at a rising edge it follows its own schedule
// for the rail, one core after the other: shift si cycles, then per pattern
// capture and shift max(si,so) cycles (so after the last capture). Each
// cycle it checks shift_en, capture_en and every wrapper mode, drives fresh
// random stimulus into the wrapper chains of the core under test and checks
// every response bit that leaves them. The chain layout it expects (inputs,
// flip-flops, outputs dealt round robin over the W chains) and the
// per-core times t = (1+max(si,so))*p + min(si,so) are worked out here
// independently of the RTL. finished goes high after the last expected cycle.
module rail_tester
  import tam_pkg::*;
#(
  parameter int unsigned W     = 10,
  parameter int unsigned NCORE = 2,
  parameter size_tab_t   N_IN  = size_tab_t'({16'd12, 16'd8}),
  parameter size_tab_t   N_FF  = size_tab_t'({16'd20, 16'd40}),
  parameter size_tab_t   N_OUT = size_tab_t'({16'd10, 16'd6}),
  parameter size_tab_t   NPAT  = size_tab_t'({16'd5, 16'd4}),
  parameter int unsigned SEED  = 1,
  localparam int unsigned TOT_IN  = tab_sum(N_IN,  0, NCORE),
  localparam int unsigned TOT_FF  = tab_sum(N_FF,  0, NCORE),
  localparam int unsigned TOT_OUT = tab_sum(N_OUT, 0, NCORE)
) (
  input  logic               clk,
  input  logic               start,
  output logic [W-1:0]       rsi,
  input  logic [W-1:0]       rso,
  input  logic [TOT_IN-1:0]  core_in,
  output logic [TOT_OUT-1:0] core_out,
  input  logic [TOT_FF-1:0]  ff_q,
  output logic [TOT_FF-1:0]  ff_d,
  input  wrap_mode_e         mode [NCORE],
  input  logic               shift_en,
  input  logic               capture_en,
  output int                 checks,
  output int                 failures,
  output int                 cycles,
  output int                 expected_cycles,
  output int                 n_bypass_cycles,
  output logic               finished
);

  // ---- core model ---------------------------------------------------------
  typedef logic [127:0] vec_t;

  function automatic logic hash_bit(int k, int item, int b);
    int unsigned h = (k * 7919 + item * 104729 + b * 1299709 + SEED) * 32'h9E3779B9;
    return h[17];
  endfunction

  function automatic logic core_fn(int k, int item, vec_t v, int n);
    logic acc = item[0];
    for (int b = 0; b < n; b++) acc ^= v[b] & hash_bit(k, item, b);
    return acc;
  endfunction

  // stimulus vector of core k: inputs then flip-flops
  function automatic vec_t core_vec(int k, logic [TOT_IN-1:0] ci, logic [TOT_FF-1:0] fq);
    vec_t v = '0;
    int oi = tab_sum(N_IN, 0, k);
    int of = tab_sum(N_FF, 0, k);
    for (int i = 0; i < int'(N_IN[k]); i++) v[i] = ci[oi + i];
    for (int f = 0; f < int'(N_FF[k]); f++) v[int'(N_IN[k]) + f] = fq[of + f];
    return v;
  endfunction

  always_comb begin
    core_out = '0;
    ff_d = '0;
    for (int k = 0; k < int'(NCORE); k++) begin
      vec_t v;
      int n;
      v = core_vec(k, core_in, ff_q);
      n = int'(N_IN[k]) + int'(N_FF[k]);
      for (int o = 0; o < int'(N_OUT[k]); o++)
        core_out[tab_sum(N_OUT, 0, k) + o] = core_fn(k, 1000 + o, v, n);
      for (int f = 0; f < int'(N_FF[k]); f++)
        ff_d[tab_sum(N_FF, 0, k) + f] = core_fn(k, f, v, n);
    end
  end

  // ---- chain layout of core k: kind 0 input, 1 flip-flop, 2 output -------
  int lay_kind [W][$];
  int lay_idx  [W][$];

  task automatic build_layout(int k);
    for (int j = 0; j < int'(W); j++) begin
      lay_kind[j].delete();
      lay_idx[j].delete();
    end
    for (int i = 0; i < int'(N_IN[k]); i++)  begin lay_kind[i % W].push_back(0); lay_idx[i % W].push_back(i); end
    for (int f = 0; f < int'(N_FF[k]); f++)  begin lay_kind[f % W].push_back(1); lay_idx[f % W].push_back(f); end
    for (int o = 0; o < int'(N_OUT[k]); o++) begin lay_kind[o % W].push_back(2); lay_idx[o % W].push_back(o); end
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL rail_tester %s at cycle %0d", what, cycles);
    end
  endtask

  logic [127:0] st_in, st_ff;    // stimulus loaded into core k
  logic [127:0] ex_ff, ex_out;   // responses expected after capture

  task automatic check_modes(int k);
    for (int m = 0; m < int'(NCORE); m++) begin
      check(mode[m] == ((m == k) ? WM_INTEST : WM_BYPASS), "wrapper mode");
      if (m != k) n_bypass_cycles++;
    end
  endtask

  task automatic shift_phase(int k, int n, bit load, bit unload);
    logic [127:0] nin = st_in, nff = st_ff;
    if (load) begin
      for (int i = 0; i < int'(N_IN[k]); i++) nin[i] = 1'($urandom);
      for (int f = 0; f < int'(N_FF[k]); f++) nff[f] = 1'($urandom);
    end
    for (int c = 0; c < n; c++) begin
      check(shift_en && !capture_en, "shift_en");
      check_modes(k);
      for (int j = 0; j < int'(W); j++) begin
        int len = lay_kind[j].size();
        int pin = n - 1 - c;
        int pout = len - 1 - c;
        rsi[j] = 1'($urandom);
        if (pin < len) begin
          if (lay_kind[j][pin] == 0) rsi[j] = nin[lay_idx[j][pin]];
          if (lay_kind[j][pin] == 1) rsi[j] = nff[lay_idx[j][pin]];
        end
        if (unload && pout >= 0 && lay_kind[j][pout] != 0)
          check(rso[j] == ((lay_kind[j][pout] == 1) ? ex_ff[lay_idx[j][pout]]
                                                    : ex_out[lay_idx[j][pout]]), "response bit");
      end
      @(negedge clk);
      cycles++;
    end
    st_in = nin;
    st_ff = nff;
  endtask

  initial begin
    checks = 0;
    failures = 0;
    cycles = 0;
    n_bypass_cycles = 0;
    finished = 1'b0;
    rsi = '0;
    expected_cycles = 0;
    for (int k = 0; k < int'(NCORE); k++) begin
      automatic int si = (int'(N_IN[k]) + W - 1) / W + (int'(N_FF[k]) + W - 1) / W;
      automatic int so = (int'(N_FF[k]) + W - 1) / W + (int'(N_OUT[k]) + W - 1) / W;
      expected_cycles += (1 + ((si > so) ? si : so)) * int'(NPAT[k]) + ((si < so) ? si : so);
    end
    @(posedge clk iff start);
    @(negedge clk);
    for (int k = 0; k < int'(NCORE); k++) begin
      int si, so, mx;
      build_layout(k);
      si = 0;
      so = 0;
      for (int j = 0; j < int'(W); j++) begin
        automatic int len = lay_kind[j].size();
        automatic int first_cap = -1;
        automatic int last_drv = 0;
        foreach (lay_kind[j][p]) begin
          if (lay_kind[j][p] != 2) last_drv = p + 1;
          if (lay_kind[j][p] != 0 && first_cap < 0) first_cap = p;
        end
        if (last_drv > si) si = last_drv;
        if (first_cap >= 0 && len - first_cap > so) so = len - first_cap;
      end
      mx = (si > so) ? si : so;
      shift_phase(k, si, 1'b1, 1'b0);
      for (int p = 1; p <= int'(NPAT[k]); p++) begin
        vec_t v;
        check(capture_en && !shift_en, "capture_en");
        check_modes(k);
        v = '0;
        for (int i = 0; i < int'(N_IN[k]); i++) v[i] = st_in[i];
        for (int f = 0; f < int'(N_FF[k]); f++) v[int'(N_IN[k]) + f] = st_ff[f];
        for (int o = 0; o < int'(N_OUT[k]); o++)
          ex_out[o] = core_fn(k, 1000 + o, v, int'(N_IN[k]) + int'(N_FF[k]));
        for (int f = 0; f < int'(N_FF[k]); f++)
          ex_ff[f] = core_fn(k, f, v, int'(N_IN[k]) + int'(N_FF[k]));
        @(negedge clk);
        cycles++;
        shift_phase(k, (p == int'(NPAT[k])) ? so : mx, p != int'(NPAT[k]), 1'b1);
      end
    end
    check(cycles == expected_cycles, "rail test time");
    finished = 1'b1;
  end

endmodule
