// testrail: one TestRail, a W-bit test access path daisy-chained through the
// wrappers of NCORE cores, with its sequential test controller.
//
// rsi enters the wrapper of core 0, each wrapper's output feeds the next
// wrapper, and the last wrapper drives rso. The cores are tested one at a
// time (sequential testing): rail_ctrl puts the core under test in
// WM_INTEST and every other wrapper in WM_BYPASS, whose combinational bypass
// adds no cycles, so the tester always sees exactly the chains of the core
// under test. The rail's test time is the sum over its cores of
//   (1 + max(si,so)) * p + min(si,so),
// with si and so the wrapper lengths from core_wrapper.
//
// Core k has N_IN[k] inputs, N_FF[k] scan flip-flops and N_OUT[k] outputs.
// The core-side buses (pi, po, core_in, core_out, ff_q, ff_d) are the
// per-core buses concatenated, core 0 in the least significant bits.
// The daisy chain with bypass for sequential testing follows the source;
// the sizes are parameters chosen by the TAM design step.
module testrail
  import tam_pkg::*;
#(
  parameter int unsigned W     = 10,
  parameter int unsigned NCORE = 2,
  parameter size_tab_t   N_IN  = size_tab_t'({16'd12, 16'd8}),
  parameter size_tab_t   N_FF  = size_tab_t'({16'd20, 16'd40}),
  parameter size_tab_t   N_OUT = size_tab_t'({16'd10, 16'd6}),
  localparam int unsigned TOT_IN  = tab_sum(N_IN,  0, NCORE),
  localparam int unsigned TOT_FF  = tab_sum(N_FF,  0, NCORE),
  localparam int unsigned TOT_OUT = tab_sum(N_OUT, 0, NCORE),
  localparam int unsigned CORE_W  = (NCORE > 1) ? $clog2(NCORE) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [CNT_W-1:0]   npat [NCORE],
  input  logic [W-1:0]       rsi,
  output logic [W-1:0]       rso,
  input  logic [TOT_IN-1:0]  pi,
  output logic [TOT_OUT-1:0] po,
  output logic [TOT_IN-1:0]  core_in,
  input  logic [TOT_OUT-1:0] core_out,
  output logic [TOT_FF-1:0]  ff_q,
  input  logic [TOT_FF-1:0]  ff_d,
  output wrap_mode_e         mode [NCORE],
  output logic               shift_en,
  output logic               capture_en,
  output logic [CORE_W-1:0]  core,
  output logic [CNT_W-1:0]   pat,
  output logic               busy,
  output logic               done
);

  logic [W-1:0]     link [NCORE+1];
  logic [CNT_W-1:0] si_len [NCORE];
  logic [CNT_W-1:0] so_len [NCORE];

  assign link[0] = rsi;
  assign rso     = link[NCORE];

  for (genvar k = 0; k < NCORE; k++) begin : g_core
    localparam int NIn   = int'(N_IN[k]);
    localparam int NFf   = int'(N_FF[k]);
    localparam int NOut  = int'(N_OUT[k]);
    localparam int OffIn = tab_sum(N_IN,  0, k);
    localparam int OffFf = tab_sum(N_FF,  0, k);
    localparam int OffOut = tab_sum(N_OUT, 0, k);

    assign si_len[k] = CNT_W'(wrap_si(W, NIn, NFf));
    assign so_len[k] = CNT_W'(wrap_so(W, NFf, NOut));

    core_wrapper #(.W(W), .N_IN(NIn), .N_FF(NFf), .N_OUT(NOut)) u_wrap (
      .clk       (clk),
      .rst_n     (rst_n),
      .mode      (mode[k]),
      .shift_en  (shift_en),
      .capture_en(capture_en),
      .wsi       (link[k]),
      .wso       (link[k+1]),
      .pi        (pi[OffIn +: NIn]),
      .po        (po[OffOut +: NOut]),
      .core_in   (core_in[OffIn +: NIn]),
      .core_out  (core_out[OffOut +: NOut]),
      .ff_q      (ff_q[OffFf +: NFf]),
      .ff_d      (ff_d[OffFf +: NFf])
    );
  end

  rail_ctrl #(.NCORE(NCORE)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .si        (si_len),
    .so        (so_len),
    .npat      (npat),
    .mode      (mode),
    .shift_en  (shift_en),
    .capture_en(capture_en),
    .core      (core),
    .pat       (pat),
    .busy      (busy),
    .done      (done)
  );

endmodule
