// soc_tam_top: the two test access mechanisms for core-based chips, side by
// side.
//
// 1. rmsc_*: reconfigurable multiple scan chains. All cores share the same
//    scan chains; as soon as the cores with the shortest tests are done, a
//    sticky control signal bypasses their registers and every later pattern
//    is shifted through shorter chains.
// 2. tr_*: a TestRail TAM. The test pins are split into rails of fixed
//    width; the cores on one rail are tested one after another with the
//    others bypassed, and all rails run in parallel.
//
// The two do not share logic: each has its own start, done, scan pins and
// core-side buses (the core logic itself lies outside). Default sizes are
// those of rmsc_tam (the two-core example with two scan chains) and
// testrail_tam (two rails, four cores, 16 pins). See those modules for
// timing.
module soc_tam_top
  import tam_pkg::*;
#(
  localparam int unsigned RMSC_CH    = 2,
  localparam int unsigned RMSC_SESS  = 2,
  localparam int unsigned RMSC_REG   = 25,
  localparam int unsigned TR_NRAIL   = 2,
  localparam int unsigned TR_NCORE   = 4,
  localparam int unsigned TR_W       = 16,
  localparam int unsigned TR_IN      = 31,
  localparam int unsigned TR_FF      = 102,
  localparam int unsigned TR_OUT     = 27
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // reconfigurable multiple scan chains
  input  logic                 rmsc_start,
  input  logic [CNT_W-1:0]     rmsc_npat [RMSC_SESS],
  input  logic [RMSC_CH-1:0]   rmsc_si,
  output logic [RMSC_CH-1:0]   rmsc_so,
  input  logic [RMSC_REG-1:0]  rmsc_cap_d,
  output logic [RMSC_REG-1:0]  rmsc_reg_q,
  output logic                 rmsc_shift_en,
  output logic                 rmsc_capture_en,
  output logic [RMSC_SESS-2:0] rmsc_ctrl,
  output logic                 rmsc_sess,
  output logic [CNT_W-1:0]     rmsc_pat,
  output logic                 rmsc_busy,
  output logic                 rmsc_done,
  // TestRail TAM
  input  logic                 tr_start,
  input  logic [CNT_W-1:0]     tr_npat [TR_NCORE],
  input  logic [TR_W-1:0]      tr_si,
  output logic [TR_W-1:0]      tr_so,
  input  logic [TR_IN-1:0]     tr_pi,
  output logic [TR_OUT-1:0]    tr_po,
  output logic [TR_IN-1:0]     tr_core_in,
  input  logic [TR_OUT-1:0]    tr_core_out,
  output logic [TR_FF-1:0]     tr_ff_q,
  input  logic [TR_FF-1:0]     tr_ff_d,
  output wrap_mode_e           tr_mode [TR_NCORE],
  output logic [TR_NRAIL-1:0]  tr_shift_en,
  output logic [TR_NRAIL-1:0]  tr_capture_en,
  output logic [CNT_W-1:0]     tr_rail_pat [TR_NRAIL],
  output logic [TR_NRAIL-1:0]  tr_rail_busy,
  output logic [TR_NRAIL-1:0]  tr_rail_done,
  output logic                 tr_done
);

  rmsc_tam u_rmsc (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (rmsc_start),
    .npat      (rmsc_npat),
    .si        (rmsc_si),
    .so        (rmsc_so),
    .cap_d     (rmsc_cap_d),
    .reg_q     (rmsc_reg_q),
    .shift_en  (rmsc_shift_en),
    .capture_en(rmsc_capture_en),
    .ctrl      (rmsc_ctrl),
    .sess      (rmsc_sess),
    .pat       (rmsc_pat),
    .busy      (rmsc_busy),
    .done      (rmsc_done)
  );

  testrail_tam u_tr (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (tr_start),
    .npat      (tr_npat),
    .rail_si   (tr_si),
    .rail_so   (tr_so),
    .pi        (tr_pi),
    .po        (tr_po),
    .core_in   (tr_core_in),
    .core_out  (tr_core_out),
    .ff_q      (tr_ff_q),
    .ff_d      (tr_ff_d),
    .mode      (tr_mode),
    .shift_en  (tr_shift_en),
    .capture_en(tr_capture_en),
    .rail_pat  (tr_rail_pat),
    .rail_busy (tr_rail_busy),
    .rail_done (tr_rail_done),
    .done      (tr_done)
  );

endmodule
