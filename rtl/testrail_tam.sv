// testrail_tam: TestRail test access mechanism of total width W_MAX.
//
// The W_MAX test pins are partitioned into NRAIL TestRails; rail r is
// RAIL_W[r] bits wide and carries RAIL_NCORE[r] cores. Cores are numbered
// rail by rail (the cores of rail 0 first). All rails start together on
// start and run their sequential tests independently, so the test time of
// the chip is the longest rail's time; done goes high when every rail is
// done. rail_si/rail_so carry rail 0 in the least significant bits. The
// core-side buses concatenate the cores in core order, core 0 in the least
// significant bits, as in testrail.
//
// The partition (rail widths and core assignment) is the result of the
// design-time TAM optimisation; the default, two rails of 10 and 6 bits
// carrying two cores each on W_MAX = 16 pins, is an illustrative
// configuration of this design, not one taken from the source.
module testrail_tam
  import tam_pkg::*;
#(
  parameter int unsigned NRAIL      = 2,
  parameter int unsigned NCORE      = 4,
  parameter size_tab_t   RAIL_W     = size_tab_t'({16'd6, 16'd10}),
  parameter size_tab_t   RAIL_NCORE = size_tab_t'({16'd2, 16'd2}),
  parameter size_tab_t   N_IN       = size_tab_t'({16'd6, 16'd5, 16'd12, 16'd8}),
  parameter size_tab_t   N_FF       = size_tab_t'({16'd12, 16'd30, 16'd20, 16'd40}),
  parameter size_tab_t   N_OUT      = size_tab_t'({16'd7, 16'd4, 16'd10, 16'd6}),
  localparam int unsigned W_MAX   = tab_sum(RAIL_W, 0, NRAIL),
  localparam int unsigned TOT_IN  = tab_sum(N_IN,  0, NCORE),
  localparam int unsigned TOT_FF  = tab_sum(N_FF,  0, NCORE),
  localparam int unsigned TOT_OUT = tab_sum(N_OUT, 0, NCORE)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [CNT_W-1:0]   npat [NCORE],
  input  logic [W_MAX-1:0]   rail_si,
  output logic [W_MAX-1:0]   rail_so,
  input  logic [TOT_IN-1:0]  pi,
  output logic [TOT_OUT-1:0] po,
  output logic [TOT_IN-1:0]  core_in,
  input  logic [TOT_OUT-1:0] core_out,
  output logic [TOT_FF-1:0]  ff_q,
  input  logic [TOT_FF-1:0]  ff_d,
  output wrap_mode_e         mode [NCORE],
  output logic [NRAIL-1:0]   shift_en,
  output logic [NRAIL-1:0]   capture_en,
  output logic [CNT_W-1:0]   rail_pat [NRAIL],
  output logic [NRAIL-1:0]   rail_busy,
  output logic [NRAIL-1:0]   rail_done,
  output logic               done
);

  for (genvar r = 0; r < NRAIL; r++) begin : g_rail
    localparam int Wr     = int'(RAIL_W[r]);
    localparam int OffW   = tab_sum(RAIL_W, 0, r);
    localparam int First  = tab_sum(RAIL_NCORE, 0, r);
    localparam int Nc     = int'(RAIL_NCORE[r]);
    localparam size_tab_t TabIn  = size_tab_t'(N_IN  >> (16 * First));
    localparam size_tab_t TabFf  = size_tab_t'(N_FF  >> (16 * First));
    localparam size_tab_t TabOut = size_tab_t'(N_OUT >> (16 * First));
    localparam int OffIn  = tab_sum(N_IN,  0, First);
    localparam int OffFf  = tab_sum(N_FF,  0, First);
    localparam int OffOut = tab_sum(N_OUT, 0, First);
    localparam int NIn    = tab_sum(N_IN,  First, Nc);
    localparam int NFf    = tab_sum(N_FF,  First, Nc);
    localparam int NOut   = tab_sum(N_OUT, First, Nc);

    logic [CNT_W-1:0] npat_r [Nc];
    wrap_mode_e       mode_r [Nc];
    for (genvar k = 0; k < Nc; k++) begin : g_map
      assign npat_r[k]       = npat[First + k];
      assign mode[First + k] = mode_r[k];
    end

    testrail #(
      .W    (Wr),
      .NCORE(Nc),
      .N_IN (TabIn),
      .N_FF (TabFf),
      .N_OUT(TabOut)
    ) u_rail (
      .clk       (clk),
      .rst_n     (rst_n),
      .start     (start),
      .npat      (npat_r),
      .rsi       (rail_si[OffW +: Wr]),
      .rso       (rail_so[OffW +: Wr]),
      .pi        (pi[OffIn +: NIn]),
      .po        (po[OffOut +: NOut]),
      .core_in   (core_in[OffIn +: NIn]),
      .core_out  (core_out[OffOut +: NOut]),
      .ff_q      (ff_q[OffFf +: NFf]),
      .ff_d      (ff_d[OffFf +: NFf]),
      .mode      (mode_r),
      .shift_en  (shift_en[r]),
      .capture_en(capture_en[r]),
      .core      (),  // the core under test is visible in mode
      .pat       (rail_pat[r]),
      .busy      (rail_busy[r]),
      .done      (rail_done[r])
    );
  end

  assign done = &rail_done;

  initial begin
    assert (tab_sum(RAIL_NCORE, 0, NRAIL) == int'(NCORE))
      else $error("testrail_tam: RAIL_NCORE does not add up to NCORE");
  end

endmodule
