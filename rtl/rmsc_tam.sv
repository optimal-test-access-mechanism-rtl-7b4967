// rmsc_tam: scan test access mechanism built on reconfigurable multiple scan
// chains, with its session sequencer.
//
// Idea: the cores of the chip have different test lengths. Once the core with
// the shortest test has received all its patterns, its registers are only
// dead length in the scan chains. A control signal then switches
// multiplexers that bypass them, so the following sessions shift through
// shorter chains and every later pattern costs fewer clock cycles.
//
// This module joins rmsc_chains (the chains and bypass multiplexers) and
// session_ctrl (the shift/capture sequencer). The chain cycles CC_i of every
// session are worked out at elaboration from the chain description: in
// session i (counted from 0) the segments of Ctrl_1..Ctrl_i are bypassed;
// on each chain the shift-in depth is the position (counted from 1 at scan-in)
// of the last register that drives the core, and the shift-out depth is the
// number of registers from the first register that captures a response to
// scan-out; CC_i is the largest of these over all chains. For the default
// two-core example that gives CC_1 = 12 and CC_2 = 7.
//
// Interface: the tester drives si and samples so while shift_en is high
// (so shows the last register before the edge); npat[i] = L_i - L_{i-1} is
// the number of patterns of session i; start/done as in session_ctrl. The
// core side is cap_d (response captured by each register) and reg_q (content
// of each register). Test time: sum_i npat[i]*(CC_i+1) + CC_1 cycles from the
// cycle after start to done. The bypass structure, the control timing and
// the cycle formula follow the source; the rules for shift-in and shift-out
// depth are read from its worked example.
module rmsc_tam
  import tam_pkg::*;
#(
  parameter int unsigned N_CH   = 2,
  parameter int unsigned N_SESS = 2,
  parameter int unsigned N_SEG  = 5,
  parameter int unsigned N_REG  = 25,
  // per-segment tables, segment 0 in the rightmost field
  parameter size_tab_t   SEG_CHAIN = size_tab_t'({16'd1, 16'd1, 16'd1, 16'd0, 16'd0}),
  parameter size_tab_t   SEG_LEN   = size_tab_t'({16'd1, 16'd4, 16'd6, 16'd7, 16'd7}),
  parameter size_tab_t   SEG_CTRL  = size_tab_t'({16'd0, 16'd1, 16'd0, 16'd0, 16'd1}),
  parameter cell_kind_e [N_REG-1:0] REG_KIND = {
    CELL_OUT,
    CELL_OUT, CELL_OUT, CELL_OUT, CELL_OUT,
    CELL_INT, CELL_INT, CELL_INT, CELL_IN, CELL_IN, CELL_IN,
    CELL_OUT, CELL_OUT, CELL_INT, CELL_INT, CELL_INT, CELL_INT, CELL_INT,
    CELL_INT, CELL_INT, CELL_INT, CELL_INT, CELL_IN, CELL_IN, CELL_IN
  },
  localparam int unsigned N_CTRL = (N_SESS > 1) ? N_SESS - 1 : 1,
  localparam int unsigned SESS_W = (N_SESS > 1) ? $clog2(N_SESS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [CNT_W-1:0]  npat [N_SESS],
  input  logic [N_CH-1:0]   si,
  output logic [N_CH-1:0]   so,
  input  logic [N_REG-1:0]  cap_d,
  output logic [N_REG-1:0]  reg_q,
  output logic              shift_en,
  output logic              capture_en,
  output logic [N_CTRL-1:0] ctrl,
  output logic [SESS_W-1:0] sess,
  output logic [CNT_W-1:0]  pat,
  output logic              busy,
  output logic              done
);

  // Chain cycles of session s (zero-based).
  function automatic int chain_cycles(int s);
    int worst = 0;
    for (int c = 0; c < int'(N_CH); c++) begin
      int pos = 0;        // active registers seen so far on this chain
      int depth_in = 0;   // shift-in depth
      int first_cap = -1; // position of the first capturing register
      int r = 0;
      for (int k = 0; k < int'(N_SEG); k++) begin
        // Ctrl_i is active from session i on (sessions counted from 0)
        bit byp = (SEG_CTRL[k] != 0) && (int'(SEG_CTRL[k]) <= s);
        for (int m = 0; m < int'(SEG_LEN[k]); m++) begin
          if (int'(SEG_CHAIN[k]) == c && !byp) begin
            if (drives(REG_KIND[r]))                    depth_in  = pos + 1;
            if (captures(REG_KIND[r]) && first_cap < 0) first_cap = pos;
            pos++;
          end
          r++;
        end
      end
      if (depth_in > worst) worst = depth_in;
      if (first_cap >= 0 && pos - first_cap > worst) worst = pos - first_cap;
    end
    return worst;
  endfunction

  logic [CNT_W-1:0] cc [N_SESS];
  for (genvar s = 0; s < N_SESS; s++) begin : g_cc
    localparam int Cc = chain_cycles(s);
    assign cc[s] = CNT_W'(Cc);
  end

  session_ctrl #(.N_SESS(N_SESS)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start),
    .npat      (npat),
    .cc        (cc),
    .shift_en  (shift_en),
    .capture_en(capture_en),
    .ctrl      (ctrl),
    .sess      (sess),
    .pat       (pat),
    .busy      (busy),
    .done      (done)
  );

  rmsc_chains #(
    .N_CH     (N_CH),
    .N_SEG    (N_SEG),
    .N_REG    (N_REG),
    .N_CTRL   (N_CTRL),
    .SEG_CHAIN(SEG_CHAIN),
    .SEG_LEN  (SEG_LEN),
    .SEG_CTRL (SEG_CTRL),
    .REG_KIND (REG_KIND)
  ) u_chains (
    .clk       (clk),
    .rst_n     (rst_n),
    .shift_en  (shift_en),
    .capture_en(capture_en),
    .ctrl      (ctrl),
    .si        (si),
    .so        (so),
    .cap_d     (cap_d),
    .reg_q     (reg_q)
  );

endmodule
