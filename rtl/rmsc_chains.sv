// rmsc_chains: reconfigurable multiple scan chains (RMSC).
//
// N_CH scan chains run from si[c] to so[c]. Each chain is a series of
// segments; a segment is a run of scan registers that belong to one core.
// Segments are listed chain by chain, from scan-in towards scan-out:
// SEG_CHAIN[k] is the chain of segment k, SEG_LEN[k] its number of registers
// and SEG_CTRL[k] the number i of the control signal Ctrl_i (input
// ctrl[i-1]) that bypasses it, 0 if it is never bypassed.
// REG_KIND gives the kind of every register in the same order (index 0 is the
// first register of segment 0). A control signal, once active, removes its
// segments from every chain at once, so all chains are reconfigured together.
//
// Core side: reg_q[r] is the content of register r (drivers and internal
// flip-flops feed it to the core), cap_d[r] the value it captures.
//
// The default configuration is the two-core example of the source: chain 1
// is three input cells and four internal flip-flops of core A, then five
// internal flip-flops and two output cells of core B; chain 2 is three input
// cells and three internal flip-flops of core B, four output cells of core A
// and one output cell of core B. Ctrl_1 (ctrl[0], SEG_CTRL = 1) bypasses both
// segments of core A. Segment boundaries and the register order are design-time choices
// made by the register-assignment step, not by this module.
module rmsc_chains
  import tam_pkg::*;
#(
  parameter int unsigned N_CH   = 2,
  parameter int unsigned N_SEG  = 5,
  parameter int unsigned N_REG  = 25,
  parameter int unsigned N_CTRL = 1,
  // per-segment tables, segment 0 in the rightmost field
  parameter size_tab_t   SEG_CHAIN = size_tab_t'({16'd1, 16'd1, 16'd1, 16'd0, 16'd0}),
  parameter size_tab_t   SEG_LEN   = size_tab_t'({16'd1, 16'd4, 16'd6, 16'd7, 16'd7}),
  parameter size_tab_t   SEG_CTRL  = size_tab_t'({16'd0, 16'd1, 16'd0, 16'd0, 16'd1}),
  parameter cell_kind_e [N_REG-1:0] REG_KIND = {
    // listed from register 24 down to register 0
    CELL_OUT,                                              // seg 4: B
    CELL_OUT, CELL_OUT, CELL_OUT, CELL_OUT,                // seg 3: A
    CELL_INT, CELL_INT, CELL_INT, CELL_IN, CELL_IN, CELL_IN, // seg 2: B
    CELL_OUT, CELL_OUT, CELL_INT, CELL_INT, CELL_INT, CELL_INT, CELL_INT, // seg 1: B
    CELL_INT, CELL_INT, CELL_INT, CELL_INT, CELL_IN, CELL_IN, CELL_IN      // seg 0: A
  }
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              shift_en,
  input  logic              capture_en,
  input  logic [N_CTRL-1:0] ctrl,
  input  logic [N_CH-1:0]   si,
  output logic [N_CH-1:0]   so,
  input  logic [N_REG-1:0]  cap_d,
  output logic [N_REG-1:0]  reg_q
);

  function automatic int seg_base(int k);
    return tab_sum(SEG_LEN, 0, k);
  endfunction

  function automatic int last_seg(int c);
    int l = -1;
    for (int j = 0; j < int'(N_SEG); j++) if (int'(SEG_CHAIN[j]) == c) l = j;
    return l;
  endfunction

  logic [N_SEG-1:0] seg_out;
  logic [N_SEG-1:0] seg_in;

  for (genvar k = 0; k < N_SEG; k++) begin : g_seg
    localparam int Base = seg_base(k);
    localparam int Len  = int'(SEG_LEN[k]);
    localparam int Ch   = int'(SEG_CHAIN[k]);
    localparam int Ctl  = int'(SEG_CTRL[k]);
    localparam bit IsHead = (k == 0) ? 1'b1 : (SEG_CHAIN[k-1] != SEG_CHAIN[k]);

    logic bypass;
    if (Ctl == 0) begin : g_fixed
      assign bypass = 1'b0;
    end else begin : g_ctrl
      assign bypass = ctrl[Ctl-1];
    end

    if (IsHead) begin : g_head
      assign seg_in[k] = si[Ch];
    end else begin : g_body
      assign seg_in[k] = seg_out[k-1];
    end

    scan_segment #(
      .LEN  (Len),
      .KINDS(REG_KIND[Base +: Len])
    ) u_seg (
      .clk       (clk),
      .rst_n     (rst_n),
      .shift_en  (shift_en),
      .capture_en(capture_en),
      .bypass    (bypass),
      .seg_in    (seg_in[k]),
      .seg_out   (seg_out[k]),
      .cap_d     (cap_d[Base +: Len]),
      .q         (reg_q[Base +: Len])
    );
  end

  for (genvar c = 0; c < N_CH; c++) begin : g_so
    assign so[c] = seg_out[last_seg(c)];
  end

  initial begin
    assert (seg_base(N_SEG) == int'(N_REG))
      else $error("rmsc_chains: SEG_LEN does not add up to N_REG");
    for (int c = 0; c < int'(N_CH); c++)
      assert (last_seg(c) >= 0) else $error("rmsc_chains: chain %0d has no segment", c);
    for (int k = 0; k < int'(N_SEG); k++)
      assert (int'(SEG_CTRL[k]) <= int'(N_CTRL) && int'(SEG_CHAIN[k]) < int'(N_CH))
        else $error("rmsc_chains: segment %0d names a missing chain or control", k);
  end

endmodule
