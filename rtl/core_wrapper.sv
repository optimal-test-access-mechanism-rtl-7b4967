// core_wrapper: test wrapper of one core on a TestRail, W bits wide.
//
// The wrapper cuts the core's terminals and scan flip-flops into W wrapper
// scan chains. Input terminals, scan flip-flops and output terminals are each
// dealt round robin over the chains (item i to chain i mod W), and every
// chain holds its input cells, then its flip-flops, then its output cells, so
// that shift-in and shift-out are as short as the counts allow. The longest
// chain is chain 0, giving a scan-in length
//   si = ceil(N_IN/W) + ceil(N_FF/W)   and a scan-out length
//   so = ceil(N_FF/W) + ceil(N_OUT/W).
//
// Modes (tam_pkg::wrap_mode_e):
//   WM_NORMAL  functional: core_in = pi, po = core_out, the scan flip-flops
//              load ff_d every cycle; the rail passes straight through.
//   WM_INTEST  the rail runs through the wrapper chains: shift_en shifts,
//              capture_en makes output cells and flip-flops capture. The core
//              sees the input cells, po shows the output cells.
//   WM_BYPASS  the rail passes straight through (wso = wsi, no register) and
//              all cells hold, keeping the core isolated.
// core_in/core_out/ff_q/ff_d connect to the core logic. Cells are clocked on
// the rising edge; the bypass path is combinational.
//
// A wrapper with a bypass mode, used by a TestRail for sequential testing,
// is what the source relies on; the round-robin wrapper design, the
// combinational bypass and the normal mode are this design's choices.
module core_wrapper
  import tam_pkg::*;
#(
  parameter int unsigned W     = 4,
  parameter int unsigned N_IN  = 6,
  parameter int unsigned N_FF  = 20,
  parameter int unsigned N_OUT = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  input  wrap_mode_e       mode,
  input  logic             shift_en,
  input  logic             capture_en,
  input  logic [W-1:0]     wsi,
  output logic [W-1:0]     wso,
  input  logic [N_IN-1:0]  pi,
  output logic [N_OUT-1:0] po,
  output logic [N_IN-1:0]  core_in,
  input  logic [N_OUT-1:0] core_out,
  output logic [N_FF-1:0]  ff_q,
  input  logic [N_FF-1:0]  ff_d
);

  logic intest, hold, cell_shift, cell_cap;
  assign intest     = (mode == WM_INTEST);
  assign hold       = (mode == WM_BYPASS);
  assign cell_shift = intest && shift_en;
  assign cell_cap   = (intest && capture_en) || (mode == WM_NORMAL);

  logic [N_IN-1:0]  in_q;
  logic [N_OUT-1:0] out_q;

  for (genvar j = 0; j < W; j++) begin : g_chain
    localparam int NIn  = deal(N_IN,  W, j);
    localparam int NFf  = deal(N_FF,  W, j);
    localparam int NOut = deal(N_OUT, W, j);
    localparam int Len  = NIn + NFf + NOut;

    logic [Len:0] link;
    assign link[0] = wsi[j];

    for (genvar m = 0; m < Len; m++) begin : g_cell
      if (m < NIn) begin : g_in
        localparam int Idx = m * W + j;
        scan_cell #(.KIND(CELL_IN)) u_cell (
          .clk(clk), .rst_n(rst_n), .hold(hold), .shift_en(cell_shift),
          .capture_en(cell_cap), .scan_in(link[m]), .cap_d(1'b0), .q(in_q[Idx])
        );
        assign link[m+1] = in_q[Idx];
      end else if (m < NIn + NFf) begin : g_ff
        localparam int Idx = (m - NIn) * W + j;
        scan_cell #(.KIND(CELL_INT)) u_cell (
          .clk(clk), .rst_n(rst_n), .hold(hold), .shift_en(cell_shift),
          .capture_en(cell_cap), .scan_in(link[m]), .cap_d(ff_d[Idx]), .q(ff_q[Idx])
        );
        assign link[m+1] = ff_q[Idx];
      end else begin : g_out
        localparam int Idx = (m - NIn - NFf) * W + j;
        scan_cell #(.KIND(CELL_OUT)) u_cell (
          .clk(clk), .rst_n(rst_n), .hold(hold), .shift_en(cell_shift),
          .capture_en(cell_cap), .scan_in(link[m]), .cap_d(core_out[Idx]), .q(out_q[Idx])
        );
        assign link[m+1] = out_q[Idx];
      end
    end

    assign wso[j] = intest ? link[Len] : wsi[j];
  end

  assign core_in = (mode == WM_NORMAL) ? pi : in_q;
  assign po      = (mode == WM_NORMAL) ? core_out : out_q;

endmodule
