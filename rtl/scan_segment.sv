// scan_segment: the registers of one core that sit next to each other in one
// reconfigurable scan chain, together with the multiplexer that bypasses them.
//
// LEN scan cells are connected in series, cell 0 nearest the segment input.
// While bypass is low the segment output is the last cell, so the segment is
// part of the chain. Once bypass is high the output multiplexer selects the
// segment input, the chain becomes LEN registers shorter and the cells hold
// their contents (a bypassed core needs no more patterns). cap_d and q give
// the core access to every cell, in the same order.
//
// The bypass multiplexer in front of the next part of the chain, driven by a
// control signal, is the structure of the reconfigurable multiple scan chain
// example of the source; holding the bypassed cells is this design's choice.
// Interface timing: the bypass is combinational, the cells are clocked.
module scan_segment
  import tam_pkg::*;
#(
  parameter int unsigned LEN = 4,
  parameter cell_kind_e [LEN-1:0] KINDS = {LEN{CELL_INT}}
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           capture_en,
  input  logic           bypass,
  input  logic           seg_in,
  output logic           seg_out,
  input  logic [LEN-1:0] cap_d,
  output logic [LEN-1:0] q
);

  logic [LEN:0] link;
  assign link[0] = seg_in;

  for (genvar m = 0; m < LEN; m++) begin : g_cell
    scan_cell #(.KIND(KINDS[m])) u_cell (
      .clk       (clk),
      .rst_n     (rst_n),
      .hold      (bypass),
      .shift_en  (shift_en),
      .capture_en(capture_en),
      .scan_in   (link[m]),
      .cap_d     (cap_d[m]),
      .q         (q[m])
    );
    assign link[m+1] = q[m];
  end

  assign seg_out = bypass ? seg_in : link[LEN];

endmodule
