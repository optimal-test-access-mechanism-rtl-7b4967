// scan_cell: one scan register of a test access mechanism.
//
// The cell is a single flip-flop. While shift_en is high it takes scan_in, so
// that a row of cells forms a shift register. While capture_en is high (and
// shift_en low) a cell that captures, that is a pure receiver, a
// driver-receiver or an internal scan flip-flop, loads cap_d, the value the
// core presents to it. A pure driver keeps its value during capture: it only
// feeds test data to the core. hold freezes the cell whatever the other
// controls say; a bypassed segment uses it. q is both the serial output and
// the value the cell drives into the core.
//
// Timing: one rising clock edge per shift or capture; active-low asynchronous
// reset to 0. The four cell kinds follow the classification of wrapper cells
// into pure drivers, pure receivers and driver-receivers; the single-flip-flop
// structure, the hold input and the reset are this design's choices.
module scan_cell
  import tam_pkg::*;
#(
  parameter cell_kind_e KIND = CELL_INT
) (
  input  logic clk,
  input  logic rst_n,
  input  logic hold,
  input  logic shift_en,
  input  logic capture_en,
  input  logic scan_in,
  input  logic cap_d,
  output logic q
);

  localparam bit DoCapture = captures(KIND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           q <= 1'b0;
    else if (hold)                        q <= q;
    else if (shift_en)                    q <= scan_in;
    else if (capture_en && DoCapture)     q <= cap_d;
  end

endmodule
