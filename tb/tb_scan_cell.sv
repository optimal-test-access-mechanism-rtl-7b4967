// tb_scan_cell: one cell of each kind driven with random hold, shift and
// capture controls and compared every cycle with a reference model: shift
// loads scan_in, capture loads cap_d only for receivers, driver-receivers
// and internal flip-flops, hold keeps the value, reset clears it.
module tb_scan_cell;
  import tam_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic hold, shift_en, capture_en, scan_in, cap_d;
  logic [3:0] q;
  logic [3:0] model;
  int checks = 0, failures = 0;
  int n_shift = 0, n_cap = 0, n_hold = 0;

  always #5 clk = ~clk;

  scan_cell #(.KIND(CELL_IN))    u_in  (.clk, .rst_n, .hold, .shift_en, .capture_en, .scan_in, .cap_d, .q(q[0]));
  scan_cell #(.KIND(CELL_OUT))   u_out (.clk, .rst_n, .hold, .shift_en, .capture_en, .scan_in, .cap_d, .q(q[1]));
  scan_cell #(.KIND(CELL_BIDIR)) u_bi  (.clk, .rst_n, .hold, .shift_en, .capture_en, .scan_in, .cap_d, .q(q[2]));
  scan_cell #(.KIND(CELL_INT))   u_int (.clk, .rst_n, .hold, .shift_en, .capture_en, .scan_in, .cap_d, .q(q[3]));

  initial begin
    {hold, shift_en, capture_en, scan_in, cap_d} = '0;
    repeat (2) @(negedge clk);
    checks++;
    if (q != 4'b0000) failures++;
    model = '0;
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      hold       = ($urandom % 8) == 0;
      shift_en   = 1'($urandom);
      capture_en = 1'($urandom);
      scan_in    = 1'($urandom);
      cap_d      = 1'($urandom);
      for (int k = 0; k < 4; k++) begin
        if (hold) ;
        else if (shift_en) model[k] = scan_in;
        else if (capture_en && k != 0) model[k] = cap_d;
      end
      if (hold) n_hold++; else if (shift_en) n_shift++; else if (capture_en) n_cap++;
      @(negedge clk);
      checks++;
      if (q != model) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: q=%b model=%b", i, q, model);
      end
    end
    checks++;
    if (n_hold == 0 || n_shift == 0 || n_cap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
