// tb_scan_segment: a five-register segment (driver, two internal flip-flops,
// driver-receiver, receiver). Checks that the segment delays its input by
// five shifts, that capture loads only the capturing registers, that the
// bypass path is combinational and that bypassed registers hold.
module tb_scan_segment;
  import tam_pkg::*;

  localparam int Len = 5;
  localparam cell_kind_e [Len-1:0] Kinds = {CELL_OUT, CELL_BIDIR, CELL_INT, CELL_INT, CELL_IN};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic shift_en = 1'b0, capture_en = 1'b0, bypass = 1'b0, seg_in = 1'b0;
  logic seg_out;
  logic [Len-1:0] cap_d = '0, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_segment #(.LEN(Len), .KINDS(Kinds)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  logic [Len-1:0] model;
  logic [Len-1:0] saved;
  logic hist [$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model = '0;
    // shifting: output is input delayed by Len cycles
    shift_en = 1'b1;
    for (int i = 0; i < 60; i++) begin
      seg_in = 1'($urandom);
      hist.push_back(seg_in);
      @(negedge clk);
      model = {model[Len-2:0], hist[$]};
      check(q == model, "shift contents");
      if (hist.size() >= Len) check(seg_out == hist[hist.size()-Len], "shift delay");
    end
    // capture
    shift_en = 1'b0;
    capture_en = 1'b1;
    for (int i = 0; i < 20; i++) begin
      cap_d = Len'($urandom);
      for (int m = 0; m < Len; m++) if (captures(Kinds[m])) model[m] = cap_d[m];
      @(negedge clk);
      check(q == model, "capture");
    end
    capture_en = 1'b0;
    // bypass: combinational path and frozen registers
    bypass = 1'b1;
    saved = q;
    for (int i = 0; i < 20; i++) begin
      shift_en = 1'($urandom);
      capture_en = 1'($urandom);
      seg_in = 1'($urandom);
      cap_d = Len'($urandom);
      #1;
      check(seg_out == seg_in, "bypass path");
      @(negedge clk);
      check(q == saved, "bypass hold");
    end
    bypass = 1'b0;
    shift_en = 1'b0;
    capture_en = 1'b0;
    #1;
    check(seg_out == saved[Len-1], "segment back in chain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
