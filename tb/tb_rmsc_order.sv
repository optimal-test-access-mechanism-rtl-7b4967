// tb_rmsc_order: the effect of register order on the chain cycles. One core
// with two inputs (I), one bidirectional pin (B), three outputs (O) and five
// internal flip-flops sits on a single scan chain in two orders:
//   (a) O I FFFFF I O B O   -- shift-in must reach B (10 deep) and shift-out
//                              must drain the first O (11 deep): CC = 11
//   (b) I I B FFFFF O O O   -- drivers first, receivers last: shift-in 8,
//                              shift-out 9 (from B): CC = 9
// Both are run for 20 patterns with full data checking; the test times must
// be 20*(11+1)+11 = 251 and 20*(9+1)+9 = 209 cycles.
module tb_rmsc_order;
  import tam_pkg::*;

  localparam cell_kind_e [10:0] KindA = {CELL_OUT, CELL_BIDIR, CELL_OUT, CELL_IN, CELL_INT, CELL_INT, CELL_INT, CELL_INT, CELL_INT, CELL_IN, CELL_OUT};
  localparam cell_kind_e [10:0] KindB = {CELL_OUT, CELL_OUT, CELL_OUT, CELL_INT, CELL_INT, CELL_INT, CELL_INT, CELL_INT, CELL_BIDIR, CELL_IN, CELL_IN};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [CNT_W-1:0] npat [1];
  logic [0:0] si [2], so [2], ctrl [2], sess [2];
  logic [10:0] cap_d [2], reg_q [2];
  logic shift_en [2], capture_en [2], busy [2], done [2];
  logic [CNT_W-1:0] pat [2];

  always #5 clk = ~clk;

  int tc [2], tf [2], tcy [2], tbits [2];
  logic tfin [2];
  int checks = 0, failures = 0;

  for (genvar v = 0; v < 2; v++) begin : g_v
    localparam cell_kind_e [10:0] Kind = (v == 0) ? KindA : KindB;
    rmsc_tam #(
      .N_CH(1), .N_SESS(1), .N_SEG(1), .N_REG(11),
      .SEG_CHAIN('0), .SEG_LEN(size_tab_t'(11)), .SEG_CTRL('0), .REG_KIND(Kind)
    ) dut (
      .clk, .rst_n, .start, .npat, .si(si[v]), .so(so[v]), .cap_d(cap_d[v]), .reg_q(reg_q[v]),
      .shift_en(shift_en[v]), .capture_en(capture_en[v]), .ctrl(ctrl[v]), .sess(sess[v]),
      .pat(pat[v]), .busy(busy[v]), .done(done[v])
    );
    rmsc_gen_tester #(
      .N_CH(1), .N_SESS(1), .N_SEG(1), .N_REG(11),
      .SEG_CHAIN('0), .SEG_LEN(size_tab_t'(11)), .SEG_CTRL('0), .SEG_CORE('0), .REG_KIND(Kind),
      .NPAT(size_tab_t'(20)), .EXP_CC(size_tab_t'((v == 0) ? 11 : 9))
    ) tester (
      .clk, .start, .si(si[v]), .so(so[v]), .reg_q(reg_q[v]), .cap_d(cap_d[v]),
      .shift_en(shift_en[v]), .capture_en(capture_en[v]), .ctrl(ctrl[v]),
      .checks(tc[v]), .failures(tf[v]), .cycles(tcy[v]), .n_resp_bits(tbits[v]), .finished(tfin[v])
    );
  end

  int done_at [2] = '{-1, -1};

  initial begin
    npat[0] = 20;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    for (int c = 1; c <= 400 && !(done[0] && done[1]); c++) begin
      @(negedge clk);
      for (int v = 0; v < 2; v++) if (done[v] && done_at[v] < 0) done_at[v] = c;
    end
    #1;
    checks += 3;
    if (done_at[0] != 251) begin failures++; $display("FAIL order (a) took %0d cycles", done_at[0]); end
    if (done_at[1] != 209) begin failures++; $display("FAIL order (b) took %0d cycles", done_at[1]); end
    if (!(tfin[0] && tfin[1] && tbits[0] > 0 && tbits[1] > 0)) failures++;
    $display("tb_rmsc_order: order (a) %0d cycles, order (b) %0d cycles", done_at[0], done_at[1]);
    checks += tc[0] + tc[1];
    failures += tf[0] + tf[1];
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
