// tb_rmsc_blocks: fewer control signals than sessions. Four cores
// C1..C4 with test lengths L = (5, 9, 15, 22), so four sessions of 5, 4, 6
// and 7 patterns, share two chains; only Ctrl_2 is built. It bypasses the
// registers of C1 and C2, which splits the sessions into two blocks
// {TS1, TS2} and {TS3, TS4}; C3 stays in the chains until the end.
//   chain 1: C1[I I F F]  C3[I F F F]  C2[F F O]  C4[F F O O]
//   chain 2: C2[I I I]    C4[I F F]    C1[O O]    C3[O]
// Block 1: chain 1 is 13 deep for shift-in (its last driving register is
// the 13th) and 13 for shift-out, chain 2 6 and 5: CC = 13 in TS1 and TS2.
// Block 2: chain 1 6 and 7, chain 2 3 and 3: CC = 7 in TS3 and TS4.
// Test time: 5*14 + 4*14 + 6*8 + 7*8 + 13 = 243.
// All response bits and all control signals are checked.
module tb_rmsc_blocks;
  import tam_pkg::*;

  localparam int NR = 24;
  localparam cell_kind_e [NR-1:0] Kind = {CELL_OUT, CELL_OUT, CELL_OUT, CELL_INT, CELL_INT, CELL_IN, CELL_IN, CELL_IN, CELL_IN, CELL_OUT, CELL_OUT, CELL_INT, CELL_INT, CELL_OUT, CELL_INT, CELL_INT, CELL_INT, CELL_INT, CELL_INT, CELL_IN, CELL_INT, CELL_INT, CELL_IN, CELL_IN};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [CNT_W-1:0] npat [4];
  logic [1:0] si, so;
  logic [NR-1:0] cap_d, reg_q;
  logic shift_en, capture_en, busy, done;
  logic [2:0] ctrl;
  logic [1:0] sess;
  logic [CNT_W-1:0] pat;

  always #5 clk = ~clk;

  rmsc_tam #(
    .N_CH(2), .N_SESS(4), .N_SEG(8), .N_REG(NR),
    .SEG_CHAIN(size_tab_t'({16'd1, 16'd1, 16'd1, 16'd1, 16'd0, 16'd0, 16'd0, 16'd0})),
    .SEG_LEN  (size_tab_t'({16'd1, 16'd2, 16'd3, 16'd3, 16'd4, 16'd3, 16'd4, 16'd4})),
    .SEG_CTRL (size_tab_t'({16'd0, 16'd2, 16'd0, 16'd2, 16'd0, 16'd2, 16'd0, 16'd2})),
    .REG_KIND (Kind)
  ) dut (.*);

  int tc, tf, tcy, tbits;
  logic tfin;
  rmsc_gen_tester #(
    .N_CH(2), .N_SESS(4), .N_SEG(8), .N_REG(NR),
    .SEG_CHAIN(size_tab_t'({16'd1, 16'd1, 16'd1, 16'd1, 16'd0, 16'd0, 16'd0, 16'd0})),
    .SEG_LEN  (size_tab_t'({16'd1, 16'd2, 16'd3, 16'd3, 16'd4, 16'd3, 16'd4, 16'd4})),
    .SEG_CTRL (size_tab_t'({16'd0, 16'd2, 16'd0, 16'd2, 16'd0, 16'd2, 16'd0, 16'd2})),
    .SEG_CORE (size_tab_t'({16'd2, 16'd0, 16'd3, 16'd1, 16'd3, 16'd1, 16'd2, 16'd0})),
    .REG_KIND (Kind),
    .NPAT(size_tab_t'({16'd7, 16'd6, 16'd4, 16'd5})), .EXP_CC(size_tab_t'({16'd7, 16'd7, 16'd13, 16'd13}))
  ) tester (
    .clk, .start, .si, .so, .reg_q, .cap_d, .shift_en, .capture_en, .ctrl,
    .checks(tc), .failures(tf), .cycles(tcy), .n_resp_bits(tbits), .finished(tfin)
  );

  int checks = 0, failures = 0, cyc = 0;

  initial begin
    npat[0] = 5;
    npat[1] = 4;
    npat[2] = 6;
    npat[3] = 7;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    #1;
    checks += 2;
    if (cyc != 243) begin failures++; $display("FAIL test took %0d cycles", cyc); end
    if (!(tfin && tbits > 0)) failures++;
    $display("tb_rmsc_blocks: %0d cycles, %0d response bits checked", cyc, tbits);
    checks += tc;
    failures += tf;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
