// rail_ctrl: sequential test controller of one TestRail.
//
// The cores on a rail are tested one after the other; while one core is in
// WM_INTEST every other wrapper on the rail is in WM_BYPASS. For core k with
// scan-in length si[k], scan-out length so[k] and npat[k] patterns the
// controller runs
//
//   shift si[k] cycles                 (load the first pattern)
//   npat[k] times: capture 1 cycle, then shift max(si,so) cycles, except
//                  after the last capture, when it shifts so[k] cycles only
//
// so scan-out of a response overlaps scan-in of the next pattern and the core
// takes  t_k = (1 + max(si,so)) * p + min(si,so)  cycles. The next core
// starts on the following cycle, so the rail takes the sum of its cores'
// times. Idle wrappers are in WM_NORMAL.
//
// Interface: pulse start while idle; shift_en/capture_en drive the wrappers;
// core and pat tell the tester where the test is; done stays high from the
// end of the test to the next start. si, so and npat must be stable during a
// test, npat[k] >= 1 and si[k], so[k] >= 1. The pipelined schedule and its
// time follow the source's test-time formula; the handshake is this design's
// choice.
module rail_ctrl
  import tam_pkg::*;
#(
  parameter int unsigned NCORE = 2,
  localparam int unsigned CORE_W = (NCORE > 1) ? $clog2(NCORE) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] si   [NCORE],
  input  logic [CNT_W-1:0] so   [NCORE],
  input  logic [CNT_W-1:0] npat [NCORE],
  output wrap_mode_e       mode [NCORE],
  output logic             shift_en,
  output logic             capture_en,
  output logic [CORE_W-1:0] core,
  output logic [CNT_W-1:0] pat,
  output logic             busy,
  output logic             done
);

  typedef enum logic [1:0] {R_IDLE, R_SHIFT, R_CAPTURE} state_e;

  state_e           state;
  logic [CNT_W-1:0] cnt;

  assign shift_en   = (state == R_SHIFT);
  assign capture_en = (state == R_CAPTURE);
  assign busy       = (state != R_IDLE);

  always_comb begin
    for (int k = 0; k < int'(NCORE); k++) begin
      if (!busy)                      mode[k] = WM_NORMAL;
      else if (CORE_W'(k) == core)    mode[k] = WM_INTEST;
      else                            mode[k] = WM_BYPASS;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE;
      cnt   <= '0;
      core  <= '0;
      pat   <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        R_IDLE: begin
          if (start) begin
            state <= R_SHIFT;
            core  <= '0;
            pat   <= '0;
            cnt   <= si[0];
            done  <= 1'b0;
          end
        end
        R_SHIFT: begin
          if (cnt > 1) begin
            cnt <= cnt - 1'b1;
          end else if (pat == npat[core]) begin
            // last response of this core is out
            pat <= '0;
            if (core == CORE_W'(NCORE - 1)) begin
              state <= R_IDLE;
              done  <= 1'b1;
            end else begin
              core <= core + 1'b1;
              cnt  <= si[core + 1'b1];
            end
          end else begin
            state <= R_CAPTURE;
          end
        end
        R_CAPTURE: begin
          pat   <= pat + 1'b1;
          state <= R_SHIFT;
          if (pat + 1'b1 == npat[core]) cnt <= so[core];
          else                          cnt <= (si[core] > so[core]) ? si[core] : so[core];
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (state == R_IDLE && start) begin
      for (int k = 0; k < int'(NCORE); k++) begin
        assert (npat[k] != 0 && si[k] != 0 && so[k] != 0)
          else $error("rail_ctrl: core %0d has an empty test", k);
      end
    end
  end

endmodule
