// session_ctrl: test-session sequencer of the reconfigurable multiple scan
// chains.
//
// The cores are ordered by increasing test length L_1 < L_2 < ... < L_n, and
// the test is a sequence of n test sessions; session TS_i applies
// npat[i] = L_i - L_{i-1} patterns, with the chains cc[i] registers deep
// (the chain cycles CC_i of that session). The sequencer runs:
//
//   shift cc[0] cycles                       (load the first pattern)
//   for every session i, for every pattern:  capture 1 cycle,
//                                            shift cc[i] cycles
//
// so scan-out of one response overlaps scan-in of the next pattern, and the
// whole test takes  tau = sum_i npat[i] * (cc[i] + 1) + cc[0]  cycles. The
// shift that follows the last capture of TS_i still uses the chains of TS_i,
// so the last responses of the cores that finish are unloaded; at the clock
// edge that ends it, ctrl[i] (Ctrl_{i+1} in one-based numbering) goes active
// and stays active until the next start. ctrl[i] is therefore high from the
// first capture of session i+1 on. There are n-1 control signals; the last
// session needs none.
//
// Interface: pulse start for one cycle while idle; shift_en and capture_en
// drive the chains; sess and pat tell the tester which pattern is being
// loaded (sess stays at the last session once done); done is high from the end of the test until the next start. npat
// and cc must be stable during a test and every npat[i] must be at least 1.
// The schedule and the sticky control rules follow the source; the start/done
// handshake and the counter widths are this design's choices.
module session_ctrl
  import tam_pkg::*;
#(
  parameter int unsigned N_SESS = 2,
  localparam int unsigned N_CTRL = (N_SESS > 1) ? N_SESS - 1 : 1,
  localparam int unsigned SESS_W = (N_SESS > 1) ? $clog2(N_SESS) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [CNT_W-1:0]       npat [N_SESS],
  input  logic [CNT_W-1:0]       cc   [N_SESS],
  output logic                   shift_en,
  output logic                   capture_en,
  output logic [N_CTRL-1:0]      ctrl,
  output logic [SESS_W-1:0]      sess,
  output logic [CNT_W-1:0]       pat,
  output logic                   busy,
  output logic                   done
);

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_CAPTURE} state_e;

  state_e           state;
  logic [CNT_W-1:0] cnt;     // shift cycles left, including this one

  assign shift_en   = (state == S_SHIFT);
  assign capture_en = (state == S_CAPTURE);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      sess  <= '0;
      pat   <= '0;
      ctrl  <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state <= S_SHIFT;
            cnt   <= cc[0];
            sess  <= '0;
            pat   <= '0;
            ctrl  <= '0;
            done  <= 1'b0;
          end
        end
        S_SHIFT: begin
          if (cnt > 1) begin
            cnt <= cnt - 1'b1;
          end else if (pat == npat[sess]) begin
            // last response of TS_i has left the chains: reconfigure
            for (int i = 0; i < int'(N_CTRL); i++)
              if (N_SESS > 1 && SESS_W'(i) == sess) ctrl[i] <= 1'b1;
            pat <= '0;
            if (sess == SESS_W'(N_SESS - 1)) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              sess  <= sess + 1'b1;
              state <= S_CAPTURE;
            end
          end else begin
            state <= S_CAPTURE;
          end
        end
        S_CAPTURE: begin
          pat   <= pat + 1'b1;
          cnt   <= cc[sess];
          state <= S_SHIFT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Chains of zero length or empty sessions are not a legal schedule.
  always_ff @(posedge clk) begin
    if (state == S_IDLE && start) begin
      for (int i = 0; i < int'(N_SESS); i++) begin
        assert (npat[i] != 0) else $error("session_ctrl: session %0d has no patterns", i);
        assert (cc[i] != 0)   else $error("session_ctrl: session %0d has no chain cycles", i);
      end
    end
  end

endmodule
