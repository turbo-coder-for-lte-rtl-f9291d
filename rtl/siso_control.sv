// siso_control: timing and control of one SISO decoder pass.
//
// A pass has three phases of N+1 cycles each: forward (branch metrics are
// formed and stored, forward recursion), backward (backward recursion) and
// LLR (a-posteriori and extrinsic values). In every phase a counter issues
// one request per cycle for N cycles (`req_valid`, index `req_idx`); the
// storage read for a request completes at the next edge, so the request
// reappears one cycle later as `proc_valid`/`proc_idx`/`proc_phase`, when
// the datapath consumes it. Indices run 0..N-1 in the forward and LLR
// phases and N-1..0 in the backward phase. `first` is high in the first
// cycle of a phase so the datapath can load its recursion start values.
// `done` pulses for one cycle after the last LLR is produced; a pass takes
// 3*(N+1) cycles from the `start` edge to `done`. The three-phase schedule
// follows the source description's flow (branch and forward metrics, then backward
// metrics, then LR computation, each with its own storage); the counter
// scheme is this design's.
module siso_control
  import turbo_pkg::*;
#(
  parameter int unsigned N = 8,
  localparam int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output siso_phase_e   phase,
  output logic          first,
  output logic          req_valid,
  output logic [AW-1:0] req_idx,
  output logic          proc_valid,
  output siso_phase_e   proc_phase,
  output logic [AW-1:0] proc_idx,
  output logic          busy,
  output logic          done
);

  localparam int unsigned CW = $clog2(N + 1);
  logic [CW-1:0] cnt;
  logic          last;

  assign last      = (cnt == CW'(N));
  assign busy      = (phase != PH_IDLE);
  assign first     = busy && (cnt == '0);
  assign req_valid = busy && !last;
  assign req_idx   = (phase == PH_BWD) ? AW'(N - 1 - int'(cnt)) : AW'(cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= PH_IDLE;
      cnt        <= '0;
      proc_valid <= 1'b0;
      proc_phase <= PH_IDLE;
      proc_idx   <= '0;
      done       <= 1'b0;
    end else begin
      proc_valid <= req_valid;
      proc_phase <= phase;
      proc_idx   <= req_idx;
      done       <= 1'b0;
      unique case (phase)
        PH_IDLE: if (start) begin
          phase <= PH_FWD;
          cnt   <= '0;
        end
        default: begin
          if (last) begin
            cnt <= '0;
            unique case (phase)
              PH_FWD:  phase <= PH_BWD;
              PH_BWD:  phase <= PH_LLR;
              default: begin
                phase <= PH_IDLE;
                done  <= 1'b1;
              end
            endcase
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
      endcase
    end
  end

endmodule
