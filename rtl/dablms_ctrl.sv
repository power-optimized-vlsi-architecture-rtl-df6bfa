// dablms_ctrl: phase sequencer of one DA-BLMS adaptation iteration.
//
// A `start` pulse while idle begins an iteration: `load` is high in that
// cycle so the new input block and desired outputs are captured. Then
// four phases of N cycles follow, with `cnt` counting 0..N-1 in each:
//   PH_U  CTR1 = 1, MAC computes u(i,j), n = cnt = jL + i  (DEMUX1 writes)
//   PH_V  CTR1 = 0, MAC computes v(i,j) for weight n = cnt (v collector)
//   PH_W  weight n = cnt updated through mu multiplier and RCA
//   PH_T  weight n = cnt truncated by its decision device
// so one iteration takes 4N = 64 cycles after the start cycle; `done`
// pulses for one cycle when it is complete, and `busy` is high from the
// cycle after `start` until then. Each enable is high only in its own
// phase, so the other blocks stay idle. A start while busy is ignored.
// The document fixes the 64-cycle total and the 16-cycle phases; the
// start/busy/done handshake is this design's choice.
module dablms_ctrl
  import dablms_pkg::*;
#(
  parameter int unsigned N   = 16,
  localparam int unsigned SW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          load,
  output phase_e        phase,
  output logic [SW-1:0] cnt,
  output logic          ctr1,
  output logic          u_en,
  output logic          v_en,
  output logic          w_en,
  output logic          t_en,
  output logic          busy,
  output logic          done
);

  logic last;

  assign last = (cnt == SW'(N - 1));
  assign load = (phase == PH_IDLE) && start;
  assign busy = (phase != PH_IDLE);
  assign ctr1 = (phase == PH_U);
  assign u_en = (phase == PH_U);
  assign v_en = (phase == PH_V);
  assign w_en = (phase == PH_W);
  assign t_en = (phase == PH_T);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (phase)
        PH_IDLE: begin
          cnt <= '0;
          if (start) phase <= PH_U;
        end
        PH_U, PH_V, PH_W, PH_T: begin
          cnt <= last ? '0 : cnt + 1'b1;
          if (last) begin
            unique case (phase)
              PH_U:    phase <= PH_V;
              PH_V:    phase <= PH_W;
              PH_W:    phase <= PH_T;
              default: begin
                phase <= PH_IDLE;
                done  <= 1'b1;
              end
            endcase
          end
        end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  // An iteration only completes out of the truncation phase.
  a_done_after_t: assert property (@(posedge clk) disable iff (!rst_n)
                                   done |-> $past(phase) == PH_T);

endmodule
