// cnn_control: sequencing of the cellular neural network.
//
// The source design gives the network "controlling systems" that check
// whether all cells have completed their calculations, decide when the
// results may be sent to the outputs, and clear the network. This module is
// the simplest controller that does that:
//   IDLE --start--> RUN: one network iteration (`step`) per clock.
//   RUN: a cell has completed when the iteration being taken leaves its output
//        unchanged; when no cell changes (`any_change` low) the network is in
//        equilibrium, `release_out` pulses for one clock and the controller
//        goes to DONE with `converged` set. If the network is still changing
//        after MAX_ITER iterations it stops the same way with `converged`
//        clear (a guard of this design; the source states that the network
//        always settles).
//   DONE: in its first clock `release_out` pulses, so that the output
//        register captures the cell outputs of the final state; `done` rises
//        one clock later, together with the captured results. From DONE,
//        `start` runs the network again; `clear` returns to IDLE from any
//        state.
// Latency: `done` is high N + 2 clocks after the clock edge that took
// `start`, where N is the number of iterations.
// `iter_count` is the number of iterations of the last run, the final,
// unchanging one included. `busy` is high in RUN; data loads and template
// writes are meant to wait while it is high.
module cnn_control
  import cnn_pkg::*;
#(
  parameter  int unsigned MAX_ITER = 64,
  localparam int unsigned IT_W     = $clog2(MAX_ITER + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            start,
  input  logic            any_change,
  output logic            step,
  output logic            release_out,
  output logic            busy,
  output logic            done,
  output logic            converged,
  output logic [IT_W-1:0] iter_count
);

  ctrl_state_e state_q;
  logic        last_iter;
  logic        release_q;

  assign step        = (state_q == CTRL_RUN) && !clear;
  assign last_iter   = !any_change || (iter_count == IT_W'(MAX_ITER - 1));
  assign release_out = release_q;
  assign busy        = (state_q == CTRL_RUN);
  assign done        = (state_q == CTRL_DONE) && !release_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= CTRL_IDLE;
      iter_count <= '0;
      converged  <= 1'b0;
      release_q  <= 1'b0;
    end else if (clear) begin
      state_q    <= CTRL_IDLE;
      iter_count <= '0;
      converged  <= 1'b0;
      release_q  <= 1'b0;
    end else begin
      release_q <= step && last_iter;
      unique case (state_q)
        CTRL_IDLE, CTRL_DONE: begin
          if (start && !release_q) begin
            state_q    <= CTRL_RUN;
            iter_count <= '0;
            converged  <= 1'b0;
          end
        end
        CTRL_RUN: begin
          iter_count <= iter_count + 1'b1;
          if (last_iter) begin
            state_q   <= CTRL_DONE;
            converged <= !any_change;
          end
        end
        default: state_q <= CTRL_IDLE;
      endcase
    end
  end

  // A run never exceeds its iteration limit.
  a_iter_limit: assert property (@(posedge clk)
    rst_n && busy |-> iter_count < IT_W'(MAX_ITER));
  // Results are released only in the first clock after the last iteration.
  a_release_after_run: assert property (@(posedge clk)
    rst_n && release_out |-> state_q == CTRL_DONE);

endmodule
