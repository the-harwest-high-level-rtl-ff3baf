// sweep_controller: control FSM of the Heat-Bath array.
//
// A lattice sweep is two half-sweeps (parity p = 0, then p = 1) of L steps
// k = 0..L-1, one clock per step, so a sweep takes exactly 2*L clocks with
// no gap between steps, half-sweeps or consecutive sweeps. The FSM drives
// `run` during every step and `par` = (k + p) mod 2, from which each FU
// derives the column it updates.
//
// Start/done protocol: a one-cycle `start` while idle latches `n_sweeps`
// and starts running in the next clock; `busy` is high while running;
// `done` pulses for one clock after the last step. A start with n_sweeps
// = 0 only produces the done pulse. `start` while busy is ignored.
// Synchronous active-low reset. The 2*L clocks per sweep follow the
// architecture; the FSM encoding and the handshake are this design's own.
module sweep_controller #(
  parameter int unsigned L  = 24,
  parameter int unsigned CW = (L > 1) ? $clog2(L) : 1,
  parameter int unsigned SW = 16   // width of the sweep count
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [SW-1:0] n_sweeps,
  output logic          run,
  output logic          par,
  output logic          phase,
  output logic [CW-1:0] k,
  output logic [SW-1:0] sweeps_done,
  output logic          busy,
  output logic          done
);

  typedef enum logic [0:0] {S_IDLE, S_RUN} state_e;

  state_e        state;
  logic [SW-1:0] target;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      k           <= '0;
      phase       <= 1'b0;
      target      <= '0;
      sweeps_done <= '0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            k           <= '0;
            phase       <= 1'b0;
            target      <= n_sweeps;
            sweeps_done <= '0;
            if (n_sweeps == '0) done  <= 1'b1;
            else                state <= S_RUN;
          end
        end
        S_RUN: begin
          if (int'(k) == L - 1) begin
            k     <= '0;
            phase <= ~phase;
            if (phase) begin
              sweeps_done <= sweeps_done + 1'b1;
              if (sweeps_done + 1'b1 == target) begin
                state <= S_IDLE;
                done  <= 1'b1;
              end
            end
          end else begin
            k <= k + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign run  = (state == S_RUN);
  assign busy = run;
  assign par  = k[0] ^ phase;

  // The step counter never leaves 0..L-1.
  a_k_range: assert property (@(posedge clk) disable iff (!rst_n) int'(k) < L);
  // Done is a single-cycle pulse.
  a_done_pulse: assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);

endmodule
