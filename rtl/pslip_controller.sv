// pslip_controller: sequencer of one P-iSLIP scheduling round.
//
// A start pulse while ready begins a round: the scheduler stores the
// request matrix in that cycle, then runs one request-grant-accept
// iteration per clock for N_ITER clocks (iterate high), then raises done
// for one clock while the finished matching is held. ready is high in IDLE
// and in the done clock, so the next round can start in the very clock in
// which the previous result is used (scheduling overlaps cell transfer).
// load, the signal that lets the Grant and Accept blocks move their
// round-robin pointers, is high in the first iteration only, as in iSLIP.
// Latency from start to done: N_ITER + 1 clocks; back to back, one round
// every N_ITER + 1 clocks.
// iter_idx numbers the current iteration from 0. rst is synchronous,
// active high.
//
// The controller is only named in the original design (it issues Load);
// the one-iteration-per-clock schedule here is this implementation's own.
module pslip_controller #(
  parameter int unsigned N_ITER = pslip_pkg::N_ITER,
  parameter int unsigned CW     = (N_ITER > 1) ? $clog2(N_ITER) : 1
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          ready,
  output logic          iterate,
  output logic          load,
  output logic          done,
  output logic [CW-1:0] iter_idx
);

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_DONE} state_t;
  state_t state_q;
  logic [CW-1:0] cnt_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start) begin
          state_q <= S_ITER;
          cnt_q   <= '0;
        end
        S_ITER: begin
          if (int'(cnt_q) == N_ITER - 1) state_q <= S_DONE;
          else                           cnt_q   <= cnt_q + CW'(1);
        end
        S_DONE: begin
          // a new round may start in the done clock (back to back)
          if (start) begin
            state_q <= S_ITER;
            cnt_q   <= '0;
          end else begin
            state_q <= S_IDLE;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ready    = (state_q == S_IDLE) || (state_q == S_DONE);
    iterate  = (state_q == S_ITER);
    load     = iterate && (cnt_q == '0);
    done     = (state_q == S_DONE);
    iter_idx = cnt_q;
  end

  a_start_idle : assert property (@(posedge clk) disable iff (rst)
                                  start |-> ready);

endmodule
