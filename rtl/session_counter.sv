// session_counter: test-session sequencer of the accumulator pattern
// generator. It drives the Set[n-1:0] and Reset[n-1:0] lines that give every
// pattern bit its weight (0, 0.5 or 1) for the current session.
//
// The test is split into NUM_SESSIONS sessions of SESSION_LEN test cycles.
// A cycle counter advances on `step`; when it wraps, the session number
// advances. After the last session `done` rises and stays high until reset;
// the counters then stop. Set/Reset are registered decodes of the session
// number through qc_pkg::session_weight, so they change only at a session
// boundary and never glitch (they drive asynchronous set/reset pins). They are
// released (all zero) once `done` is high.
//
// Timing: the Set/Reset values for session s are on the outputs from the
// clock edge that starts session s. Sessions and weights follow the scheme;
// the session count, length and weight table are this design's choices.
module session_counter #(
  parameter int unsigned N            = qc_pkg::TPG_WIDTH,
  parameter int unsigned NUM_SESSIONS = 4,
  parameter int unsigned SESSION_LEN  = 32,
  localparam int unsigned SW = (NUM_SESSIONS > 1) ? $clog2(NUM_SESSIONS) : 1,
  localparam int unsigned LW = (SESSION_LEN > 1) ? $clog2(SESSION_LEN) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  output logic [N-1:0]  set_o,
  output logic [N-1:0]  reset_o,
  output logic [SW-1:0] session,
  output logic          done
);

  import qc_pkg::*;

  logic [LW-1:0] cycle_q;
  logic [SW-1:0] session_d;
  logic          done_d;
  logic [N-1:0]  set_d, reset_d;

  always_comb begin
    session_d = session;
    done_d    = done;
    if (step && !done && cycle_q == LW'(SESSION_LEN - 1)) begin
      if (session == SW'(NUM_SESSIONS - 1)) done_d = 1'b1;
      else                                  session_d = session + 1'b1;
    end
    for (int unsigned i = 0; i < N; i++) begin
      weight_e w;
      w          = done_d ? W_HALF : session_weight(int'(session_d), i);
      set_d[i]   = (w == W_ONE);
      reset_d[i] = (w == W_ZERO);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycle_q <= '0;
      session <= '0;
      done    <= 1'b0;
      set_o   <= '0;
      reset_o <= '0;
    end else begin
      if (step && !done)
        cycle_q <= (cycle_q == LW'(SESSION_LEN - 1)) ? '0 : cycle_q + 1'b1;
      session <= session_d;
      done    <= done_d;
      set_o   <= set_d;
      reset_o <= reset_d;
    end
  end

  a_weight_exclusive: assert property (@(posedge clk) disable iff (!rst_n) (set_o & reset_o) == '0)
    else $error("session_counter: a bit is both set and reset");

endmodule
