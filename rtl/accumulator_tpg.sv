// accumulator_tpg: 3-weight accumulator-based test pattern generator.
//
// N acc_cell bits form register B, a ripple-carry adder and register A. Each
// test cycle register A takes A + B + cin; A[n-1:0] is the test pattern. The
// session counter drives each bit's Set/Reset line: a set bit is held at 1, a
// reset bit at 0, and because a forced cell has A = NOT B its carry out equals
// its carry in, so the free bits above it still see the real carry and keep
// producing pseudo-random values (weight 0.5).
//
// Register B is the generator's input: it is loaded from `b_in` when
// `load_b` is high. In the quasi-cyclic system `b_in` is the encoder's
// quarter-cycle pulse, and `load_b` is high in the slot where that pulse is
// present. `step` (once per test cycle) advances register A and the session
// counter. Reset is asynchronous and active low.
//
// Timing: the pattern changes one clock after `step`; a value loaded into B
// is added at the next `step`. The cell structure, adder and session counter
// follow the scheme; loading B from the generator input and the carry input
// being a port are this design's choices.
module accumulator_tpg #(
  parameter int unsigned N            = qc_pkg::TPG_WIDTH,
  parameter int unsigned NUM_SESSIONS = 4,
  parameter int unsigned SESSION_LEN  = 32,
  localparam int unsigned SW = (NUM_SESSIONS > 1) ? $clog2(NUM_SESSIONS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load_b,
  input  logic [N-1:0]  b_in,
  input  logic          step,
  input  logic          cin,
  output logic [N-1:0]  pattern,
  output logic [N-1:0]  reg_b,
  output logic [SW-1:0] session,
  output logic          done
);

  logic [N-1:0] set_v, reset_v;
  logic [N:0]   carry;

  session_counter #(
    .N(N), .NUM_SESSIONS(NUM_SESSIONS), .SESSION_LEN(SESSION_LEN)
  ) u_session (
    .clk, .rst_n, .step,
    .set_o(set_v), .reset_o(reset_v), .session, .done
  );

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_cell
    acc_cell u_cell (
      .clk, .rst_n,
      .set_i  (set_v[i]),
      .reset_i(reset_v[i]),
      .load_b,
      .b_in   (b_in[i]),
      .step,
      .cin    (carry[i]),
      .cout   (carry[i+1]),
      .a      (pattern[i]),
      .b      (reg_b[i])
    );
  end

endmodule
