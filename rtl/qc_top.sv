// qc_top: low-power BIST test pattern generator built on the quasi-cyclic
// approach.
//
// Data path, in test-cycle order (one test cycle = PHASES fast clocks):
//   johnson_counter -> qc_encoder -> accumulator_tpg -> CUT (outside)
//   -> qc_decoder -> analysis_circuit
// The Johnson counter supplies single-input-change test values. The encoder
// sends every logic 1 as a pulse one slot (a quarter of a test cycle) long.
// The accumulator generator samples that pulse into its register B in slot 0
// and, once per test cycle, adds B into register A; session-dependent
// Set/Reset lines force bits to weight 0 or 1. Register A is the pattern that
// drives the circuit under test. The circuit's response and a fault-free
// reference response come back in and are each decoded to full-cycle values;
// the analysis circuit compares them once per test cycle.
//
// Beside this path sit the LFSR and T flip-flop of the low-transition pattern
// generator, with their own ports; they share only clock and reset.
//
// Control: test cycles advance while `test_en` is high and the session counter
// has not finished; `test_done` then rises. The decoders and the comparison
// keep running while `test_en` is high so that the last responses are
// checked. All registers reset asynchronously on `rst_n` low.
//
// Latency: a Johnson value on the counter in test cycle k is added into the
// pattern at the end of cycle k+1; that pattern drives the CUT in cycle k+2;
// its decoded response is compared at the end of cycle k+3.
// The chain follows the scheme's block diagram; the fast-clock slot timing,
// the widths (s344-sized: 9 pattern bits, 11 response bits) and the control
// are this design's choices.
module qc_top #(
  parameter int unsigned N            = qc_pkg::TPG_WIDTH,
  parameter int unsigned M            = qc_pkg::RESP_WIDTH,
  parameter int unsigned PHASES       = qc_pkg::QC_PHASES,
  parameter int unsigned NUM_SESSIONS = 4,
  parameter int unsigned SESSION_LEN  = 32,
  localparam int unsigned CW = qc_pkg::CNT_WIDTH,
  localparam int unsigned LW = qc_pkg::LT_WIDTH,
  localparam int unsigned SW = (NUM_SESSIONS > 1) ? $clog2(NUM_SESSIONS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_en,
  input  logic          cin,
  // circuit under test
  output logic [N-1:0]  cut_pattern,
  input  logic [M-1:0]  cut_resp,
  input  logic [M-1:0]  ref_resp,
  // observation
  output logic [N-1:0]  jc_value,
  output logic [N-1:0]  enc_value,
  output logic [N-1:0]  reg_b,
  output logic [SW-1:0] session,
  output logic [M-1:0]  resp_dec,
  output logic [M-1:0]  ref_dec,
  output logic          fail,
  output logic [CW-1:0] mismatch_count,
  output logic [CW-1:0] compare_count,
  output logic          test_done,
  // low-transition generator pair
  output logic [LW-1:0] lt_dout,
  output logic [LW-1:0] lt_state,
  input  logic          tff_in,
  output logic          tff_out
);

  logic slot0, frame_end, run;

  qc_phase #(.PHASES(PHASES)) u_phase (
    .clk, .rst_n, .phase(), .slot0, .frame_end
  );

  assign run = test_en && !test_done;

  johnson_counter #(.N(N)) u_jc (
    .clk, .rst_n, .en(frame_end && run), .q(jc_value)
  );

  qc_encoder #(.W(N)) u_enc (
    .clk, .rst_n, .frame_end, .din(jc_value), .enc_out(enc_value)
  );

  accumulator_tpg #(
    .N(N), .NUM_SESSIONS(NUM_SESSIONS), .SESSION_LEN(SESSION_LEN)
  ) u_tpg (
    .clk, .rst_n,
    .load_b (slot0 && run),
    .b_in   (enc_value),
    .step   (frame_end && run),
    .cin,
    .pattern(cut_pattern),
    .reg_b,
    .session,
    .done   (test_done)
  );

  qc_decoder #(.W(M)) u_dec (
    .clk, .rst_n, .frame_end, .din(cut_resp), .dout(resp_dec)
  );

  qc_decoder #(.W(M)) u_dec_ref (
    .clk, .rst_n, .frame_end, .din(ref_resp), .dout(ref_dec)
  );

  analysis_circuit #(.W(M), .CW(CW)) u_ana (
    .clk, .rst_n,
    .en      (frame_end && test_en),
    .resp    (resp_dec),
    .ref_resp(ref_dec),
    .fail, .mismatch_count, .compare_count
  );

  lfsr #(.W(LW)) u_lfsr (
    .clk, .reset(!rst_n), .dout(lt_dout), .lfsr_reg(lt_state)
  );

  t_flip_flop u_tff (
    .clk, .reset(!rst_n), .data_in(tff_in), .data_out(tff_out)
  );

endmodule
