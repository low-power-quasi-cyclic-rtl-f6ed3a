// qc_encoder: quasi-cyclic encoder. Each logic-1 test value is sent as a
// "quasi 1": a pulse that is high for only one of the PHASES slots of a test
// cycle (a quarter of it by default); a logic 0 stays low. Shortening the high
// time of the test lines is what lowers their static and switching power.
//
// Operation: at the clock edge that ends a test cycle (`frame_end` high) the
// encoder captures `din`; in the following slot (slot 0 of the next test
// cycle) `enc_out` shows the captured value, and for the remaining slots it is
// zero. The output is registered, so the pulses are glitch-free.
//
// Timing: a value present on `din` during the last slot of test cycle k
// appears as a one-slot pulse at the start of test cycle k+1.
// The quarter-length pulse follows the scheme; placing it in the first slot
// and capturing at the end of the previous cycle are this design's choices.
module qc_encoder #(
  parameter int unsigned W = qc_pkg::TPG_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         frame_end,
  input  logic [W-1:0] din,
  output logic [W-1:0] enc_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         enc_out <= '0;
    else if (frame_end) enc_out <= din;
    else                enc_out <= '0;
  end

endmodule
