// analysis_circuit: response analyser of the BIST scheme. A faulty circuit
// answers the test patterns differently from a fault-free one; this block
// compares the decoded response of the circuit under test with the fault-free
// response once per test cycle.
//
// On each clock with `en` high it counts one comparison and, if `resp` and
// `ref_resp` differ in any bit, one mismatch and sets the sticky `fail` flag.
// Both counters saturate at all ones. Reset is asynchronous, active low.
//
// Timing: the counters and `fail` reflect a comparison one clock after `en`.
// Comparing against a reference response follows the scheme's description of
// fault / fault-free analysis; counting and the sticky flag are this design's
// choices.
module analysis_circuit #(
  parameter int unsigned W  = qc_pkg::RESP_WIDTH,
  parameter int unsigned CW = qc_pkg::CNT_WIDTH
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [W-1:0]  resp,
  input  logic [W-1:0]  ref_resp,
  output logic          fail,
  output logic [CW-1:0] mismatch_count,
  output logic [CW-1:0] compare_count
);

  logic differ;
  assign differ = (resp != ref_resp);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fail           <= 1'b0;
      mismatch_count <= '0;
      compare_count  <= '0;
    end else if (en) begin
      if (compare_count != '1) compare_count <= compare_count + 1'b1;
      if (differ) begin
        fail <= 1'b1;
        if (mismatch_count != '1) mismatch_count <= mismatch_count + 1'b1;
      end
    end
  end

endmodule
