// qc_decoder: quasi-cyclic decoder. Restores a full-length test value from a
// low on-time one: a bit that is high in any slot of a test cycle is read as
// logic 1 and held for the whole of the next test cycle.
//
// Two registers per bit: `seen_q` collects (ORs) the input over the slots of
// the current test cycle; at the edge that ends the cycle (`frame_end` high)
// the collected value, including the input of the last slot, moves to `dout`
// and `seen_q` is cleared.
//
// Timing: the value received during test cycle k is on `dout` for all of test
// cycle k+1. A level input (high for a whole cycle) decodes the same as a
// quarter pulse. The two-register structure matches the two flip-flop outputs
// listed in the decoder's waveform; OR-collection over the cycle is this
// design's choice.
module qc_decoder #(
  parameter int unsigned W = qc_pkg::RESP_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         frame_end,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  logic [W-1:0] seen_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen_q <= '0;
      dout   <= '0;
    end else if (frame_end) begin
      dout   <= seen_q | din;
      seen_q <= '0;
    end else begin
      seen_q <= seen_q | din;
    end
  end

endmodule
