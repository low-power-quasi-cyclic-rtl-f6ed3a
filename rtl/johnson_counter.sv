// johnson_counter: N-bit twisted-ring (Johnson) counter, the source of the
// test values that enter the quasi-cyclic encoder.
//
// On each enabled clock the register shifts left by one and the inverted MSB
// enters at bit 0. From all zeros it runs through 2*N states, changing exactly
// one bit per step, so consecutive test values are single-input-change vectors.
//
// Interface: `en` advances the counter by one step on the rising clock edge;
// `q` is the registered state. Reset (asynchronous, active low) clears it to
// zero. The counter type follows the scheme; its width, shift direction and
// reset value are this design's choices.
module johnson_counter #(
  parameter int unsigned N = qc_pkg::TPG_WIDTH
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [N-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= {q[N-2:0], ~q[N-1]};
  end

endmodule
