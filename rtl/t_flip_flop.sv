// t_flip_flop: toggle flip-flop of the low-transition pattern generator.
//
// On each rising clock edge `data_out` inverts when `data_in` is 1 and holds
// otherwise, so the output changes at most once per clock and only when asked
// to. The active-high asynchronous `reset` clears it. The port names follow
// the generator's waveform; the reset polarity and value are this design's
// choices.
module t_flip_flop (
  input  logic clk,
  input  logic reset,
  input  logic data_in,
  output logic data_out
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)        data_out <= 1'b0;
    else if (data_in) data_out <= ~data_out;
  end

endmodule
