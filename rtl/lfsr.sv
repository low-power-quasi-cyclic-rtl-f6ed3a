// lfsr: 8-bit linear feedback shift register of the low-transition pattern
// generator, with a registered copy of its state on `dout`.
//
// Each clock the state `lfsr_reg` shifts left by one and the XOR of the tap
// bits enters bit 0; `dout` takes the previous state, so it lags `lfsr_reg` by
// one clock. With the default taps (bits 7, 5, 4, 3: x^8 + x^6 + x^5 + x^4 + 1)
// the register runs through all 255 non-zero states. This reproduces the
// published waveform sample dout = 11010000 alongside lfsr_reg = 10100000.
//
// Interface: the active-high asynchronous `reset` loads SEED
// into the state and clears `dout`. The width and the port names follow the
// waveform of the generator; taps, seed and shift direction are this design's
// choices, picked to match the printed sample.
module lfsr #(
  parameter int unsigned W    = qc_pkg::LT_WIDTH,
  parameter logic [W-1:0] TAPS = W'(8'hB8),
  parameter logic [W-1:0] SEED = W'(1)
) (
  input  logic         clk,
  input  logic         reset,
  output logic [W-1:0] dout,
  output logic [W-1:0] lfsr_reg
);

  logic fb;
  assign fb = ^(lfsr_reg & TAPS);

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      lfsr_reg <= SEED;
      dout     <= '0;
    end else begin
      lfsr_reg <= {lfsr_reg[W-2:0], fb};
      dout     <= lfsr_reg;
    end
  end

endmodule
