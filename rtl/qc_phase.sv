// qc_phase: slot counter that divides each test cycle into PHASES fast-clock
// slots.
//
// The quasi-cyclic encoder keeps a logic 1 high for one slot out of PHASES (a
// quarter of the test cycle for the default of four). This counter tells the
// other blocks where they are inside the test cycle: `slot0` is high in the
// first slot, `frame_end` in the last one. Both are decoded from a registered
// count, so they are stable for the whole fast-clock cycle.
//
// Timing: after reset the counter is in slot 0; it wraps every PHASES cycles.
// The slot count follows the scheme's quarter-cycle pulse; generating it from a
// fast clock (rather than from clock edges or delays) is this design's choice.
module qc_phase #(
  parameter int unsigned PHASES = qc_pkg::QC_PHASES,
  localparam int unsigned PW    = (PHASES > 1) ? $clog2(PHASES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [PW-1:0] phase,
  output logic          slot0,
  output logic          frame_end
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        phase <= '0;
    else if (phase == PW'(PHASES - 1)) phase <= '0;
    else                               phase <= phase + 1'b1;
  end

  assign slot0     = (phase == '0);
  assign frame_end = (phase == PW'(PHASES - 1));

endmodule
