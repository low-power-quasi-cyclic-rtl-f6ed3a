// acc_cell: one bit of the 3-weight accumulator test pattern generator.
//
// The cell is a full adder and two D flip-flops: A[i] holds the sum bit and
// feeds back to one adder input, B[i] (the driving register's bit) feeds the
// other. Set[i] and Reset[i] are asynchronous, active high:
//   set_i   : A[i] = 1, B[i] = 0
//   reset_i : A[i] = 0, B[i] = 1
// In both cases A[i] = NOT B[i], and the full adder's carry out equals its
// carry in (rows 2, 3, 6, 7 of the full-adder truth table), so a forced bit
// passes the carry on unchanged and holds its output at weight 1 or 0. With
// neither line active the cell is an ordinary accumulator bit (weight 0.5).
//
// Interface and timing: `load_b` loads B[i] from `b_in`, `step` loads A[i]
// with the sum bit, both on the rising clock edge; the carry path is purely
// combinational. `rst_n` clears both flip-flops. The structure and the set /
// reset polarity follow the scheme; how B[i] is loaded when not forced and the
// global reset are this design's choices.
module acc_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic set_i,
  input  logic reset_i,
  input  logic load_b,
  input  logic b_in,
  input  logic step,
  input  logic cin,
  output logic cout,
  output logic a,
  output logic b
);

  logic sum;

  // Full adder.
  assign sum  = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);

  // Register A bit: set -> 1, reset -> 0.
  always_ff @(posedge clk or negedge rst_n or posedge set_i or posedge reset_i) begin
    if (!rst_n)       a <= 1'b0;
    else if (set_i)   a <= 1'b1;
    else if (reset_i) a <= 1'b0;
    else if (step)    a <= sum;
  end

  // Register B bit: set -> 0, reset -> 1 (the complement of A).
  always_ff @(posedge clk or negedge rst_n or posedge set_i or posedge reset_i) begin
    if (!rst_n)       b <= 1'b0;
    else if (set_i)   b <= 1'b0;
    else if (reset_i) b <= 1'b1;
    else if (load_b)  b <= b_in;
  end

  // Set and reset select one weight each; both at once is not a valid code.
  a_set_reset_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(set_i && reset_i))
    else $error("acc_cell: set and reset active together");

endmodule
