// qc_pkg: constants and types shared by the quasi-cyclic BIST pattern generator.
//
// The quasi-cyclic scheme shortens the high time of a logic-1 test value to one
// quarter of a test cycle. The logic therefore runs on a fast clock with
// QC_PHASES slots per test cycle. The slot count of four follows the quarter
// named by the scheme; the widths are this design's choice: nine pattern bits
// and eleven response bits match the interface of the ISCAS'89 s344 benchmark
// that the scheme was applied to.
//
// Each accumulator bit gets one of three weights per test session: 0 (bit held
// at 0 by its reset line), 1 (held at 1 by its set line) or 0.5 (free-running
// accumulator output). The per-session weight assignment below is this design's
// own default; the scheme only says that sessions use different weight sets.
package qc_pkg;

  localparam int unsigned QC_PHASES  = 4;
  localparam int unsigned TPG_WIDTH  = 9;
  localparam int unsigned RESP_WIDTH = 11;
  localparam int unsigned LT_WIDTH   = 8;
  localparam int unsigned CNT_WIDTH  = 16;

  typedef enum logic [1:0] {
    W_HALF = 2'b00,   // no set, no reset: accumulator output, probability 0.5
    W_ZERO = 2'b01,   // reset line active: A = 0, B = 1
    W_ONE  = 2'b10    // set line active:   A = 1, B = 0
  } weight_e;

  // Default weight of pattern bit `bit_idx` in session `session`.
  //   session 0: all bits weight 0.5
  //   session 1: even bits weight 1,   odd bits 0.5
  //   session 2: even bits weight 0,   odd bits 0.5
  //   session 3: odd bits weight 1,    even bits weight 0
  // Sessions beyond 3 repeat this cycle of four.
  function automatic weight_e session_weight(int unsigned session, int unsigned bit_idx);
    logic even;
    even = (bit_idx % 2) == 0;
    case (session % 4)
      1:       return even ? W_ONE  : W_HALF;
      2:       return even ? W_ZERO : W_HALF;
      3:       return even ? W_ZERO : W_ONE;
      default: return W_HALF;
    endcase
  endfunction

endpackage
