// stc_stage: one digit position of the self-timed converter.
//
// A stage is an FG cell (fg_cell), a 2-input NOR and a 2-input XNOR.
//   * The FG cell turns the digit and the flag from the right into the flag
//     for the left (see fg_cell).
//   * The NOR of the two output flag rails, pending, is 1 while this
//     position is unresolved and falls once its output flag is valid. The
//     converter's completion NOR collects these.
//   * The XNOR forms the result bit b = XNOR(g_in, ~a) = g_in ^ a: a zero
//     digit copies the incoming flag bit, a non-zero digit inverts it.
// The structure follows the converter's stage description. The top level
// leaves the XNOR of stage 0 and the NOR of the last stage unused, as the
// described circuit omits them; synthesis removes the unused gates.
//
// Timing: each gate has the delay TG (ps); b follows g_in by TG, pending
// follows the output flags by TG.
module stc_stage
  import rb2b_pkg::*;
#(
  parameter int unsigned TG = GATE_DELAY_PS
) (
  input  rb_digit_t d,        // digit of this stage
  input  logic      h,        // inhibit line
  input  logic      g_in,     // incoming flag, rail "1"
  input  logic      gs_in,    // incoming flag, rail "0"
  output logic      g_out,    // outgoing flag, rail "1"
  output logic      gs_out,   // outgoing flag, rail "0"
  output logic      b,        // result bit of this position
  output logic      pending   // 1 while the outgoing flag is unresolved
);
  timeunit 1ps;
  timeprecision 1ps;

  logic da_n;

  fg_cell #(.TG(TG)) u_fg (
    .d     (d),
    .h     (h),
    .g_in  (g_in),
    .gs_in (gs_in),
    .g_out (g_out),
    .gs_out(gs_out),
    .da_n  (da_n)
  );

  assign #(TG) pending = ~(g_out | gs_out);
  assign #(TG) b       = ~(g_in ^ da_n);
endmodule
