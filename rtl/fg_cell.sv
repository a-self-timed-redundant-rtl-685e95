// fg_cell: flag generator of one converter stage.
//
// The cell works on a two-rail flag (g, gs). (0,0) means "this position has
// not been resolved yet", (0,1) means "resolved, flag bit 0" and (1,0) means
// "resolved, flag bit 1". While the inhibit line h is low the generate
// terms are off, so once the flag from the right is also (0,0) the cell
// outputs (0,0). With h high:
//     digit  0 : (g_out, gs_out) = (g_in, gs_in)   the flag passes through
//     digit +1 : (g_out, gs_out) = (0, 1)          a new flag starts here
//     digit -1 : (g_out, gs_out) = (1, 0)
// In Boolean form
//     g_out  = s & h        | ~a & g_in
//     gs_out = ~s & a & h   | ~a & gs_in
// built, as the cell is described, from two inverters (on s and a) and six
// NAND gates, three per rail: a generate NAND, a pass NAND and an output
// NAND. The inverted magnitude da_n is also an output, because the stage's
// XNOR uses it. The equations, the gate count and the two-rail code follow
// the converter's description; the arity of each NAND (a 2-input one for
// the s & h term, a 3-input one for ~s & a & h) is this design's choice.
//
// Timing: every gate has the delay TG (ps). With the digit settled before h
// rises, a flag leaves a non-zero digit 2*TG after h rises, and passes a
// zero digit in 2*TG (pass NAND, then output NAND). From a digit change the
// cell needs 3*TG (inverter, NAND, NAND). Synthesis ignores the delays.
module fg_cell
  import rb2b_pkg::*;
#(
  parameter int unsigned TG = GATE_DELAY_PS
) (
  input  rb_digit_t d,       // digit of this stage
  input  logic      h,       // inhibit: 0 clears, 1 lets the flags run
  input  logic      g_in,    // flag rail "1" from the stage to the right
  input  logic      gs_in,   // flag rail "0" from the stage to the right
  output logic      g_out,   // flag rail "1" to the stage to the left
  output logic      gs_out,  // flag rail "0" to the stage to the left
  output logic      da_n     // inverted magnitude bit, for the stage XNOR
);
  timeunit 1ps;
  timeprecision 1ps;

  logic ds_n;
  logic gen1_n, pass1_n;  // rail g
  logic gen0_n, pass0_n;  // rail gs

  assign #(TG) ds_n    = ~d.s;
  assign #(TG) da_n    = ~d.a;

  assign #(TG) gen1_n  = ~(d.s & h);
  assign #(TG) pass1_n = ~(da_n & g_in);
  assign #(TG) g_out   = ~(gen1_n & pass1_n);

  assign #(TG) gen0_n  = ~(ds_n & d.a & h);
  assign #(TG) pass0_n = ~(da_n & gs_in);
  assign #(TG) gs_out  = ~(gen0_n & pass0_n);
endmodule
