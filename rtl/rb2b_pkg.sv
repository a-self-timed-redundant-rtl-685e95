// rb2b_pkg: types and constants shared by the self-timed redundant-binary
// to two's-complement converter.
//
// A redundant-binary digit takes one of the values -1, 0, +1. It travels on
// two wires, a sign bit s and a magnitude bit a:
//     0 -> (s,a) = (0,0)     +1 -> (0,1)     -1 -> (1,1)
// The code (1,0) is not a digit; rb_valid() flags it. This encoding is the
// one the converter is built around. The gate delay constant is this
// design's own choice: the converter's timing is only ever stated in
// multiples of one gate delay, so any value works, and 100 ps gives round
// numbers in simulation.
package rb2b_pkg;
  timeunit 1ps;
  timeprecision 1ps;

  typedef struct packed {
    logic s;  // sign: 1 for the digit -1
    logic a;  // magnitude: 1 for a non-zero digit
  } rb_digit_t;

  localparam rb_digit_t RB_ZERO = '{s: 1'b0, a: 1'b0};
  localparam rb_digit_t RB_POS  = '{s: 1'b0, a: 1'b1};
  localparam rb_digit_t RB_NEG  = '{s: 1'b1, a: 1'b1};

  // Delay of one primitive gate (inverter, NAND, NOR, XNOR), in ps.
  localparam int unsigned GATE_DELAY_PS = 100;

  function automatic logic rb_valid(rb_digit_t d);
    return !(d.s && !d.a);
  endfunction
endpackage
