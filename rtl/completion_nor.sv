// completion_nor: the converter's completion detector.
//
// A single wide NOR over the stages' pending signals: done rises when no
// stage is still unresolved. Because the two-rail flags only move from
// (0,0) to a resolved code while the inhibit line is high, every pending
// input only falls during a conversion, so done rises once, without
// glitches, when the last stage resolves. It falls again soon after the
// inhibit line is pulled low. Modelled as one gate with the delay TG (ps),
// the same delay as every other gate, which is the timing model the
// converter's delay estimates use. WIDTH is the number of stages that are
// watched: one less than the digit count, as the last stage is not
// watched (see rb2b_selftimed_converter).
module completion_nor
  import rb2b_pkg::*;
#(
  parameter int unsigned WIDTH = 63,
  parameter int unsigned TG    = GATE_DELAY_PS
) (
  input  logic [WIDTH-1:0] pending,  // 1 = that stage is still unresolved
  output logic             done      // 1 = every watched stage is resolved
);
  timeunit 1ps;
  timeprecision 1ps;

  assign #(TG) done = ~|pending;
endmodule
