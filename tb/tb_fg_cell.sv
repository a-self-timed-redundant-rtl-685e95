// tb_fg_cell: exhaustive check of the flag generator cell.
//
// Every legal digit code, every flag code on (g_in, gs_in) and both levels
// of the inhibit line are applied; after the cell settles the outputs are
// compared with the rule table written out below (pass on a zero digit,
// regenerate on a non-zero digit while h = 1, clear a non-zero digit's
// output while h = 0). It then times the two delays the cell is specified
// by: a flag crosses a zero digit in 2 gate delays, and a non-zero digit
// produces its flag 2 gate delays after h rises.
module tb_fg_cell;
  import rb2b_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TG = GATE_DELAY_PS;

  rb_digit_t d;
  logic h, g_in, gs_in, g_out, gs_out, da_n;
  int checks = 0, failures = 0;

  fg_cell dut (.d(d), .h(h), .g_in(g_in), .gs_in(gs_in),
               .g_out(g_out), .gs_out(gs_out), .da_n(da_n));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: d=(%b,%b) h=%b in=(%b,%b) out=(%b,%b)",
               what, $time, d.s, d.a, h, g_in, gs_in, g_out, gs_out);
    end
  endtask

  initial begin : watchdog
    #(1000 * TG);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rb_digit_t digits[3] = '{RB_ZERO, RB_POS, RB_NEG};
  logic [1:0] flags[3] = '{2'b00, 2'b01, 2'b10};

  initial begin
    logic [1:0] want;
    d = RB_ZERO; h = 0; g_in = 0; gs_in = 0;
    #(10 * TG);
    // Exhaustive rule table.
    for (int hv = 0; hv < 2; hv++)
      for (int di = 0; di < 3; di++)
        for (int fi = 0; fi < 3; fi++) begin
          h = hv[0]; d = digits[di]; {g_in, gs_in} = flags[fi];
          #(5 * TG);
          if (di == 0)       want = flags[fi];           // zero digit: pass
          else if (!h)       want = 2'b00;               // inhibited
          else if (di == 1)  want = 2'b01;               // +1: flag bit 0
          else               want = 2'b10;               // -1: flag bit 1
          check({g_out, gs_out} == want, "rule table");
          check(da_n == ~d.a, "inverted magnitude");
        end

    // Pass delay: zero digit, h = 1, incoming flag (0,0) -> (1,0) -> ...
    h = 1; d = RB_ZERO; g_in = 0; gs_in = 0;
    #(10 * TG);
    g_in = 1;
    #(2 * TG - 1);
    check(g_out == 1'b0, "rail g not before 2 gate delays");
    #1;
    check(g_out == 1'b1, "rail g passes in 2 gate delays");
    g_in = 0;
    #(10 * TG);
    gs_in = 1;
    #(2 * TG - 1);
    check(gs_out == 1'b0, "rail gs not before 2 gate delays");
    #1;
    check(gs_out == 1'b1, "rail gs passes in 2 gate delays");

    // Generate delay from h with the digit settled.
    for (int di = 1; di < 3; di++) begin
      h = 0; g_in = 0; gs_in = 0; d = digits[di];
      #(10 * TG);
      check({g_out, gs_out} == 2'b00, "cleared while inhibited");
      h = 1;
      #(2 * TG - 1);
      check({g_out, gs_out} == 2'b00, "no flag before 2 gate delays");
      #1;
      check({g_out, gs_out} == (di == 1 ? 2'b01 : 2'b10), "flag in 2 gate delays");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
