// tb_stc_stage: exhaustive check of one converter stage.
//
// For every legal digit, every incoming flag code and both inhibit levels
// the stage's outputs are compared, after settling, with values written
// out here: the outgoing flag per the flag rules, pending = 1 exactly when
// the outgoing flag is (0,0), and the result bit b = g_in XOR a (a zero
// digit copies the incoming flag bit, a non-zero digit inverts it).
// It also times b (one gate after g_in) and pending (one gate after the
// outgoing flag).
module tb_stc_stage;
  import rb2b_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TG = GATE_DELAY_PS;

  rb_digit_t d;
  logic h, g_in, gs_in, g_out, gs_out, b, pending;
  int checks = 0, failures = 0;

  stc_stage dut (.d(d), .h(h), .g_in(g_in), .gs_in(gs_in), .g_out(g_out),
                 .gs_out(gs_out), .b(b), .pending(pending));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: d=(%b,%b) h=%b in=(%b,%b) out=(%b,%b) b=%b p=%b",
               what, $time, d.s, d.a, h, g_in, gs_in, g_out, gs_out, b, pending);
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
    for (int hv = 0; hv < 2; hv++)
      for (int di = 0; di < 3; di++)
        for (int fi = 0; fi < 3; fi++) begin
          h = hv[0]; d = digits[di]; {g_in, gs_in} = flags[fi];
          #(6 * TG);
          if (di == 0)       want = flags[fi];
          else if (!h)       want = 2'b00;
          else if (di == 1)  want = 2'b01;
          else               want = 2'b10;
          check({g_out, gs_out} == want, "flag");
          check(pending == (want == 2'b00), "pending");
          check(b == (g_in ^ d.a), "result bit");
        end

    // Timing of b and pending on a zero digit.
    h = 1; d = RB_ZERO; g_in = 0; gs_in = 0;
    #(10 * TG);
    check(pending == 1'b1 && b == 1'b0, "unresolved stage");
    g_in = 1;
    #(TG - 1);
    check(b == 1'b0, "b not before 1 gate delay");
    #1;
    check(b == 1'b1, "b one gate after g_in");
    #(TG - 1);
    check(pending == 1'b1, "pending held until flag resolves");
    #(TG);
    check(pending == 1'b1, "pending not before 3 gate delays");
    #1;
    check(pending == 1'b0, "pending falls 3 gate delays after g_in");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
