// tb_completion_nor: checks the completion NOR at its default width.
//
// Applies all-pending, none-pending, every single pending stage and random
// patterns, and compares done with "no input is 1". Also checks that done
// rises exactly one gate delay after the last pending input falls.
module tb_completion_nor;
  import rb2b_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TG = GATE_DELAY_PS;
  localparam int unsigned W  = 63;

  logic [W-1:0] pending;
  logic done;
  int checks = 0, failures = 0;

  completion_nor dut (.pending(pending), .done(done));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: pending=%h done=%b", what, $time, pending, done);
    end
  endtask

  task automatic apply(input logic [W-1:0] p);
    logic want;
    pending = p;
    #(2 * TG);
    want = 1'b1;
    for (int i = 0; i < W; i++) if (p[i]) want = 1'b0;
    check(done == want, "done level");
  endtask

  initial begin : watchdog
    #(100000 * TG);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('1);
    apply('0);
    for (int i = 0; i < W; i++) apply(W'(1) << i);
    for (int i = 0; i < 200; i++) apply({$urandom, $urandom});
    for (int i = 0; i < 200; i++) apply({$urandom, $urandom} & {$urandom, $urandom} & {$urandom, $urandom});

    // Timing: last pending input falls, done follows one gate later.
    pending = '0;
    pending[W-1] = 1'b1;
    #(2 * TG);
    pending[W-1] = 1'b0;
    #(TG - 1);
    check(done == 1'b0, "done not before one gate delay");
    #1;
    check(done == 1'b1, "done one gate delay after the last input");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
