// tb_rb2b_exhaustive7: every 7-digit redundant-binary number (3^7 = 2187
// inputs) through a 7-digit converter.
//
// Starts with the worked example (-1 0 -1 0 0 +1 0) = -78, whose 8-bit
// result must be 1011_0010, then sweeps all inputs. For each, the result
// is compared with the signed sum of d_i * 2^i, and the completion time
// with 2*TG*(k+2), k being the longest flag passing over stages 0..5 (a
// zero run that reaches digit 0 counts one less).
module tb_rb2b_exhaustive7;
  import rb2b_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N  = 7;
  localparam int unsigned TG = GATE_DELAY_PS;

  rb_digit_t [N-1:0] d;
  logic h;
  logic [N:0] b;
  logic done;
  longint t_rise, t_done;

  rb2b_selftimed_converter #(.N(N)) dut (.d(d), .h(h), .b(b), .done(done));

  int checks = 0, failures = 0;

  always @(posedge done) t_done = $time;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t: b=%b", what, $time, b);
    end
  endtask

  task automatic convert(input rb_digit_t [N-1:0] dd, output logic [N:0] res,
                         output longint lat);
    h = 1'b0;
    d = dd;
    #(2 * TG * (N + 2));
    check(done == 1'b0, "done low while inhibited");
    t_done = -1;
    t_rise = $time;
    h = 1'b1;
    #(2 * TG * (N + 3));
    res = b;
    lat = t_done - t_rise;
  endtask

  initial begin : watchdog
    #(3000 * 4 * TG * (N + 4));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rb_digit_t [N-1:0] dd;
    logic [N:0] res;
    longint lat;
    int code, v, run, k;
    logic bottom;
    h = 1'b0;
    d = '0;

    // Worked example: digits d6..d0 = -1 0 -1 0 0 +1 0.
    dd = '{RB_NEG, RB_ZERO, RB_NEG, RB_ZERO, RB_ZERO, RB_POS, RB_ZERO};
    convert(dd, res, lat);
    check(res == 8'b1011_0010, "worked example -78");
    check(lat == 2 * TG * (2 + 2), "worked example latency");

    for (int n = 0; n < 2187; n++) begin
      code = n;
      v = 0;
      for (int i = 0; i < N; i++) begin
        case (code % 3)
          0: dd[i] = RB_ZERO;
          1: begin dd[i] = RB_POS; v += (1 << i); end
          default: begin dd[i] = RB_NEG; v -= (1 << i); end
        endcase
        code /= 3;
      end
      run = 0; k = 0; bottom = 1'b1;
      for (int i = 0; i <= N - 2; i++) begin
        if (dd[i].a) begin run = 0; bottom = 1'b0; end
        else begin
          run++;
          if ((bottom ? run - 1 : run) > k) k = bottom ? run - 1 : run;
        end
      end
      convert(dd, res, lat);
      check($signed(res) == v, "value");
      check(lat == 2 * TG * (k + 2), "completion time");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
