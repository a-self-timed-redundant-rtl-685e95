// tb_rb2b_flag_statistics: average conversion time of random numbers for
// 8, 16, 32 and 64 digits.
//
// Each converter converts NSAMP (10,000) random numbers whose digits are
// drawn uniformly from {-1, 0, +1}. The completion time t (from h rising to done rising)
// is measured, and the flag passing it stands for is L = t/(2*TG) - 2.
// The average of L is compared with the published averages of the
// longest run of zero digits for 10,000 samples (1.502, 2.139, 2.769,
// 3.412 for 8, 16, 32, 64 digits), within 0.1, and must stay under the
// bound log3(n). Every result is also checked against D+ - D-. Printed
// for reference: n/L, and the ratio of a ripple chain's (2n+1) gate
// delays to the measured average time.
module tb_rb2b_flag_statistics;
  import rb2b_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned TG    = GATE_DELAY_PS;
  localparam int unsigned NSIZES = 4;
  localparam int unsigned SIZES[NSIZES] = '{8, 16, 32, 64};
  localparam int unsigned NSAMP[NSIZES] = '{10000, 10000, 10000, 10000};
  localparam real TABLE_10K[NSIZES] = '{1.502, 2.139, 2.769, 3.412};

  int checks = 0, failures = 0;
  int finished = 0;
  real avg_l[NSIZES];

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  for (genvar s = 0; s < NSIZES; s++) begin : g_size
    localparam int unsigned N = SIZES[s];
    rb_digit_t [N-1:0] d;
    logic h;
    logic [N:0] b;
    logic done;
    longint t_done;

    rb2b_selftimed_converter #(.N(N)) dut (.d(d), .h(h), .b(b), .done(done));

    always @(posedge done) t_done = $time;

    initial begin
      logic [N:0] dp, dm;
      longint t_rise;
      real sum;
      sum = 0.0;
      h = 1'b0;
      d = '0;
      for (int n = 0; n < NSAMP[s]; n++) begin
        dp = '0;
        dm = '0;
        for (int i = 0; i < N; i++)
          case ($urandom_range(2, 0))
            0: d[i] = RB_ZERO;
            1: begin d[i] = RB_POS; dp[i] = 1'b1; end
            default: begin d[i] = RB_NEG; dm[i] = 1'b1; end
          endcase
        #(2 * TG * (N + 2));
        t_done = -1;
        t_rise = $time;
        h = 1'b1;
        #(2 * TG * (N + 3));
        check(done == 1'b1 && t_done > t_rise, "completion");
        check(b == dp - dm, "value");
        sum += real'(t_done - t_rise) / real'(2 * TG) - 2.0;
        h = 1'b0;
      end
      avg_l[s] = sum / NSAMP[s];
      finished++;
    end
  end

  initial begin : watchdog
    #(longint'(10010) * 2 * TG * (2 * 64 + 40));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real bound, diff;
    wait (finished == NSIZES);
    for (int s = 0; s < NSIZES; s++) begin
      bound = $ln(real'(SIZES[s])) / $ln(3.0);
      diff = avg_l[s] - TABLE_10K[s];
      $display("n=%0d: average flag passing %.3f (published %.3f, bound %.2f), n/L %.2f, ripple time / measured time %.2f",
               SIZES[s], avg_l[s], TABLE_10K[s], bound, real'(SIZES[s]) / avg_l[s],
               real'(2 * SIZES[s] + 1) / (2.0 * avg_l[s] + 4.0));
      check(diff < 0.1 && diff > -0.1, "average flag passing");
      check(avg_l[s] < bound, "average under log3(n)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
