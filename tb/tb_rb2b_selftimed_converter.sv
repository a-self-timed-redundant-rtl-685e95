// tb_rb2b_selftimed_converter: end-to-end test of the 64-digit converter
// at its default parameters.
//
// Each conversion follows the four-phase handshake: h low with the new
// digits applied, a clearing time, h high, wait for done. The testbench
// checks
//   * while h is low: done = 0 and every flag cleared, seen at the outputs
//     as b[N] = 0 and b[i] = a_i (an unresolved flag reads as 0);
//   * done rises exactly once, at 2*TG*(k+2) after h, where k is the
//     longest flag passing worked out here from the digits;
//   * just after done, b equals D+ - D-, the positive digits minus the
//     negative digits as plain binary numbers, reduced to N+1 bits (an
//     evaluation that shares nothing with the converter's flag rule);
//   * b and done stay put until h falls.
// Patterns: all zeros (one flag crosses every stage), all +1 and all -1
// (no passing, largest and most negative values), alternating digits, a
// small number followed by a long zero run, and random digits.
// The mechanisms seen are counted and each must occur at least once.
module tb_rb2b_selftimed_converter;
  import rb2b_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N  = 64;
  localparam int unsigned TG = GATE_DELAY_PS;
  localparam int unsigned NRAND = 3000;

  rb_digit_t [N-1:0] d;
  logic h;
  logic [N:0] b;
  logic done;

  rb2b_selftimed_converter dut (.d(d), .h(h), .b(b), .done(done));

  int checks = 0, failures = 0;
  int done_edges = 0;
  // mechanism counters
  int n_clear = 0, n_gen_pos = 0, n_gen_neg = 0, n_pass = 0, n_nopass = 0;
  int n_full_pass = 0, n_neg = 0, n_pos = 0, n_zero = 0, n_on_time = 0;

  always @(posedge done) done_edges++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // D+ - D- in N+1 bits.
  function automatic logic [N:0] ref_value(input rb_digit_t [N-1:0] dd);
    logic [N:0] dp, dm;
    dp = '0;
    dm = '0;
    for (int i = 0; i < N; i++) begin
      if (dd[i] == RB_POS) dp[i] = 1'b1;
      if (dd[i] == RB_NEG) dm[i] = 1'b1;
    end
    return dp - dm;
  endfunction

  // Longest flag passing k over stages 0..N-2: a zero run ending at a
  // non-zero digit counts its length, a run from digit 0 one less.
  function automatic int longest_pass(input rb_digit_t [N-1:0] dd);
    int run, best;
    logic from_bottom;
    run = 0; best = 0; from_bottom = 1'b1;
    for (int i = 0; i <= N - 2; i++) begin
      if (dd[i].a) begin
        run = 0;
        from_bottom = 1'b0;
      end else begin
        run++;
        if ((from_bottom ? run - 1 : run) > best) best = from_bottom ? run - 1 : run;
      end
    end
    return best;
  endfunction

  task automatic convert(input rb_digit_t [N-1:0] dd);
    logic [N:0] want;
    int k;
    longint unsigned t_exp;
    logic cleared;
    h = 1'b0;
    d = dd;
    #(2 * TG * (N + 2));
    cleared = (done == 1'b0) && (b[N] == 1'b0);
    for (int i = 1; i < N; i++) if (b[i] != dd[i].a) cleared = 1'b0;
    check(cleared, "flags cleared while h is low");
    if (cleared) n_clear++;

    want  = ref_value(dd);
    k     = longest_pass(dd);
    t_exp = 2 * TG * (k + 2);
    done_edges = 0;
    h = 1'b1;
    #(t_exp - 1);
    check(done == 1'b0, "done not early");
    #1;
    check(done == 1'b1, "done on time");
    #1;
    check(b == want, "result value");
    if (done && b == want) n_on_time++;
    if (b != want && failures < 20)
      $display("  got %h want %h", b, want);
    #(2 * TG * (N + 2));
    check(done == 1'b1 && done_edges == 1, "done rises once and holds");
    check(b == want, "result holds");

    for (int i = 0; i < N; i++) begin
      if (dd[i] == RB_POS) n_gen_pos++;
      if (dd[i] == RB_NEG) n_gen_neg++;
    end
    if (k > 0) n_pass++; else n_nopass++;
    if (k == N - 2) n_full_pass++;
    if (want == '0) n_zero++;
    else if (want[N]) n_neg++;
    else n_pos++;
  endtask

  task automatic mech(input int count, input string name);
    $display("  %-28s %0d", name, count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", name);
    end
  endtask

  initial begin : watchdog
    #(longint'(NRAND + 20) * 2 * TG * (3 * N + 8));
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rb_digit_t [N-1:0] dd;
    h = 1'b0;
    d = '0;

    dd = '0;                        convert(dd);   // zero: full-length pass
    for (int i = 0; i < N; i++) dd[i] = RB_POS;  convert(dd);
    for (int i = 0; i < N; i++) dd[i] = RB_NEG;  convert(dd);
    for (int i = 0; i < N; i++) dd[i] = i[0] ? RB_NEG : RB_POS;  convert(dd);
    for (int i = 0; i < N; i++) dd[i] = i[0] ? RB_ZERO : RB_NEG; convert(dd);
    // -78 written as (-1 0 -1 0 0 1 0) in the low digits, zeros above
    dd = '0; dd[1] = RB_POS; dd[4] = RB_NEG; dd[6] = RB_NEG;     convert(dd);
    // a single -1 at the top of N-1 zeros
    dd = '0; dd[N-1] = RB_NEG;                                   convert(dd);
    // a single +1 at the bottom, zeros above
    dd = '0; dd[0] = RB_POS;                                     convert(dd);
    for (int n = 0; n < NRAND; n++) begin
      for (int i = 0; i < N; i++)
        case ($urandom_range(2, 0))
          0: dd[i] = RB_ZERO;
          1: dd[i] = RB_POS;
          default: dd[i] = RB_NEG;
        endcase
      convert(dd);
    end

    $display("mechanisms:");
    mech(n_clear,     "flags cleared by inhibit");
    mech(n_gen_pos,   "flag generated at +1");
    mech(n_gen_neg,   "flag generated at -1");
    mech(n_pass,      "flag passed over zeros");
    mech(n_nopass,    "no flag passing");
    mech(n_full_pass, "flag passed over all stages");
    mech(n_on_time,   "completion on time");
    mech(n_pos,       "positive result");
    mech(n_neg,       "negative result");
    mech(n_zero,      "zero result");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
