// rb2b_selftimed_converter: self-timed converter from an N-digit
// redundant-binary number to an (N+1)-bit two's-complement number.
//
// Conversion rule. Scan the digits from the least significant end with a
// flag bit g, starting from g_0 = 0:
//     digit 0  : b_i = g_i,   g_{i+1} = g_i
//     digit +1 : b_i = ~g_i,  g_{i+1} = 0
//     digit -1 : b_i = ~g_i,  g_{i+1} = 1
// and finally b_N = g_N (the sign bit). Every non-zero digit starts a fresh
// flag, so a flag only travels across a run of zero digits. All runs are
// handled at the same time, and the result is ready once the longest run
// has been crossed, not after N stages.
//
// Structure. N stc_stage instances are chained from digit 0 (right) to
// digit N-1 (left). The flag is carried on two rails (g, gs) so that
// "not resolved yet" (0,0) differs from the two flag values, and each
// stage's pending output tells whether that stage has resolved. A wide NOR
// (completion_nor) over the pending signals of stages 0..N-2 raises done.
// The pending output of stage N-1 is not watched: its flag resolves
// 2 gate delays after that of stage N-2, which is no later than done.
// The result bits are:
//     b[0]   = a of digit 0 (the incoming flag of stage 0 is always 0)
//     b[i]   = XNOR(g_i, ~a_i), i = 1..N-1, from stage i
//     b[N]   = g_N, the flag rail "1" leaving the last stage.
//
// Handshake (four-phase, bundled data):
//   1. With h = 0 all flags are cleared to (0,0); done falls. Apply the
//      digits d while h = 0 and hold h low long enough for the clearing to
//      ripple through the longest zero run: 2*TG per stage, so
//      2*TG*(N+1) covers any input.
//   2. Raise h. The initial flag of stage 0 is g_0 = 0 and gs_0 = h, so the
//      right end starts resolving when h rises. Flags start at non-zero
//      digits and cross zero runs at 2*TG per digit.
//   3. done rises when all watched stages are resolved; b is then valid
//      (b[N] and b[N-1] settle no later than done itself). Keep d stable
//      while h = 1.
//   4. Lower h to start the next conversion.
// With digits stable before h rises, done follows h by
//     2*TG*(k+2), k = longest flag passing among stages 0..N-2,
// where a run of zeros that ends at a non-zero digit counts its length and
// a run that starts at digit 0 counts one less (its flag is ready with h).
//
// What follows the converter's description: the conversion rule, the
// digit encoding, the two-rail flag with inhibit line H, the FG cell
// equations, one NOR and one XNOR per stage, the omitted XNOR on digit 0
// and NOR on digit N-1, b_N = g_N, the N-input completion NOR (here
// N-1 inputs, as the last stage's NOR is omitted), and the 64-digit size.
// This design's own choices: gs_0 is driven by h, which is what lets all
// flags clear while h is low; the 100 ps gate delay; the setup and
// clearing times above.
module rb2b_selftimed_converter
  import rb2b_pkg::*;
#(
  parameter int unsigned N  = 64,             // number of digits, >= 2
  parameter int unsigned TG = GATE_DELAY_PS   // delay of one gate, ps
) (
  input  rb_digit_t [N-1:0] d,     // digits, d[0] least significant
  input  logic              h,     // inhibit: 0 clear, 1 convert
  output logic [N:0]        b,     // two's-complement result, b[N] = sign
  output logic              done   // completion: b is valid
);
  timeunit 1ps;
  timeprecision 1ps;

  logic [N:0]   g, gs;        // two-rail flags between the stages; gs[N] is not used
  logic [N-1:0] b_stage;      // XNOR outputs; b_stage[0] is not used
  logic [N-1:0] pending;      // NOR outputs; pending[N-1] is not used

  assign g[0]  = 1'b0;
  assign gs[0] = h;

  for (genvar i = 0; i < N; i++) begin : g_stage
    stc_stage #(.TG(TG)) u_stage (
      .d      (d[i]),
      .h      (h),
      .g_in   (g[i]),
      .gs_in  (gs[i]),
      .g_out  (g[i+1]),
      .gs_out (gs[i+1]),
      .b      (b_stage[i]),
      .pending(pending[i])
    );
  end

  assign b[0]     = d[0].a;
  assign b[N-1:1] = b_stage[N-1:1];
  assign b[N]     = g[N];

  completion_nor #(.WIDTH(N - 1), .TG(TG)) u_done (
    .pending(pending[N-2:0]),
    .done   (done)
  );

  // Every digit must use one of the three codes when a conversion starts.
  always @(posedge h) begin : chk_digits
    for (int i = 0; i < N; i++) begin
      assert (rb_valid(d[i]))
        else $error("digit %0d has the unused code (s,a) = (1,0)", i);
    end
  end
endmodule
