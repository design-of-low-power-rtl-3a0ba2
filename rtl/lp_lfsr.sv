// lp_lfsr: datapath of the low power LFSR (LP-LFSR).
//
// An external-XOR LFSR of WIDTH flip-flops FF1..FFn is cut into a first
// half FF1..FF(HALF) and a second half FF(HALF+1)..FFn, each with its own
// clock enable (en1, en2). A holding flip-flop sits between the halves: it
// is loaded from the last stage of the first half whenever the first half
// shifts, and it feeds the first stage of the second half, so the second
// half later shifts in the value the first half had before its own shift.
// Shifting is "to the right": FF(i+1) takes FF(i); FF1 takes the XOR of the
// stages selected by TAPS.
//
// For every flip-flop an injection circuit compares the current value (its
// output) with the next value (its D input). Where they agree it passes the
// bit; where they differ it passes R, the output of the last stage FFn.
// Two output selectors then choose, per half, between the flip-flop outputs
// (sel = 1) and the injection outputs (sel = 0). Cycling en1/en2/sel1/sel2
// as lp_tpg_ctrl does yields the LFSR pattern followed by three intermediate
// patterns in which every primary input changes at most once.
//
// Bit order: pattern[WIDTH-1] is output O1 (from FF1), pattern[0] is On (from
// FFn); state q uses the same order. TAPS bit k selects the flip-flop that
// drives pattern[k]. The thesis's 8-bit example uses feedback from FF8 and
// FF1 (TAPS = 8'b1000_0001) and seed 0100_1011. Its 36-bit generator gives
// no taps or seed: the defaults here (FF36 and FF25, an arbitrary non-zero
// seed) are this design's choice.
//
// ZERO_STATE = 1 adds the correction that lets an LFSR also pass through the
// all-zeros state: the feedback is inverted while FF1..FF(n-1) are all zero,
// extending the period from 2^n - 1 to 2^n with a primitive TAPS. The thesis
// asks for taps that generate all zeros as well, but its schematic and
// example use the plain XOR, so the default is 0. The correction looks at
// the current flip-flops when the first half shifts; the second half has
// shifted by then, so they hold the n newest bits of the sequence.
//
// Timing: the register updates on the rising clock edge when en1 or en2 is
// high; `pattern` is combinational from the state and the select inputs.
// `reset` is asynchronous and active high and loads SEED; the holding
// flip-flop resets to 0 (it is always written before it is read).
module lp_lfsr #(
  parameter int unsigned       WIDTH = 36,
  parameter int unsigned       HALF  = WIDTH / 2,
  parameter logic [WIDTH-1:0]  TAPS  = WIDTH'(36'h0_0000_0801),
  parameter logic [WIDTH-1:0]  SEED  = WIDTH'(36'h4_B4B4_B4B4),
  parameter bit                ZERO_STATE = 1'b0
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             en1,      // clock enable: first half and holding flop
  input  logic             en2,      // clock enable: second half
  input  logic             sel1,     // 1: first half from flops, 0: from injection
  input  logic             sel2,     // 1: second half from flops, 0: from injection
  output logic [WIDTH-1:0] pattern,  // low power outputs O1..On (O1 is the MSB)
  output logic [WIDTH-1:0] state,    // flip-flop outputs FF1..FFn
  output logic             r,        // injected random bit R (= FFn)
  output logic             so        // serial output (= FFn)
);

  localparam int unsigned LOW = WIDTH - HALF;  // width of the second half

  logic [WIDTH-1:0] q;        // FF1..FFn, FF1 at the MSB
  logic             hold_q;   // holding flip-flop between the halves
  logic [WIDTH-1:0] d;        // next value of every flip-flop
  logic             fb;       // feedback into FF1
  logic [WIDTH-1:0] inj;      // injection circuit outputs

  // next values: first half shifts in the feedback, second half shifts in
  // the holding flip-flop
  always_comb begin
    fb = ^(q & TAPS);
    // optional all-zeros correction: invert the feedback while FF1..FF(n-1)
    // are all zero, which adds the all-zeros state to the sequence
    if (ZERO_STATE && q[WIDTH-1:1] == '0)
      fb = ~fb;
    d  = {fb, q[WIDTH-1 -: HALF-1], hold_q, q[LOW-1:1]};
  end

  // injection: keep a bit whose next value equals its current value,
  // otherwise substitute R
  always_comb begin
    for (int i = 0; i < WIDTH; i++)
      inj[i] = (q[i] == d[i]) ? q[i] : q[0];
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      q      <= SEED;
      hold_q <= 1'b0;
    end else begin
      if (en1) begin
        q[WIDTH-1 -: HALF] <= d[WIDTH-1 -: HALF];
        hold_q             <= q[LOW];          // last stage of first half
      end
      if (en2)
        q[LOW-1:0] <= d[LOW-1:0];
    end
  end

  assign pattern = {sel1 ? q[WIDTH-1 -: HALF] : inj[WIDTH-1 -: HALF],
                    sel2 ? q[LOW-1:0]         : inj[LOW-1:0]};
  assign state   = q;
  assign r       = q[0];
  assign so      = q[0];

  initial begin
    assert (HALF >= 2 && LOW >= 2)
      else $fatal(1, "lp_lfsr: each half needs at least two flip-flops");
  end

endmodule
