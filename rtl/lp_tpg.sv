// lp_tpg: low power test pattern generator (LP-TPG).
//
// The controller lp_tpg_ctrl and the LP-LFSR datapath lp_lfsr together.
// Besides clock and reset the only input is test_en, as in the thesis.
// While test_en is high the output `pattern` changes every clock and runs
// through T1, Ta, Tb, Tc, T2, Ta, ...: every fourth pattern is an LFSR
// pattern, and the three in between change each primary input at most once
// on its way from one LFSR pattern to the next, so the total number of input
// transitions equals that of the LFSR patterns alone while each clock moves
// at most one half of the bits. The first pattern after reset (the seed) is
// shown in the idle phase; T1 appears after the first clock with test_en
// high. Parameters are those of lp_lfsr.
module lp_tpg
  import lp_tpg_pkg::*;
#(
  parameter int unsigned      WIDTH = 36,
  parameter int unsigned      HALF  = WIDTH / 2,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(36'h0_0000_0801),
  parameter logic [WIDTH-1:0] SEED  = WIDTH'(36'h4_B4B4_B4B4),
  parameter bit               ZERO_STATE = 1'b0
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             test_en,
  output logic [WIDTH-1:0] pattern,
  output phase_e           phase,
  output logic             lfsr_pat,
  output logic [WIDTH-1:0] state,     // LFSR flip-flops FF1..FFn
  output logic             r,
  output logic             so
);

  logic en1, en2, sel1, sel2;

  lp_tpg_ctrl u_ctrl (
    .clk, .reset, .test_en,
    .en1, .en2, .sel1, .sel2,
    .phase, .lfsr_pat
  );

  lp_lfsr #(.WIDTH(WIDTH), .HALF(HALF), .TAPS(TAPS), .SEED(SEED),
            .ZERO_STATE(ZERO_STATE)) u_lfsr (
    .clk, .reset,
    .en1, .en2, .sel1, .sel2,
    .pattern,
    .state,
    .r, .so
  );

endmodule
