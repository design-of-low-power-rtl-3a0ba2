// lp_bist_top: low power test pattern generator driving the c432 circuit.
//
// The 36-bit LP-TPG produces one test pattern per clock while test_en is
// high and applies it directly to the 36 primary inputs of the c432
// interrupt controller (test-per-clock). The c432 responses are brought out
// for a response analyser or a tester. Mapping of pattern bits to c432
// inputs (this design's choice): pattern[35:27] = A, [26:18] = B,
// [17:9] = C, [8:0] = E, each bus with its channel 8 at the MSB.
module lp_bist_top
  import lp_tpg_pkg::*;
#(
  parameter logic [35:0] TAPS = 36'h0_0000_0801,
  parameter logic [35:0] SEED = 36'h4_B4B4_B4B4,
  parameter bit          ZERO_STATE = 1'b0
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        test_en,
  output logic [35:0] pattern,   // primary inputs applied to c432
  output phase_e      phase,     // which of T, Ta, Tb, Tc is applied
  output logic        lfsr_pat,
  output logic [35:0] lfsr_state, // LFSR flip-flops FF1..FF36
  output logic        so,        // serial output of the LFSR (FF36)
  output logic        pa,
  output logic        pb,
  output logic        pc,
  output logic [3:0]  chan
);

  logic r_unused;

  lp_tpg #(.WIDTH(36), .HALF(18), .TAPS(TAPS), .SEED(SEED),
          .ZERO_STATE(ZERO_STATE)) u_tpg (
    .clk, .reset, .test_en,
    .pattern, .phase, .lfsr_pat,
    .state (lfsr_state), .r (r_unused), .so
  );

  c432 u_cut (
    .a (pattern[35:27]),
    .b (pattern[26:18]),
    .c (pattern[17:9]),
    .e (pattern[8:0]),
    .pa, .pb, .pc, .chan
  );

endmodule
