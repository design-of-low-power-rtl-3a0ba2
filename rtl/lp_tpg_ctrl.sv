// lp_tpg_ctrl: pattern generation controller of the low power TPG.
//
// Steps the LP-LFSR through the four-pattern cycle T, Ta, Tb, Tc, one
// pattern per clock, as long as test_en is high. The enables are decoded
// from the current phase and act at the coming clock edge, the selects from
// the phase the datapath shows now, which reproduces the thesis's table
// of control values:
//
//   pattern  en1 en2 sel1 sel2   what happens at the edge that produces it
//   T         1   0   1    1     first half (and holding flop) shifts
//   Ta        0   0   1    0     nothing shifts; second half from injection
//   Tb        0   1   1    1     second half shifts
//   Tc        0   0   0    1     nothing shifts; first half from injection
//
// After reset the controller is in PH_IDLE with both selects at 1 so the
// seed is visible; the first enabled edge produces T1. With test_en low
// no enable is raised and the phase holds, so the pattern is frozen. The
// explicit idle state and the freeze on test_en low are this design's
// choices; the table itself is the thesis's.
module lp_tpg_ctrl
  import lp_tpg_pkg::*;
(
  input  logic   clk,
  input  logic   reset,     // asynchronous, active high
  input  logic   test_en,   // advance one pattern per clock while high
  output logic   en1,
  output logic   en2,
  output logic   sel1,
  output logic   sel2,
  output phase_e phase,     // pattern currently on the outputs
  output logic   lfsr_pat   // high while an LFSR pattern T is shown
);

  phase_e phase_q, phase_d;

  always_comb begin
    unique case (phase_q)
      PH_IDLE: phase_d = PH_T;
      PH_T:    phase_d = PH_TA;
      PH_TA:   phase_d = PH_TB;
      PH_TB:   phase_d = PH_TC;
      PH_TC:   phase_d = PH_T;
      default: phase_d = PH_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)        phase_q <= PH_IDLE;
    else if (test_en) phase_q <= phase_d;
  end

  assign en1      = test_en && (phase_d == PH_T);
  assign en2      = test_en && (phase_d == PH_TB);
  assign sel1     = (phase_q != PH_TC);
  assign sel2     = (phase_q != PH_TA);
  assign phase    = phase_q;
  assign lfsr_pat = (phase_q == PH_T);

  // only one half may shift at a time
  always_comb assert (!(en1 && en2) || reset);

endmodule
