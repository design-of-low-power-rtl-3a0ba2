// lp_tpg_pkg: types shared by the low power test pattern generator.
//
// The generator emits one pattern per clock in a repeating cycle of four:
// the LFSR pattern T, then three intermediate patterns Ta, Tb and Tc that
// walk the primary inputs from one LFSR pattern to the next while changing
// each bit at most once. PH_IDLE is the state after reset, before the first
// LFSR pattern has been produced; the flip-flops then still hold the seed.
package lp_tpg_pkg;

  typedef enum logic [2:0] {
    PH_IDLE = 3'd0,  // seed on the outputs, no pattern produced yet
    PH_T    = 3'd1,  // LFSR pattern: first half just shifted
    PH_TA   = 3'd2,  // second half shows the injection outputs
    PH_TB   = 3'd3,  // second half just shifted, flip-flops on the outputs
    PH_TC   = 3'd4   // first half shows the injection outputs
  } phase_e;

endpackage
