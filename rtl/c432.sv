// c432: 27-channel interrupt controller, the circuit under test.
//
// Three request buses A, B and C of nine channels each and a channel enable
// bus E (36 primary inputs). E[i] = 0 masks A[i], B[i] and C[i]. Bus A has
// priority over B, B over C, and within a bus a higher channel index wins.
// The acknowledged channel is the highest enabled requesting channel of the
// highest-priority requesting bus; chan gives its number, and pa, pb and pc
// acknowledge every bus that requests on that channel (so A[4], A[2], B[6]
// and C[4] pending give pa = pc = 1, pb = 0, chan = 4).
//
// The split into M1 (bus A), M2 (bus B), M3 (bus C), M4 (channel select)
// and M5 (priority encoder) and their port names follow the thesis's
// block diagram. The thesis gives the controller's function, not its
// gates: requests here are active high and chan is 0 when nothing is
// acknowledged, which are this design's choices. Purely combinational.
module c432
  import c432_pkg::*;
(
  input  chan_vec_t  a,
  input  chan_vec_t  b,
  input  chan_vec_t  c,
  input  chan_vec_t  e,
  output logic       pa,
  output logic       pb,
  output logic       pc,
  output logic [3:0] chan
);

  chan_vec_t x1, x2, i;

  c432_m1 u_m1 (.a, .e, .pa, .x1);
  c432_m2 u_m2 (.x1, .b, .e, .pb, .x2);
  c432_m3 u_m3 (.x1, .x2, .c, .e, .pc);
  c432_m4 u_m4 (.pa, .pb, .pc, .e, .a, .b, .c, .i);
  c432_m5 u_m5 (.i, .chan);

endmodule
