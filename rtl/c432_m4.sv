// c432_m4: channel selection of the c432 interrupt controller.
//
// Produces i, the enabled requests of the highest-priority bus that has
// any (A before B before C), or zero when no bus requests. The highest set
// bit of i is the acknowledged channel; c432_m5 encodes it. Ports and widths
// follow the thesis's block diagram. Purely combinational.
module c432_m4
  import c432_pkg::*;
(
  input  logic      pa,
  input  logic      pb,
  input  logic      pc,
  input  chan_vec_t e,
  input  chan_vec_t a,
  input  chan_vec_t b,
  input  chan_vec_t c,
  output chan_vec_t i
);
  always_comb begin
    if (pa)      i = a & e;
    else if (pb) i = b & e;
    else if (pc) i = c & e;
    else         i = '0;
  end
endmodule
