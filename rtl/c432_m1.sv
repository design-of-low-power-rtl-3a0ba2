// c432_m1: bus A stage of the c432 interrupt controller.
//
// pa is high when any enabled A channel requests. x1 is the mask of channels
// left open to buses B and C: only the acknowledged A channel (the highest
// enabled requesting one) when pa is high, every channel otherwise. The
// block's name, ports and widths follow the thesis's block diagram; the
// encoding of x1 and active-high requests are this design's choices.
// Purely combinational.
module c432_m1
  import c432_pkg::*;
(
  input  chan_vec_t a,
  input  chan_vec_t e,
  output logic      pa,
  output chan_vec_t x1
);
  chan_vec_t req;
  assign req = a & e;
  assign pa  = |req;
  assign x1  = pa ? msb_onehot(req) : '1;
endmodule
