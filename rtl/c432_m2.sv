// c432_m2: bus B stage of the c432 interrupt controller.
//
// A B channel counts only if it is enabled and left open by x1. pb is high
// when such a request exists: when bus A won, that means B requests on the
// very channel acknowledged for A. x2 narrows the open mask to the
// acknowledged B channel when pb is high and passes x1 on otherwise.
// Names, ports and widths follow the thesis's block diagram; the mask
// encoding is this design's choice. Purely combinational.
module c432_m2
  import c432_pkg::*;
(
  input  chan_vec_t x1,
  input  chan_vec_t b,
  input  chan_vec_t e,
  output logic      pb,
  output chan_vec_t x2
);
  chan_vec_t req;
  assign req = b & e & x1;
  assign pb  = |req;
  assign x2  = pb ? msb_onehot(req) : x1;
endmodule
